// iocontrol_tb: the controller with its edge ROM (8 lanes). Checks that start
// is ignored while llr_access is high; that each iteration issues the mode's
// ROM words in order, each for two cycles (read phase, write phase), first
// VN -> CN with the ROM rotation and then CN -> VN with the negated rotation;
// that the iteration flags (first, last, bank slot) are right; that the two
// halves are separated by exactly 7 idle cycles; that ctl[1..4] are ctl[0]
// delayed by 1..4 cycles; and that done pulses once after
// iterations * 2 * (2 * words + 7) cycles. Two modes are run back to back.
module iocontrol_tb;
  import ldpc_pkg::*;
  localparam int unsigned P = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, llr_access, busy, done, first_half, rom_en;
  logic [MODE_W-1:0] mode;
  logic [ITER_W-1:0] num_iter;
  logic [ROM_AW-1:0] rom_addr;
  edge_t rom_q;
  ctl_t ctl [5];
  int checks = 0, failures = 0;
  ctl_t hist [$];
  longint cyc = 0;

  iocontrol #(.P(P)) dut (.*);
  edge_rom #(.P(P)) u_rom (.clk, .en(rom_en), .addr(rom_addr), .dout(rom_q));

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%s", s);
  endtask

  // delay-line check and history of ctl[0]
  always @(negedge clk) begin
    cyc++;
    hist.push_front(ctl[0]);
    if (hist.size() > 5) void'(hist.pop_back());
    if (hist.size() == 5)
      for (int k = 1; k < 5; k++) begin
        checks++;
        if (ctl[k] != hist[k]) fail($sformatf("ctl[%0d] is not ctl[0] delayed", k));
      end
  end

  task automatic run(int md, int niter);
    ctl_t seen [$];
    longint t0, t1;
    int wn = mode_words(md), idx = 0, ndone = 0;
    @(negedge clk);
    mode = MODE_W'(md); num_iter = ITER_W'(niter); start = 1'b1;
    @(negedge clk);
    start = 1'b0; t0 = cyc;
    while (!done) begin
      seen.push_back(ctl[0]);
      @(negedge clk);
    end
    t1 = cyc;
    checks++;
    if (t1 - t0 != niter * 2 * (2 * wn + 7))
      fail($sformatf("mode %0d: %0d cycles, expected %0d", md, t1 - t0, niter * 2 * (2 * wn + 7)));
    // walk the recorded slots
    for (int it = 0; it < niter; it++)
      for (int h = 0; h < 2; h++) begin
        int gap = 0;
        while (idx < seen.size() && !seen[idx].valid) begin idx++; gap++; end
        checks++;
        if (gap != ((it == 0 && h == 0) ? 2 : 7))
          fail($sformatf("mode %0d it %0d half %0d: %0d idle cycles", md, it, h, gap));
        for (int j = 0; j < wn; j++)
          for (int ph = 0; ph < 2; ph++) begin
            ctl_t c;
            edge_t e = gen_edge(md, j, P);
            int r = (h == 0 || e.shift == 0) ? int'(e.shift) : int'(P) - int'(e.shift);
            c = (idx < seen.size()) ? seen[idx] : '0;
            idx++;
            checks++;
            if (!c.valid || c.ph != ph[0] || c.fwd != (h == 0) || c.e != e || int'(c.rot) != r
                || c.iter0 != (it == 0) || c.last_iter != (it == niter - 1) || c.slot != it[0])
              fail($sformatf("mode %0d it %0d half %0d word %0d ph %0d wrong", md, it, h, j, ph));
          end
      end
    @(negedge clk);
    checks++;
    if (done || busy) fail("done longer than one cycle or still busy");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; llr_access = 1'b0; mode = '0; num_iter = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // start while the frame memory is being accessed: ignored
    llr_access = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) fail("start accepted during llr_access");
    llr_access = 1'b0;
    run(12, 3);
    run(7, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
