// spram_tb: random single-port traffic against a model array. Checks that a
// read returns the old word (read-before-write on a write cycle) and that dout
// holds while en is low.
module spram_tb;
  localparam int unsigned W = 12, DEPTH = 45, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [AW-1:0] addr;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;

  spram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; din = '0;
    // fill
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = AW'(a); din = W'($urandom); model[a] = din;
    end
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = '0; expect_q = model[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en   = $urandom_range(0, 3) != 0;
      we   = $urandom_range(0, 1);
      addr = AW'($urandom_range(0, DEPTH - 1));
      din  = W'($urandom);
      if (en) expect_q = model[addr];
      if (en && we) model[addr] = din;
      @(posedge clk);
      #1;
      checks++;
      if (dout !== expect_q) begin
        failures++;
        if (failures < 5) $display("read %0d: got %h expected %h", addr, dout, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
