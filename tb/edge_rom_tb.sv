// edge_rom_tb: reads back the whole edge ROM of the full-size (360-lane)
// decoder and checks, for every one of the 21 modes:
//  * the edges it implies (word x lane, mapped to natural bit and check
//    indices through the VN and CN memory organisation) are exactly the
//    edges of the code definition: information bit g*360+m of base x meets
//    check (x + m*q) mod (n-k); parity bit c meets checks c and c+1;
//  * the edge indices at each CN address count 0, 1, 2, ... in ROM order and
//    stay below 32;
//  * the words of each VN group are contiguous, with first/last flags on the
//    first and last word.
module edge_rom_tb;
  import ldpc_pkg::*;
  localparam int unsigned P = 360;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en;
  logic [ROM_AW-1:0] addr;
  edge_t dout;
  int checks = 0, failures = 0;

  edge_rom #(.P(P)) dut (.clk, .en, .addr, .dout);

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%s", s);
  endtask

  initial begin
    en = 1'b0; addr = '0;
    for (int md = 0; md < int'(NUM_MODES); md++) begin
      automatic int kg = mode_k_groups(md), q = mode_q(md), ng = mode_n_groups(md);
      automatic int kb = kg * P, mc = q * P, nw = mode_words(md);
      automatic int pairs [longint];
      automatic int next_e [];
      automatic int cur_vn = -1;
      automatic int bad_e = 0, bad_f = 0, bad_s = 0;
      edge_t w, prev_w;
      next_e = new[q];
      foreach (next_e[i]) next_e[i] = 0;
      // code definition
      for (int g = 0; g < kg; g++)
        for (int d = 0; d < int'(DV_INFO); d++)
          for (int m = 0; m < int'(P); m++)
            pairs[longint'(g * P + m) * 100000 + (info_base(md, g, d, P) + m * q) % mc]++;
      for (int c = 0; c < mc; c++) begin
        pairs[longint'(kb + c) * 100000 + c]++;
        if (c + 1 < mc) pairs[longint'(kb + c) * 100000 + c + 1]++;
      end
      // ROM contents
      prev_w = '0;
      for (int j = 0; j < nw; j++) begin
        @(negedge clk); en = 1'b1; addr = ROM_AW'(mode_base(md) + j);
        @(negedge clk); en = 1'b0;
        w = dout;
        for (int m = 0; m < int'(P); m++) begin
          longint b, c;
          if (w.wrap && m == int'(P) - 1) continue;
          b = (int'(w.addr_vn) < kg) ? int'(w.addr_vn) * P + m
                                     : kb + (int'(w.addr_vn) - kg) + q * m;
          c = int'(w.addr_cn) + q * ((m + int'(w.shift)) % P);
          if (!pairs.exists(b * 100000 + c)) begin bad_s++; continue; end
          pairs[b * 100000 + c]--;
          if (pairs[b * 100000 + c] == 0) pairs.delete(b * 100000 + c);
        end
        if (int'(w.addr_cn) >= q || int'(w.eidx) != next_e[w.addr_cn]) bad_e++;
        else next_e[w.addr_cn]++;
        if (int'(w.addr_vn) != cur_vn) begin
          if (!w.first_vn || (j > 0 && !prev_w.last_vn) || int'(w.addr_vn) != cur_vn + 1) bad_f++;
          cur_vn = int'(w.addr_vn);
        end else if (w.first_vn || prev_w.last_vn) bad_f++;
        prev_w = w;
      end
      if (!prev_w.last_vn || cur_vn != ng - 1) bad_f++;
      checks += 3;
      if (bad_s != 0 || pairs.num() != 0)
        fail($sformatf("mode %0d: %0d edges not in the code, %0d code edges missing", md, bad_s, pairs.num()));
      if (bad_e != 0) fail($sformatf("mode %0d: %0d bad edge indices", md, bad_e));
      if (bad_f != 0) fail($sformatf("mode %0d: %0d bad VN grouping flags", md, bad_f));
    end
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
