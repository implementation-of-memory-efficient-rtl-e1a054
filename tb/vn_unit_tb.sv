// vn_unit_tb: two variable-node lanes (an ordinary lane and lane P-1) driven
// with controller slots built here and delayed like the controller does.
// Checked against a model of the lane: LLR load and swap through the chain,
// VN -> CN totals (LLR only in the first iteration, then sat(LLR + sum)),
// CN -> VN accumulation with restart on the first edge of a group, masking of
// the wrap edge in the last lane, and the posterior written in the last
// iteration and unloaded through the chain.
module vn_unit_tb;
  import ldpc_pkg::*;
  localparam int unsigned LLR_W = 6, DW = 6, UW = 5, SUM_W = 8, DEPTH = 8, AW = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, llr_access, chain_shift, llr_din_we;
  logic [AW-1:0] llr_addr;
  logic [LLR_W-1:0] cin, cout0, cout1;
  ctl_t c0, cd [1:4];
  logic [UW-1:0] m0, md [1:4];
  logic [DW-1:0] mo0, mo1;
  logic mv0, mv1;
  int checks = 0, failures = 0;
  int llr_m [2][DEPTH], sum_m [2][DEPTH], post_m [2][DEPTH];
  int n_mask = 0, n_fwd = 0, n_rev = 0;

  // lane 0 feeds lane 1 through the chain: lane 1 plays lane P-1
  vn_unit #(.LLR_W(LLR_W), .DW(DW), .UW(UW), .SUM_W(SUM_W), .DEPTH(DEPTH), .LAST_LANE(1'b0)) u0 (
    .clk, .rst_n, .llr_access, .chain_shift, .chain_in(cin), .chain_out(cout0), .llr_din_we, .llr_addr,
    .ctl_p(c0), .ctl_o(cd[1]), .ctl_c(cd[4]), .msg_out(mo0), .msg_out_v(mv0), .msg_in(md[4]));
  vn_unit #(.LLR_W(LLR_W), .DW(DW), .UW(UW), .SUM_W(SUM_W), .DEPTH(DEPTH), .LAST_LANE(1'b1)) u1 (
    .clk, .rst_n, .llr_access, .chain_shift, .chain_in(cout0), .chain_out(cout1), .llr_din_we, .llr_addr,
    .ctl_p(c0), .ctl_o(cd[1]), .ctl_c(cd[4]), .msg_out(mo1), .msg_out_v(mv1),
    .msg_in(UW'(md[4] + 3'd1)));

  always_ff @(posedge clk) begin
    cd[1] <= c0; md[1] <= m0;
    for (int k = 2; k <= 4; k++) begin cd[k] <= cd[k-1]; md[k] <= md[k-1]; end
  end

  function automatic int sat(int v, int w); return sat_val(v, w); endfunction

  // model and output checks, evaluated between clock edges
  always @(negedge clk) begin
    if (cd[2].valid && cd[2].fwd && !cd[2].ph) begin
      for (int l = 0; l < 2; l++) begin
        automatic int a = int'(cd[2].e.addr_vn);
        automatic int exp_v = cd[2].iter0 ? sat(llr_m[l][a], DW) : sat(llr_m[l][a] + sum_m[l][a], DW);
        automatic int got = (l == 0) ? int'($signed(mo0)) : int'($signed(mo1));
        automatic logic gv = (l == 0) ? mv0 : mv1;
        automatic logic ev = !(l == 1 && cd[2].e.wrap);
        checks++;
        if (got != exp_v || gv != ev) begin
          failures++;
          if (failures < 6) $display("lane %0d addr %0d: total %0d/%0b expected %0d/%0b", l, a, got, gv, exp_v, ev);
        end
      end
      n_fwd++;
    end
    if (cd[4].valid && !cd[4].fwd && cd[4].ph) begin
      for (int l = 0; l < 2; l++) begin
        automatic int a = int'(cd[4].e.addr_vn);
        automatic int m = (l == 0) ? int'($signed(md[4])) : int'($signed(UW'(md[4] + 3'd1)));
        if (l == 1 && cd[4].e.wrap) begin m = 0; n_mask++; end
        sum_m[l][a] = sat((cd[4].e.first_vn ? 0 : sum_m[l][a]) + m, SUM_W);
        if (cd[4].last_iter && cd[4].e.last_vn) post_m[l][a] = sat(llr_m[l][a] + sum_m[l][a], LLR_W);
      end
      n_rev++;
    end
  end

  // one chain pass: shift in two values (lane 1's first), then swap with word a
  task automatic chain_word(int a, int v0, int v1, output int o0, output int o1);
    @(negedge clk); chain_shift = 1'b1; cin = LLR_W'(v1);
    @(negedge clk); cin = LLR_W'(v0);
    @(negedge clk); chain_shift = 1'b0; llr_din_we = 1'b1; llr_addr = AW'(a);
    @(negedge clk); llr_din_we = 1'b0;
    @(negedge clk);
    o0 = int'($signed(cout0)); o1 = int'($signed(cout1));
  endtask

  task automatic run_half(bit fwd, int it, int niter);
    for (int a = 0; a < int'(DEPTH); a++) begin
      automatic int deg = 2 + a % 2;
      for (int d = 0; d < deg; d++) begin
        for (int ph = 0; ph < 2; ph++) begin
          @(negedge clk);
          c0 = '0;
          c0.valid = 1'b1; c0.ph = ph[0]; c0.fwd = fwd; c0.iter0 = (it == 0);
          c0.last_iter = (it == niter - 1); c0.slot = it[0];
          c0.e.addr_vn = VA_W'(a); c0.e.first_vn = (d == 0); c0.e.last_vn = (d == deg - 1);
          c0.e.wrap = (a == DEPTH - 1) && (d == deg - 1);
          if (ph == 0) m0 = UW'($urandom_range(0, 30) - 15);
        end
      end
    end
    @(negedge clk); c0 = '0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    int o0, o1;
    rst_n = 1'b0; llr_access = 1'b0; chain_shift = 1'b0; llr_din_we = 1'b0; llr_addr = '0;
    cin = '0; c0 = '0; m0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 3; frame++) begin
      automatic int niter = 2 + frame;
      int nl [2][DEPTH];
      llr_access = 1'b1;
      for (int a = 0; a < int'(DEPTH); a++) begin
        nl[0][a] = $urandom_range(0, 62) - 31;
        nl[1][a] = $urandom_range(0, 62) - 31;
        chain_word(a, nl[0][a], nl[1][a], o0, o1);
        if (frame > 0) begin
          checks += 2;
          if (o0 != post_m[0][a] || o1 != post_m[1][a]) begin
            failures++;
            $display("unload addr %0d: %0d %0d expected %0d %0d", a, o0, o1, post_m[0][a], post_m[1][a]);
          end
        end
      end
      llr_m = nl;
      llr_access = 1'b0;
      for (int it = 0; it < niter; it++) begin
        run_half(1'b1, it, niter);
        run_half(1'b0, it, niter);
      end
    end
    checks++;
    if (n_mask == 0 || n_fwd == 0 || n_rev == 0) failures++;
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
