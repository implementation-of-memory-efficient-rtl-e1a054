// cn_unit_tb: one check-node lane with four CN addresses of degree 3 to 6,
// edges arriving interleaved across addresses. Several iterations of
// VN -> CN and CN -> VN halves are run with random totals (and an occasional
// invalid, masked input). A model computes each variable-to-check message
// (total minus the check's own previous message), min1/min2/parity per check,
// and the min-sum reply of every edge, which the lane's output must match.
module cn_unit_tb;
  import ldpc_pkg::*;
  localparam int unsigned DW = 6, UW = 5, DEPTH = 4, MAX_DEG = 32, NA = 4;
  localparam int MAGMAX = 15;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  ctl_t c0, cd [1:4];
  logic [DW-1:0] m0, md [1:4];
  logic v0, vd [1:4];
  logic [UW-1:0] mo;
  int checks = 0, failures = 0;
  int deg [NA] = '{3, 4, 5, 6};
  int c2v_old [NA][8], c2v_new [NA][8], v2c [NA][8];
  int n_min2 = 0, n_invalid = 0;

  cn_unit #(.DW(DW), .UW(UW), .DEPTH(DEPTH), .MAX_DEG(MAX_DEG)) dut (
    .clk, .rst_n, .ctl_p(c0), .ctl_o(cd[1]), .ctl_c(cd[4]), .msg_in(md[4]), .msg_in_v(vd[4]),
    .msg_out(mo));

  always_ff @(posedge clk) begin
    cd[1] <= c0; md[1] <= m0; vd[1] <= v0;
    for (int k = 2; k <= 4; k++) begin cd[k] <= cd[k-1]; md[k] <= md[k-1]; vd[k] <= vd[k-1]; end
  end

  // model of the VN -> CN half, applied when the lane consumes the message
  always @(negedge clk) begin
    if (cd[4].valid && cd[4].fwd && cd[4].ph) begin
      automatic int a = int'(cd[4].e.addr_cn), e = int'(cd[4].e.eidx);
      automatic int old = cd[4].iter0 ? 0 : c2v_old[a][e];
      if (vd[4]) v2c[a][e] = sat_val(int'($signed(md[4])) - old, DW);
      else begin v2c[a][e] = MAGMAX; n_invalid++; end
    end
    if (cd[2].valid && !cd[2].fwd && !cd[2].ph) begin
      automatic int a = int'(cd[2].e.addr_cn), e = int'(cd[2].e.eidx);
      checks++;
      if (int'($signed(mo)) != c2v_new[a][e]) begin
        failures++;
        if (failures < 6) $display("addr %0d edge %0d: got %0d expected %0d", a, e, $signed(mo), c2v_new[a][e]);
      end
    end
  end

  function automatic int mag(int v);
    int m = (v < 0) ? -v : v;
    return (m > MAGMAX) ? MAGMAX : m;
  endfunction

  task automatic model_replies();
    for (int a = 0; a < int'(NA); a++) begin
      int m1 = MAGMAX, m2 = MAGMAX;
      bit par = 0;
      for (int e = 0; e < deg[a]; e++) begin
        if (mag(v2c[a][e]) < m1) begin m2 = m1; m1 = mag(v2c[a][e]); end
        else if (mag(v2c[a][e]) < m2) m2 = mag(v2c[a][e]);
        par ^= v2c[a][e] < 0;
      end
      for (int e = 0; e < deg[a]; e++) begin
        int r = (mag(v2c[a][e]) == m1) ? m2 : m1;
        if (mag(v2c[a][e]) == m1 && m1 != m2) n_min2++;
        c2v_new[a][e] = (par ^ (v2c[a][e] < 0)) ? -r : r;
      end
    end
  endtask

  // edge words: interleave the addresses, edge index counting per address
  task automatic run_half(bit fwd, int it);
    int next [NA] = '{0, 0, 0, 0};
    int left = 0;
    foreach (deg[a]) left += deg[a];
    while (left > 0) begin
      int a = $urandom_range(0, NA - 1);
      if (next[a] >= deg[a]) continue;
      for (int ph = 0; ph < 2; ph++) begin
        @(negedge clk);
        c0 = '0;
        c0.valid = 1'b1; c0.ph = ph[0]; c0.fwd = fwd; c0.iter0 = (it == 0); c0.slot = it[0];
        c0.e.addr_cn = CA_W'(a); c0.e.eidx = EI_W'(next[a]);
        if (ph == 0) begin
          m0 = DW'($urandom_range(0, 62) - 31);
          v0 = $urandom_range(0, 19) != 0;
        end
      end
      next[a]++;
      left--;
    end
    @(negedge clk); c0 = '0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; c0 = '0; m0 = '0; v0 = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 12; it++) begin
      run_half(1'b1, it);
      model_replies();
      run_half(1'b0, it);
      c2v_old = c2v_new;
    end
    checks++;
    if (n_min2 == 0 || n_invalid == 0) failures++;
    $display("min2 replies %0d, invalid inputs %0d", n_min2, n_invalid);
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
