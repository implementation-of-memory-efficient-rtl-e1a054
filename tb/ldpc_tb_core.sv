// ldpc_tb_core: stimulus and checking for ldpc_decoder testbenches.
//
// Drives the decoder's frame and control ports. For each frame in its list it
// encodes random information bits with the code of the chosen mode (built
// here in natural bit order from the code definition: check c = (x + m*q) mod
// (n-k) for information bits, checks c and c+1 for parity bit c), makes
// channel LLRs with a few sign errors, loads them through the register chain
// (unloading the previous frame's result at the same time), decodes, and
// compares every posterior LLR with a bit-exact reference min-sum decoder that
// works on the natural-order graph: the VN sends LLR + sum of incoming
// messages, the check subtracts its own previous message, min1/min2/parity
// form the check-to-variable messages, all with the decoder's saturation
// widths. It also checks the cycle count of each decode against
// iterations * 2 * (2 * words + 7), counted from the cycle after start: two
// cycles per edge word and a 7-cycle direction switch, and counts the mechanisms that were exercised.
// Ports are driven and sampled on the falling clock edge.
module ldpc_tb_core
  import ldpc_pkg::*;
#(
  parameter int unsigned P       = 8,
  parameter int unsigned LLR_W   = 6,
  parameter int unsigned DW      = 6,
  parameter int unsigned UW      = 5,
  parameter int unsigned SUM_W   = 8,
  parameter int unsigned VAW     = 8,
  parameter int unsigned NFRAMES = 3,
  parameter logic [255:0] MODES = {8'd10, 8'd20, 8'd0, 8'd11}, // byte f: mode of frame f (f < 32)
  parameter logic [255:0] ITERS = {8'd3, 8'd5, 8'd8, 8'd6},   // byte f: iterations of frame f
  parameter int unsigned ERR_PERMILLE = 20
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              llr_access,
  output logic              llr_shift,
  output logic [LLR_W-1:0]  llr_din,
  output logic              llr_din_we,
  output logic [VAW-1:0]    llr_addr,
  input  logic [LLR_W-1:0]  llr_dout,
  output logic              start,
  output logic [MODE_W-1:0] mode,
  output logic [ITER_W-1:0] num_iter,
  input  logic              busy,
  input  logic              done,
  // observed inside the decoder, for mechanism counts only
  input  logic              dir_fwd,
  input  logic              wrap_slot
);

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_swaps = 0, n_dir_switch = 0, n_wrap = 0, n_mode_switch = 0;
  int n_corrected = 0, n_frames = 0;

  // current frame (natural order)
  int nbits, kbits, mchk, qq;
  int llr[];        // channel LLRs
  bit cw[];         // transmitted codeword
  int post[];       // reference posterior
  int ev[$], ec[$]; // edges
  int prev_mode = -1;

  always @(posedge clk) cyc <= cyc + 1;

  logic dir_q = 1'b0;
  always @(posedge clk) begin
    dir_q <= dir_fwd;
    if (busy && dir_q != dir_fwd) n_dir_switch++;
    if (wrap_slot) n_wrap++;
  end

  function automatic int satw(int v, int w);
    return sat_val(v, w);
  endfunction

  // lane/word position of natural bit b
  function automatic int bit_of(int a, int lane, int kg);
    if (a < kg) return a * P + lane;
    return kbits + (a - kg) + qq * lane;
  endfunction

  task automatic build_frame(int md);
    int ng = mode_n_groups(md), kg = mode_k_groups(md);
    bit chk [];
    nbits = ng * P; kbits = kg * P; mchk = nbits - kbits; qq = mode_q(md);
    llr = new[nbits]; cw = new[nbits]; post = new[nbits];
    ev.delete(); ec.delete();
    for (int g = 0; g < kg; g++)
      for (int d = 0; d < int'(DV_INFO); d++)
        for (int m = 0; m < int'(P); m++) begin
          ev.push_back(g * P + m);
          ec.push_back((info_base(md, g, d, P) + m * qq) % mchk);
        end
    for (int c = 0; c < mchk; c++) begin
      ev.push_back(kbits + c); ec.push_back(c);
      if (c + 1 < mchk) begin ev.push_back(kbits + c); ec.push_back(c + 1); end
    end
    // encode: p_c = p_{c-1} ^ (xor of information bits on check c)
    chk = new[mchk];
    for (int b = 0; b < kbits; b++) cw[b] = $urandom_range(0, 1);
    foreach (chk[c]) chk[c] = 0;
    for (int e = 0; e < ev.size(); e++) if (ev[e] < kbits) chk[ec[e]] ^= cw[ev[e]];
    for (int c = 0; c < mchk; c++)
      cw[kbits + c] = chk[c] ^ ((c > 0) ? cw[kbits + c - 1] : 1'b0);
    // channel
    for (int b = 0; b < nbits; b++) begin
      int a = $urandom_range(3, 14);
      if ($urandom_range(0, 999) < ERR_PERMILLE) a = -$urandom_range(1, 6);
      llr[b] = satw(cw[b] ? -a : a, LLR_W);
    end
  endtask

  task automatic reference(int iters);
    int ne = ev.size();
    int c2v_old [], c2v_new [], v2c [], sum [];
    int min1 [], min2 [], cnt [];
    bit par [];
    c2v_old = new[ne]; c2v_new = new[ne]; v2c = new[ne];
    sum = new[nbits]; min1 = new[mchk]; min2 = new[mchk]; par = new[mchk]; cnt = new[mchk];
    for (int t = 0; t < iters; t++) begin
      foreach (min1[c]) begin min1[c] = 15; min2[c] = 15; par[c] = 0; cnt[c] = 0; end
      for (int e = 0; e < ne; e++) begin
        int tot = (t == 0) ? llr[ev[e]] : satw(llr[ev[e]] + sum[ev[e]], DW);
        int mg;
        v2c[e] = satw(tot - ((t == 0) ? 0 : c2v_old[e]), DW);
        mg = (v2c[e] < 0) ? -v2c[e] : v2c[e];
        if (mg > (1 << (UW - 1)) - 1) mg = (1 << (UW - 1)) - 1;
        if (mg < min1[ec[e]]) begin min2[ec[e]] = min1[ec[e]]; min1[ec[e]] = mg; end
        else if (mg < min2[ec[e]]) min2[ec[e]] = mg;
        par[ec[e]] ^= (v2c[e] < 0);
      end
      foreach (sum[b]) sum[b] = 0;
      for (int e = 0; e < ne; e++) begin
        int mg = ((v2c[e] < 0 ? -v2c[e] : v2c[e]) >= ((1 << (UW - 1)) - 1))
                   ? (1 << (UW - 1)) - 1 : (v2c[e] < 0 ? -v2c[e] : v2c[e]);
        int c = ec[e];
        int r = (mg == min1[c]) ? min2[c] : min1[c];
        c2v_new[e] = (par[c] ^ (v2c[e] < 0)) ? -r : r;
        sum[ev[e]] = satw(sum[ev[e]] + c2v_new[e], SUM_W);
      end
      c2v_old = c2v_new;
    end
    foreach (post[b]) post[b] = satw(llr[b] + sum[b], LLR_W);
  endtask

  // Load words 0..load_words-1 of the current frame (words beyond it get 0)
  // while unloading words 0..unload_words-1 of the previous result and
  // comparing them with old_post (if check_old).
  task automatic load_unload(int load_words, int unload_words, int kg_new, int kg_old,
                             int old_post [], int old_k, int old_q, bit check_old);
    int words = (load_words > unload_words) ? load_words : unload_words;
    for (int a = 0; a <= words; a++) begin
      for (int s = int'(P) - 1; s >= 0; s--) begin
        // llr_dout holds lane s of word a-1 of the old contents
        if (check_old && a >= 1 && a - 1 < unload_words) begin
          int b, got, kb_save = kbits, q_save = qq;
          kbits = old_k; qq = old_q;
          b = bit_of(a - 1, s, kg_old);
          kbits = kb_save; qq = q_save;
          got = int'($signed(llr_dout));
          checks++;
          if (got != old_post[b]) begin
            failures++;
            if (failures < 10)
              $display("posterior mismatch bit %0d: got %0d expected %0d", b, got, old_post[b]);
          end
        end
        llr_din   <= (a < load_words) ? LLR_W'(llr[bit_of(a, s, kg_new)]) : '0;
        llr_shift <= 1'b1;
        @(negedge clk);
      end
      llr_shift <= 1'b0;
      if (a < words) begin
        llr_addr <= VAW'(a);
        llr_din_we   <= 1'b1;
        n_swaps++;
        @(negedge clk);
        llr_din_we <= 1'b0;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    int old_post [];
    int old_k = 0, old_q = 0, old_kg = 0, old_ng = 0;
    rst_n = 1'b0; llr_access = 1'b0; llr_shift = 1'b0; llr_din = '0; llr_din_we = 1'b0;
    llr_addr = '0; start = 1'b0; mode = '0; num_iter = '0;
    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int f = 0; f <= int'(NFRAMES); f++) begin
      int md, ch_err, dec_err;
      longint t0;
      md = (f < int'(NFRAMES)) ? int'(MODES[8*f +: 8]) : -1;
      ch_err = 0;
      dec_err = 0;
      if (md >= 0) begin
        build_frame(md);
        reference(int'(ITERS[8*f +: 8]));
      end
      llr_access <= 1'b1;
      @(negedge clk);
      load_unload((md >= 0) ? mode_n_groups(md) : 0, old_ng,
                  (md >= 0) ? mode_k_groups(md) : 0, old_kg, old_post, old_k, old_q, f > 0);
      llr_access <= 1'b0;
      @(negedge clk);
      if (md < 0) break;
      if (prev_mode >= 0 && prev_mode != md) n_mode_switch++;
      prev_mode = md;
      // decode
      mode <= MODE_W'(md); num_iter <= ITER_W'(int'(ITERS[8*f +: 8])); start <= 1'b1;
      @(negedge clk);
      t0 = cyc;
      start <= 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != int'(ITERS[8*f +: 8]) * 2 * (2 * mode_words(md) + 7)) begin
        failures++;
        $display("decode of mode %0d took %0d cycles, expected %0d", md, cyc - t0,
                 int'(ITERS[8*f +: 8]) * 2 * (2 * mode_words(md) + 7));
      end
      for (int b = 0; b < nbits; b++) begin
        if ((llr[b] < 0) != cw[b]) ch_err++;
        if ((post[b] < 0) != cw[b]) dec_err++;
      end
      if (ch_err > 0 && dec_err < ch_err) n_corrected++;
      n_frames++;
      $display("frame %0d mode %0d n=%0d iters=%0d: channel errors %0d, after decoding %0d",
               f, md, nbits, int'(ITERS[8*f +: 8]), ch_err, dec_err);
      old_post = post; old_k = kbits; old_q = qq;
      old_kg = mode_k_groups(md); old_ng = mode_n_groups(md);
    end
    $display("mechanisms: swaps=%0d direction_switches=%0d wrap_slots=%0d mode_switches=%0d frames_with_corrections=%0d",
             n_swaps, n_dir_switch, n_wrap, n_mode_switch, n_corrected);
    checks += 4;
    if (n_swaps == 0)      begin failures++; $display("no LLR swap"); end
    if (n_dir_switch == 0) begin failures++; $display("no direction switch"); end
    if (n_wrap == 0)       begin failures++; $display("no wrap-masked edge word"); end
    if (n_corrected == 0)  begin failures++; $display("no channel error corrected"); end
    if (NFRAMES > 1) begin
      checks++;
      if (n_mode_switch == 0) begin failures++; $display("no mode switch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
