// ldpc_decoder: semi-parallel min-sum LDPC decoder for DVB-S2 style codes.
//
// P variable-node lanes (vn_unit) and P check-node lanes (cn_unit) exchange
// messages through one shuffle network (shuffler). In each iteration the
// controller (iocontrol) walks the mode's edge-ROM words (edge_rom) twice:
// first VN -> CN (first_half, the shuffler takes vn_concat and rotates by the
// ROM shift), then CN -> VN (it takes cn_concat and rotates by the negated
// shift). One ROM word moves P messages in two cycles (single-port RAMs: read,
// then write).
//
// Frame interface: with llr_access high the decoder is idle and the lanes'
// chain registers form a shift chain: llr_shift moves llr_din into lane 0 and
// every lane's register one lane on; llr_dout is lane P-1's register. llr_din_we
// swaps the whole chain with LLR RAM word llr_addr (the old word reaches the
// chain one cycle later; leave one idle cycle after llr_din_we). After decoding,
// the LLR RAMs hold the posterior LLRs, whose signs are the decoded bits, and
// are unloaded the same way while the next frame is loaded.
// Layout: lane m, word a < k/P holds information bit a*P + m; word k/P + i
// holds parity bit i + q*m (q = (n-k)/P).
//
// start (with llr_access low) latches mode (0..20) and num_iter; busy is high
// while decoding; done pulses when the last iteration has ended.
// The lane structure, the shuffler with its input mux, the single-port node
// memories and the register-chain loading follow the decoder's architecture;
// the bit layout of the frame, the widths, unloading of posterior LLRs and
// the busy/done handshake are this design's choice.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P        = 360,
  parameter int unsigned LLR_W    = 6,
  parameter int unsigned DW       = 6,
  parameter int unsigned UW       = 5,
  parameter int unsigned SUM_W    = 8,
  parameter int unsigned VN_DEPTH = 180,
  parameter int unsigned CN_DEPTH = 135,
  parameter int unsigned MAX_DEG  = 32,
  localparam int unsigned VAW     = $clog2(VN_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // frame load / unload
  input  logic              llr_access,
  input  logic              llr_shift,
  input  logic [LLR_W-1:0]  llr_din,
  input  logic              llr_din_we,
  input  logic [VAW-1:0]    llr_addr,
  output logic [LLR_W-1:0]  llr_dout,
  // decoding
  input  logic              start,
  input  logic [MODE_W-1:0] mode,
  input  logic [ITER_W-1:0] num_iter,
  output logic              busy,
  output logic              done
);

  localparam int unsigned MSG_W = DW + 1;   // valid bit + message

  ctl_t             ctl [5];
  logic             rom_en;
  logic [ROM_AW-1:0] rom_addr;
  edge_t            rom_q;

  logic [LLR_W-1:0] chain [P];
  logic [DW-1:0]    vn_msg [P];
  logic             vn_v [P];
  logic [UW-1:0]    cn_msg [P];
  logic [MSG_W-1:0] vn_concat [P];
  logic [MSG_W-1:0] cn_concat [P];
  logic [MSG_W-1:0] shuf_out [P];

  iocontrol #(.P(P)) u_ctrl (
    .clk, .rst_n, .start, .mode, .num_iter, .llr_access,
    .busy, .done, .first_half(), .rom_en, .rom_addr, .rom_q, .ctl);

  edge_rom #(.P(P)) u_rom (.clk, .en(rom_en), .addr(rom_addr), .dout(rom_q));

  for (genvar m = 0; m < P; m++) begin : g_lane
    vn_unit #(
      .LLR_W(LLR_W), .DW(DW), .UW(UW), .SUM_W(SUM_W), .DEPTH(VN_DEPTH),
      .LAST_LANE(m == P - 1)
    ) u_vn (
      .clk, .rst_n,
      .llr_access, .chain_shift(llr_shift),
      .chain_in((m == 0) ? llr_din : chain[(m == 0) ? 0 : m - 1]),
      .chain_out(chain[m]),
      .llr_din_we, .llr_addr,
      .ctl_p(ctl[0]), .ctl_o(ctl[1]), .ctl_c(ctl[4]),
      .msg_out(vn_msg[m]), .msg_out_v(vn_v[m]),
      .msg_in(shuf_out[m][UW-1:0]));

    cn_unit #(
      .DW(DW), .UW(UW), .DEPTH(CN_DEPTH), .MAX_DEG(MAX_DEG)
    ) u_cn (
      .clk, .rst_n,
      .ctl_p(ctl[0]), .ctl_o(ctl[1]), .ctl_c(ctl[4]),
      .msg_in(shuf_out[m][DW-1:0]), .msg_in_v(shuf_out[m][DW]),
      .msg_out(cn_msg[m]));

    assign vn_concat[m] = {vn_v[m], vn_msg[m]};
    assign cn_concat[m] = {1'b1, {(DW - UW){cn_msg[m][UW-1]}}, cn_msg[m]};
  end

  assign llr_dout = chain[P-1];

  // The node output registers are loaded at ctl[1] phase 0, so the shuffler's
  // stage 1 uses slot ctl[2], stage 2 ctl[3] and stage 3 ctl[4]; its output is
  // at the consumer nodes when ctl[4] is in phase 1.
  shuffler #(.P(P), .W(MSG_W), .SH_W(SH_W)) u_shuf (
    .clk, .first_half(ctl[2].fwd),
    .vn_concat, .cn_concat,
    .rot1(ctl[2].rot), .rot2(ctl[3].rot), .rot3(ctl[4].rot),
    .out(shuf_out));

  // Host rules of the frame interface: no frame access while decoding, and an
  // idle cycle after each swap so the old word can reach the chain.
  a_no_access_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !llr_access);
  a_swap_gap: assert property (@(posedge clk) disable iff (!rst_n)
    llr_din_we |=> !llr_din_we && !llr_shift);

endmodule
