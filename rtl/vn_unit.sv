// vn_unit: one variable node lane of the semi-parallel decoder.
//
// Each lane owns two single-port RAMs addressed by the VN group: one holds the
// channel LLR of the bit, the other the sum of the check-to-variable messages
// received in the last iteration. Adders combine them:
//  * VN -> CN half: the lane sends total = sat(LLR + sum) on every edge (only
//    LLR in the first iteration). It does not remove the message that arrived
//    on the same edge; the check node subtracts that itself, so no per-edge
//    message memory is needed in the VN.
//  * CN -> VN half: incoming messages are accumulated, read-modify-write, into
//    the sum RAM; the first edge of a group restarts the sum. In the last
//    iteration the last edge of a group also writes the posterior LLR
//    sat(LLR + sum) into the LLR RAM, where its sign is the decoded bit.
// Loading: while llr_access is high the lane's chain register is part of a
// shift chain through all lanes (chain_shift moves it one lane on). llr_din_we
// swaps the chain register with LLR RAM word llr_addr: the register is written
// into the RAM and, one cycle later, the old RAM word is in the register, so a
// new frame is loaded while the decoded one is unloaded.
//
// Timing (ctl_p = controller slot delay 0, ctl_o = delay 1, ctl_c = delay 4):
//   VN -> CN: RAM read on ctl_p phase 0, msg_out registered on ctl_o phase 0,
//             valid for the next two cycles.
//   CN -> VN: RAM read on ctl_c phase 0, msg_in used and RAMs written on
//             ctl_c phase 1.
// Word widths and the sum width are this design's choice; the upstream
// (check-to-variable) message has one bit fewer than the downstream one.
module vn_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned LLR_W     = 6,
  parameter int unsigned DW        = 6,    // VN -> CN message width
  parameter int unsigned UW        = 5,    // CN -> VN message width
  parameter int unsigned SUM_W     = 8,
  parameter int unsigned DEPTH     = 180,
  parameter bit          LAST_LANE = 1'b0, // lane P-1: masked on "wrap" words
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // load / unload chain
  input  logic              llr_access,
  input  logic              chain_shift,
  input  logic [LLR_W-1:0]  chain_in,
  output logic [LLR_W-1:0]  chain_out,
  input  logic              llr_din_we,
  input  logic [AW-1:0]     llr_addr,
  // control slots
  input  ctl_t              ctl_p,
  input  ctl_t              ctl_o,
  input  ctl_t              ctl_c,
  // messages
  output logic [DW-1:0]     msg_out,
  output logic              msg_out_v,
  input  logic [UW-1:0]     msg_in
);

  logic [LLR_W-1:0] llr_q, llr_d;
  logic [SUM_W-1:0] sum_q, sum_d;
  logic [AW-1:0]    addr;
  logic             llr_en, llr_wr, sum_en, sum_wr, swap_d;
  logic             p_rd, o_cap, c_rd, c_wr, masked;
  int               total, new_sum;

  assign p_rd   = ctl_p.valid && ctl_p.fwd && !ctl_p.ph;
  assign o_cap  = ctl_o.valid && ctl_o.fwd && !ctl_o.ph;
  assign c_rd   = ctl_c.valid && !ctl_c.fwd && !ctl_c.ph;
  assign c_wr   = ctl_c.valid && !ctl_c.fwd && ctl_c.ph;
  assign masked = LAST_LANE && ctl_c.e.wrap;

  always_comb begin
    if (llr_access)  addr = llr_addr;
    else if (p_rd)   addr = AW'(ctl_p.e.addr_vn);
    else             addr = AW'(ctl_c.e.addr_vn);
  end

  // CN -> VN accumulation and posterior
  always_comb begin
    new_sum = (ctl_c.e.first_vn ? 0 : int'($signed(sum_q)))
            + (masked ? 0 : int'($signed(msg_in)));
    new_sum = sat_val(new_sum, SUM_W);
    sum_d   = SUM_W'(new_sum);
    llr_d   = llr_access ? chain_out
                         : LLR_W'(sat_val(int'($signed(llr_q)) + new_sum, LLR_W));
  end

  assign llr_en = (llr_access && llr_din_we) || (!llr_access && (p_rd || c_rd || c_wr));
  assign llr_wr = (llr_access && llr_din_we) ||
                  (!llr_access && c_wr && ctl_c.last_iter && ctl_c.e.last_vn);
  assign sum_en = !llr_access && (p_rd || c_rd || c_wr);
  assign sum_wr = !llr_access && c_wr;

  spram #(.W(LLR_W), .DEPTH(DEPTH)) u_llr_ram (
    .clk, .en(llr_en), .we(llr_wr), .addr, .din(llr_d), .dout(llr_q));

  spram #(.W(SUM_W), .DEPTH(DEPTH)) u_sum_ram (
    .clk, .en(sum_en), .we(sum_wr), .addr, .din(sum_d), .dout(sum_q));

  // VN -> CN message
  always_comb begin
    total = ctl_o.iter0 ? int'($signed(llr_q))
                        : int'($signed(llr_q)) + int'($signed(sum_q));
    total = sat_val(total, DW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_out   <= '0;
      msg_out_v <= 1'b0;
      chain_out <= '0;
      swap_d    <= 1'b0;
    end else begin
      if (o_cap) begin
        msg_out   <= DW'(total);
        msg_out_v <= !(LAST_LANE && ctl_o.e.wrap);
      end
      swap_d <= llr_access && llr_din_we;
      if (swap_d)                          chain_out <= llr_q;
      else if (llr_access && chain_shift)  chain_out <= chain_in;
    end
  end

endmodule
