// cn_unit: one check node lane (min-sum) of the semi-parallel decoder.
//
// The lane owns one wide single-port RAM; word a serves the check node at CN
// address a. A word holds two banks of check state, each {min1, min2, index of
// min1, parity of all incoming signs}, plus one sign bit per edge of the check.
// Bank slot is built during iteration t (slot = t mod 2) while the other bank,
// from iteration t-1, is still read.
//  * VN -> CN half (consumer): the VN sends its total LLR+sum. The check node
//    recomputes the message it sent on this edge last iteration (from the old
//    bank and the stored sign) and subtracts it, giving the true variable-to-
//    check message v2c. |v2c| (saturated to the upstream width) and its sign
//    update min1/min2/index/parity of the new bank; edge index 0 restarts the
//    bank. The edge's sign bit is replaced by the sign of v2c.
//  * CN -> VN half (producer): the message for edge e is min2 if e holds the
//    minimum, else min1, with sign parity XOR sign[e] (min-sum).
// An invalid input (a masked lane) counts as a neutral message: positive and
// of largest magnitude.
// The word contents (two minima, their location, parity, all signs) and the
// subtraction of the previous message follow the decoder's architecture; the
// second bank, the widths and the 32-edge limit are this design's choice.
//
// Timing (ctl_p = controller slot delay 0, ctl_o = delay 1, ctl_c = delay 4):
//   CN -> VN: RAM read on ctl_p phase 0, msg_out registered on ctl_o phase 0.
//   VN -> CN: RAM read on ctl_c phase 0, msg_in used and word written on
//             ctl_c phase 1.
module cn_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned DW      = 6,     // VN -> CN message width
  parameter int unsigned UW      = 5,     // CN -> VN message width
  parameter int unsigned DEPTH   = 135,   // largest q = (n-k)/360
  parameter int unsigned MAX_DEG = 32,    // sign bits per check
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned MW     = UW - 1 // magnitude bits of a stored minimum
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ctl_t          ctl_p,
  input  ctl_t          ctl_o,
  input  ctl_t          ctl_c,
  input  logic [DW-1:0] msg_in,
  input  logic          msg_in_v,
  output logic [UW-1:0] msg_out
);

  typedef struct packed {
    logic [MW-1:0]   min1;
    logic [MW-1:0]   min2;
    logic [EI_W-1:0] idx;
    logic            par;
  } bank_t;

  typedef struct packed {
    bank_t [1:0]        bank;
    logic [MAX_DEG-1:0] sgn;
  } cn_word_t;

  localparam int unsigned WORD_W = $bits(cn_word_t);
  localparam int          MAGMAX = (1 << MW) - 1;

  cn_word_t q, d;
  logic     p_rd, o_cap, c_rd, c_wr;
  logic [AW-1:0] addr;

  assign p_rd  = ctl_p.valid && !ctl_p.fwd && !ctl_p.ph;
  assign o_cap = ctl_o.valid && !ctl_o.fwd && !ctl_o.ph;
  assign c_rd  = ctl_c.valid && ctl_c.fwd && !ctl_c.ph;
  assign c_wr  = ctl_c.valid && ctl_c.fwd && ctl_c.ph;
  assign addr  = p_rd ? AW'(ctl_p.e.addr_cn) : AW'(ctl_c.e.addr_cn);

  spram #(.W(WORD_W), .DEPTH(DEPTH)) u_ram (
    .clk, .en(p_rd || c_rd || c_wr), .we(c_wr), .addr, .din(d), .dout(q));

  // Message on edge e from a bank: +-min1, or +-min2 on the minimum's edge.
  function automatic int c2v(bank_t b, logic s, logic [EI_W-1:0] e);
    int mag = (e == b.idx) ? int'(b.min2) : int'(b.min1);
    return (b.par ^ s) ? -mag : mag;
  endfunction

  // VN -> CN: subtract the old message, update the new bank
  always_comb begin
    bank_t old_b, nb;
    int    old_m, v2c, vmag;
    logic  vs;
    old_b = q.bank[!ctl_c.slot];
    old_m = ctl_c.iter0 ? 0 : c2v(old_b, q.sgn[ctl_c.e.eidx], ctl_c.e.eidx);
    v2c   = sat_val(int'($signed(msg_in)) - old_m, DW);
    if (msg_in_v) begin
      vs   = v2c < 0;
      vmag = vs ? -v2c : v2c;
      if (vmag > MAGMAX) vmag = MAGMAX;
    end else begin
      vs   = 1'b0;
      vmag = MAGMAX;
    end
    if (ctl_c.e.eidx == '0) begin
      nb.min1 = MW'(vmag);
      nb.min2 = MW'(MAGMAX);
      nb.idx  = ctl_c.e.eidx;
      nb.par  = vs;
    end else begin
      nb = q.bank[ctl_c.slot];
      if (vmag < int'(nb.min1)) begin
        nb.min2 = nb.min1;
        nb.min1 = MW'(vmag);
        nb.idx  = ctl_c.e.eidx;
      end else if (vmag < int'(nb.min2)) begin
        nb.min2 = MW'(vmag);
      end
      nb.par = nb.par ^ vs;
    end
    d = q;
    d.bank[ctl_c.slot]  = nb;
    d.sgn[ctl_c.e.eidx] = vs;
  end

  a_edge_index: assert property (@(posedge clk) disable iff (!rst_n)
    ctl_c.valid |-> int'(ctl_c.e.eidx) < int'(MAX_DEG));

  // CN -> VN message
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msg_out <= '0;
    else if (o_cap)
      msg_out <= UW'(c2v(q.bank[ctl_o.slot], q.sgn[ctl_o.e.eidx], ctl_o.e.eidx));
  end

endmodule
