// iocontrol: system controller of the decoder.
//
// On start (accepted when idle and llr_access is low) it latches the mode and
// the number of iterations. Each iteration has two halves: VN -> CN
// (first_half) and CN -> VN. In a half it walks through the mode's edge-ROM
// words, one word every two cycles because the node RAMs are single-ported
// (read cycle, write cycle). For each word it issues a control slot ctl[0]
// (phase 0 two cycles after the ROM read, phase 1 in the next cycle) with the
// VN and CN addresses, the flags, and the rotation for the shuffle network: the
// ROM shift in the forward half and its negation (P - shift) in the reverse
// half, so that messages return along the same edges. Delay registers
// ctl[1..4] carry each slot along with the data through the node output
// registers (1 cycle), the shuffler (3 cycles) and into the consumer nodes.
// Between halves it waits until the pipeline is empty: the direction switch
// costs 7 cycles, so a decode of W words and I iterations takes I*2*(2W+7)
// cycles. After the last iteration it pulses done for one cycle.
// The two-cycle word rate, the negated reverse shift and the delay registers
// follow the decoder's architecture; the state encoding, the drain rule and
// the start/busy/done handshake are this design's choice.
//
// State machine: IDLE -> FWD -> FDRAIN -> REV -> RDRAIN -> (FWD | IDLE).
// num_iter = 0 runs one iteration.
module iocontrol
  import ldpc_pkg::*;
#(
  parameter int unsigned P = 360
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MODE_W-1:0] mode,
  input  logic [ITER_W-1:0] num_iter,
  input  logic              llr_access,
  output logic              busy,
  output logic              done,
  output logic              first_half,
  // edge ROM
  output logic              rom_en,
  output logic [ROM_AW-1:0] rom_addr,
  input  edge_t             rom_q,
  // control slots, ctl[k] is ctl[0] delayed by k cycles
  output ctl_t              ctl [5]
);

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_FDRAIN, S_REV, S_RDRAIN} state_t;

  state_t            state;
  logic [ROM_AW-1:0] base;
  logic [ROM_AW-1:0] count;
  logic [ROM_AW-1:0] ecnt;
  logic [ITER_W-1:0] iter, niter;
  logic              ph;        // issue phase: ROM read when 0
  logic              rd_d1, rd_d2;
  logic              pipe_busy;
  ctl_t              c0;

  // per-mode ROM base and length
  function automatic logic [2*ROM_AW-1:0] mode_range(logic [MODE_W-1:0] m);
    logic [2*ROM_AW-1:0] r = '0;
    for (int unsigned i = 0; i < NUM_MODES; i++)
      if (m == MODE_W'(i)) r = {ROM_AW'(mode_base(i)), ROM_AW'(mode_words(i))};
    return r;
  endfunction

  assign busy       = (state != S_IDLE);
  assign first_half = (state == S_FWD) || (state == S_FDRAIN);
  assign rom_en     = ((state == S_FWD) || (state == S_REV)) && !ph;
  assign rom_addr   = base + ecnt;
  assign pipe_busy  = rd_d1 || rd_d2 || ctl[0].valid || ctl[1].valid || ctl[2].valid
                   || ctl[3].valid || ctl[4].valid;

  always_comb begin
    c0           = '0;
    c0.valid     = rd_d1 || rd_d2;
    c0.ph        = rd_d2;
    c0.fwd       = first_half;
    c0.iter0     = (iter == '0);
    c0.last_iter = (iter == niter - 1'b1);
    c0.slot      = iter[0];
    c0.e         = rom_q;
    c0.rot       = (first_half || rom_q.shift == '0) ? rom_q.shift
                                                     : SH_W'(P - int'(rom_q.shift));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      base  <= '0;
      count <= '0;
      ecnt  <= '0;
      iter  <= '0;
      niter <= '0;
      ph    <= 1'b0;
      rd_d1 <= 1'b0;
      rd_d2 <= 1'b0;
      done  <= 1'b0;
      for (int k = 0; k < 5; k++) ctl[k] <= '0;
    end else begin
      done  <= 1'b0;
      rd_d1 <= rom_en;
      rd_d2 <= rd_d1;
      ctl[0] <= c0;
      for (int k = 1; k < 5; k++) ctl[k] <= ctl[k-1];
      // c0 is combinational on rd_d1/rd_d2; ctl[0] is its registered copy
      // one cycle later, so the slot timing is measured from ctl[0].
      case (state)
        S_IDLE: begin
          if (start && !llr_access) begin
            {base, count} <= mode_range(mode);
            niter <= (num_iter == '0) ? ITER_W'(1) : num_iter;
            iter  <= '0;
            ecnt  <= '0;
            ph    <= 1'b0;
            state <= S_FWD;
          end
        end
        S_FWD, S_REV: begin
          ph <= !ph;
          if (ph) begin
            if (ecnt == count - 1'b1) begin
              ecnt  <= '0;
              state <= (state == S_FWD) ? S_FDRAIN : S_RDRAIN;
            end else begin
              ecnt <= ecnt + 1'b1;
            end
          end
        end
        S_FDRAIN: begin
          ph <= 1'b0;
          if (!pipe_busy) state <= S_REV;
        end
        S_RDRAIN: begin
          ph <= 1'b0;
          if (!pipe_busy) begin
            if (iter == niter - 1'b1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              iter  <= iter + 1'b1;
              state <= S_FWD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_one_read_per_word: assert property (@(posedge clk) disable iff (!rst_n)
    rom_en |=> !rom_en);

endmodule
