// shuffler: the shuffle network between the P variable nodes and the P check
// nodes.
//
// An input multiplexer picks, for every lane, the VN message (first half of an
// iteration, VN -> CN) or the CN message (second half, CN -> VN). The selected
// P messages are then rotated: output lane (m + rot) mod P receives input lane m.
// The rotation is done in a 3-stage pipeline; each stage rotates by one 3-bit
// digit of the rotation amount (for P = 360: multiples of 64, of 8 and of 1),
// so any rotation 0..P-1 takes exactly three cycles.
// The controller negates the rotation for the CN -> VN direction so that a
// message returns along the edge it came from.
//
// SH_W is split into three equal digits, so it should be a multiple of 3.
// The 3-stage structure and the input mux follow the decoder's architecture;
// the digit split and the valid bit carried with each message are this
// design's choice.
// Timing: the mux and stage 1 register at the edge after first_half/rot1 are
// presented; rot2 and rot3 must be the same rotation delayed by one and two
// cycles. out is valid three clock edges after the input.
module shuffler #(
  parameter int unsigned P    = 360,
  parameter int unsigned W    = 7,
  parameter int unsigned SH_W = 9
) (
  input  logic            clk,
  input  logic            first_half,       // 1: take vn_concat, 0: take cn_concat
  input  logic [W-1:0]    vn_concat [P],
  input  logic [W-1:0]    cn_concat [P],
  input  logic [SH_W-1:0] rot1,             // rotation seen by stage 1
  input  logic [SH_W-1:0] rot2,             // same rotation, one cycle later
  input  logic [SH_W-1:0] rot3,             // same rotation, two cycles later
  output logic [W-1:0]    out [P]
);

  localparam int unsigned D = (SH_W + 2) / 3;      // bits per stage digit
  localparam int unsigned NDIG = 1 << D;

  logic [W-1:0] sel [P];
  logic [W-1:0] s1 [P];
  logic [W-1:0] s2 [P];

  // Stage input selection: lane j of a stage reads lane (j - digit*weight) mod P
  // of the previous stage, an NDIG-to-1 mux whose inputs are fixed lanes.
  for (genvar j = 0; j < P; j++) begin : g_lane
    logic [W-1:0] c1 [NDIG];
    logic [W-1:0] c2 [NDIG];
    logic [W-1:0] c3 [NDIG];

    assign sel[j] = first_half ? vn_concat[j] : cn_concat[j];

    for (genvar dv = 0; dv < NDIG; dv++) begin : g_dig
      assign c1[dv] = sel[(j + P - (dv << (2 * D)) % P) % P];
      assign c2[dv] = s1[(j + P - (dv << D) % P) % P];
      assign c3[dv] = s2[(j + P - dv % P) % P];
    end

    always_ff @(posedge clk) begin
      s1[j]  <= c1[rot1[2*D +: D]];
      s2[j]  <= c2[rot2[D +: D]];
      out[j] <= c3[rot3[0 +: D]];
    end
  end

endmodule
