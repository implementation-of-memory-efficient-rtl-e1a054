// spram: single-port synchronous RAM, one access per clock cycle.
//
// The decoder uses single-port memories throughout, which is why every message
// transfer takes two cycles: one to read a word, one to write it back.
// Behaviour: when en is high, dout takes mem[addr] at the clock edge (the old
// contents, read-before-write); when we is also high, mem[addr] takes din at
// the same edge. dout holds its value while en is low. Contents are not reset.
module spram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 180,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      dout <= mem[addr];
      if (we) mem[addr] <= din;
    end
  end

endmodule
