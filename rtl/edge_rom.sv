// edge_rom: the controller's ROM of edge words for all 21 frame modes.
//
// Word j of mode m sits at address mode_base(m) + j. A word describes one edge
// of each of the P lanes at once: the VN group address, the CN address, the
// rotation for the shuffle network, the position of the edge among the edges of
// its check, and first/last/wrap flags. The words of one mode are ordered by
// VN group: DV_INFO words for each information group, then two words for each
// parity group (see ldpc_pkg for the code structure).
// The contents are computed at elaboration from ldpc_pkg::gen_edge; the
// rotation field depends on P, so a smaller decoder gets a matching ROM.
// The word fields (shift, CN address, VN address) follow the architecture;
// the base locations are generated by formula, not the DVB-S2 tables, and
// the edge index and flags are this design's additions.
// Read is synchronous: dout holds word addr one cycle after en.
module edge_rom
  import ldpc_pkg::*;
#(
  parameter int unsigned P = 360
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ROM_AW-1:0] addr,
  output edge_t             dout
);

  edge_t rom [ROM_DEPTH];

  initial begin
    for (int unsigned m = 0; m < NUM_MODES; m++)
      for (int unsigned j = 0; j < mode_words(m); j++)
        rom[mode_base(m) + j] = gen_edge(m, j, P);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= rom[addr];
  end

endmodule
