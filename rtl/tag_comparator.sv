// tag_comparator: equality comparator of the secure-update subsystem.
//
// Combinational: `eq` is high when the two W-bit operands are equal. The master FSM uses it for
// the two checks of the protocol: the version stored in flash (TAG_F) against the version built
// into the bitstream (TAG_UL) at every power-up, and a received update command against the
// expected ciphertext E_Kreq(TAG_UL). Both uses follow the document; sharing one comparator
// between them is this design's choice.
module tag_comparator #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);

  assign eq = ((a ^ b) == '0);

endmodule
