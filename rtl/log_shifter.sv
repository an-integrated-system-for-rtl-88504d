// log_shifter: logarithmic arithmetic right shifter.
//
// Shifts d right by 0..2**SW-1 places (multiplies by 1 .. 1/128 for SW=3)
// in SW stages of 1, 2, 4, ... places. The bits entering at the top come
// from `fill`: the sign of d for a stand-alone data path, or the lower bits
// of the upper half's operand when two EXUs are linked into one wide data
// path. The document gives the shift range and calls the shifter
// logarithmic; the fill input is this design's way of linking. Purely
// combinational.
module log_shifter #(
  parameter int unsigned W  = 16,
  parameter int unsigned SW = 3
) (
  input  logic [W-1:0]  d,
  input  logic [W-1:0]  fill,  // bits shifted in from above, LSB first
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  q
);
  logic [2*W-1:0] stage [SW+1];

  assign stage[0] = {fill, d};
  for (genvar i = 0; i < SW; i++) begin : g_st
    assign stage[i+1] = sh[i] ? (stage[i] >> (1 << i)) : stage[i];
  end
  assign q = stage[SW][W-1:0];
endmodule
