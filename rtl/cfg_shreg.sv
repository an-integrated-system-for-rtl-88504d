// cfg_shreg: a W-bit segment of the serial configuration chain.
//
// While cfg_en is high the segment shifts one place per clock, taking
// cfg_si at the least significant end and showing its most significant bit
// on cfg_so; q presents the whole segment in parallel. It holds the static
// set-up of an EXU, so it has no reset: its value comes from the chain.
module cfg_shreg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         cfg_en,
  input  logic         cfg_si,
  output logic         cfg_so,
  output logic [W-1:0] q
);
  always_ff @(posedge clk)
    if (cfg_en) q <= {q[W-2:0], cfg_si};

  assign cfg_so = q[W-1];
endmodule
