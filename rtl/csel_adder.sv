// csel_adder: carry-select adder.
//
// The operands are cut into blocks of BLK bits. Every block above the first
// computes its sum twice, once for a carry in of 0 and once for 1, and the
// carry rippling between blocks only picks one of the two, so the carry
// path crosses one multiplexer per block instead of BLK full adders. The
// document names a fast carry-select adder as the EXU's adder; the block
// size is this design's choice. Purely combinational.
module csel_adder #(
  parameter int unsigned W   = 16,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         c_msb   // carry into the most significant bit
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] c;
  logic [NB*BLK-1:0] ax, bx, s0, s1, s;
  logic [NB-1:0] co0, co1;

  assign ax = (NB*BLK)'(a);
  assign bx = (NB*BLK)'(b);
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    assign {co0[i], s0[i*BLK +: BLK]} = {1'b0, ax[i*BLK +: BLK]} + {1'b0, bx[i*BLK +: BLK]};
    assign {co1[i], s1[i*BLK +: BLK]} = {1'b0, ax[i*BLK +: BLK]} + {1'b0, bx[i*BLK +: BLK]} + 1'b1;
    assign s[i*BLK +: BLK] = c[i] ? s1[i*BLK +: BLK] : s0[i*BLK +: BLK];
    assign c[i+1] = c[i] ? co1[i] : co0[i];
  end

  assign sum   = s[W-1:0];
  assign cout  = (W == NB*BLK) ? c[NB] : s[W];
  assign c_msb = sum[W-1] ^ a[W-1] ^ b[W-1];
endmodule
