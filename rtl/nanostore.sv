// nanostore: the SRAM-based instruction store of one EXU.
//
// NS_WORDS words of IW bits. At set-up time the words are loaded serially:
// while cfg_en is high every bit moves one place along the chain
// cfg_si -> word 7 -> ... -> word 0 -> cfg_so, so a stream sent word 0 first,
// most significant bit first, fills the store after NS_WORDS*IW shifts. At
// run time the word at `raddr` (the decoded global address, or an interrupt
// vector) is read combinationally; the EXU control latches it.
//
// Eight words of 53 bits and serial loading follow the document. The
// storage is modelled as an array of flip-flops written only through the
// chain; the bit order of the chain is this design's own.
module nanostore
  import paddi_pkg::*;
#(
  parameter int unsigned WORDS = NS_WORDS,
  parameter int unsigned W     = IW
) (
  input  logic                     clk,
  input  logic                     cfg_en,
  input  logic                     cfg_si,
  output logic                     cfg_so,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (cfg_en) begin
      for (int w = 0; w < WORDS - 1; w++) mem[w] <= {mem[w][W-2:0], mem[w+1][W-1]};
      mem[WORDS-1] <= {mem[WORDS-1][W-2:0], cfg_si};
    end
  end

  assign cfg_so = mem[0][W-1];
  assign rdata  = mem[raddr];
endmodule
