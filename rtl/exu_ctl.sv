// exu_ctl: the control (CTL) of one EXU: fetch and decode stages and
// local branches.
//
// The EXU pipeline has four stages, one clock each: F latches the 3-bit
// global address broadcast by the external sequencer; D reads the nanostore
// word at that address into the instruction register; E (the exu block)
// executes it; O (the output channel registers of the chip) presents the
// result at the pads. `run` marks the cycles in which the sequencer issues
// an address, and a valid bit travels with every instruction.
//
// Local branch (interrupt): if the instruction now in E has interrupt
// enable 1 (or 2) set and the flag routed to interrupt input 1 (or 2) is
// high, the decode stage reads the nanostore at interrupt vector IV1 (or
// IV2) instead of the fetched address. Flags are registered at the end of
// the producing EXU's E stage, so an EXU on the same chip that sets its
// flag in cycle n redirects the instruction decoded in cycle n+1: the one
// instruction after the enabling one, already decoded, is the delay slot.
// Interrupt 1 has priority. The vector replaces one instruction; the
// global address stream resumes after it.
//
// From the document: the four stages, the 3-bit global address, two
// interrupt enables set in the previous instruction, two vectors, one delay
// slot. This design's own: the priority, and that a vector replaces exactly
// one instruction. Resets to an empty pipeline.
module exu_ctl
  import paddi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [GA_W-1:0]   ga,
  input  logic              int_flag1,
  input  logic              int_flag2,
  input  logic [GA_W-1:0]   iv1,
  input  logic [GA_W-1:0]   iv2,
  // nanostore read port
  output logic [GA_W-1:0]   ns_raddr,
  input  instr_t            ns_rdata,
  // execute stage
  output instr_t            ir,
  output logic              ir_valid,
  output logic              int_taken
);
  logic [GA_W-1:0] ga_q;
  logic            f_valid;
  logic            take1, take2;

  assign take1 = ir_valid && ir.ien[0] && int_flag1;
  assign take2 = ir_valid && ir.ien[1] && int_flag2;
  assign int_taken = f_valid && (take1 || take2);
  assign ns_raddr  = !f_valid ? ga_q : take1 ? iv1 : take2 ? iv2 : ga_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ga_q     <= '0;
      f_valid  <= 1'b0;
      ir       <= '0;
      ir_valid <= 1'b0;
    end else begin
      ga_q     <= ga;
      f_valid  <= run;
      ir       <= ns_rdata;
      ir_valid <= f_valid;
    end
  end
endmodule
