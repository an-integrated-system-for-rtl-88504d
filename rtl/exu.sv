// exu: one PADDI execution unit (the execute stage of its pipeline).
//
// Operands come from two register files, A and B. The B operand passes a
// logarithmic right shifter (x1 .. x1/128) and, inverted for subtraction,
// enters a carry-select adder with A. A result multiplexer then picks the
// sum, a saturation value, A or the shifted B, which gives add, subtract,
// saturating add/subtract (two's complement or unsigned, by static
// configuration), compare, max, min and pass A/B. Chained shift/add and
// shift/subtract come for free: every operation sees the shifted B.
// Compare, max and min load the status flag with A >= (B >> sh).
//
// The result leaves the EXU either directly or through the output pipeline
// register (static `opreg`; the instruction's `latch` bit loads it). It goes
// to the crossbar and, under `oe`, to one of the output channels. Each file
// is written at the clock edge with either the crossbar value chosen by the
// instruction or, for accumulation, this EXU's own result.
//
// Two neighbouring EXUs can be linked into one 32-bit data path: the lower
// half sends its carry out up (lk_cout -> lk_cin), the upper half sends its
// unshifted B operand down as the shifter fill, and the upper half decides
// the result selection and the flag for both (lk_sel, lk_ge). Both halves
// must be given the same operation and shift.
//
// Timing: everything from the register file read to the adder, the
// multiplexer and the register file write lies in one clock cycle, the
// EXU OP stage. `valid` qualifies every state change.
//
// From the document: the operation set, two six-register files, the shifter
// on one operand, the carry-select adder, the a>=b flag, the optional
// pipeline register, 16/32-bit linking, and (from its EXU figure) the input
// multiplexers that choose between the network and the EXU's own output.
// This design's own: the opcode list, the saturation values, which
// operations set the flag, and the link signals.
module exu
  import paddi_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  instr_t        ir,
  // static configuration
  input  logic          is_signed,
  input  logic          del_a,
  input  logic          del_b,
  input  logic          opreg,
  input  logic          link_lo,   // this EXU is the lower half of a pair
  input  logic          link_hi,   // this EXU is the upper half of a pair
  // crossbar operands
  input  logic [DW-1:0] xa,
  input  logic [DW-1:0] xb,
  // link to the partner EXU
  input  logic          lk_cin,
  output logic          lk_cout,
  input  logic [DW-1:0] lk_b_in,
  output logic [DW-1:0] lk_b_out,
  input  sel_e          lk_sel_in,
  output sel_e          lk_sel_out,
  input  logic          lk_ge_in,
  output logic          lk_ge_out,
  // results
  output logic [DW-1:0] dout,
  output logic          flag,
  output logic          oe,
  output logic [1:0]    obus,
  // configuration chain through the two scan registers (A then B)
  input  logic          cfg_en,
  input  logic          cfg_si,
  output logic          cfg_so
);
  logic [DW-1:0] a, b, shb, bx, sum, result, pipe;
  logic          sub, cin, cout, c_msb, v, ge, cfg_mid;
  sel_e          sel, sel_use;
  logic          ge_use;

  exu_regfile u_rfa (
    .clk, .rst_n, .delay(del_a),
    .we(valid && ir.we_a), .waddr(ir.wa), .wdata(ir.fb_a ? dout : xa),
    .raddr(ir.ra), .rdata(a),
    .cfg_en, .cfg_si, .cfg_so(cfg_mid)
  );

  exu_regfile u_rfb (
    .clk, .rst_n, .delay(del_b),
    .we(valid && ir.we_b), .waddr(ir.wb), .wdata(ir.fb_b ? dout : xb),
    .raddr(ir.rb), .rdata(b),
    .cfg_en, .cfg_si(cfg_mid), .cfg_so
  );

  log_shifter #(.W(DW), .SW(3)) u_shift (
    .d(b), .fill(link_lo ? lk_b_in : {DW{b[DW-1]}}), .sh(ir.shamt), .q(shb)
  );

  always_comb begin
    case (ir.op)
      OP_SUB, OP_SUBS, OP_CMP, OP_MAX, OP_MIN: sub = 1'b1;
      default:                                 sub = 1'b0;
    endcase
  end

  assign bx  = sub ? ~shb : shb;
  assign cin = link_hi ? lk_cin : sub;

  csel_adder #(.W(DW), .BLK(4)) u_add (
    .a, .b(bx), .cin, .sum, .cout, .c_msb
  );

  assign v  = cout ^ c_msb;                       // two's complement overflow
  assign ge = is_signed ? ~(sum[DW-1] ^ v) : cout; // valid when subtracting

  always_comb begin
    sel = SEL_SUM;
    case (ir.op)
      OP_ADDS:  if (is_signed) sel = v ? (a[DW-1] ? SEL_SATN : SEL_SATP) : SEL_SUM;
                else           sel = cout ? SEL_SATP : SEL_SUM;
      OP_SUBS:  if (is_signed) sel = v ? (a[DW-1] ? SEL_SATN : SEL_SATP) : SEL_SUM;
                else           sel = cout ? SEL_SUM : SEL_SATN;
      OP_MAX:   sel = ge ? SEL_A : SEL_B;
      OP_MIN:   sel = ge ? SEL_B : SEL_A;
      OP_PASSA: sel = SEL_A;
      OP_PASSB: sel = SEL_B;
      default:  sel = SEL_SUM;
    endcase
  end

  assign sel_use = link_lo ? lk_sel_in : sel;
  assign ge_use  = link_lo ? lk_ge_in  : ge;

  always_comb begin
    case (sel_use)
      SEL_A:    result = a;
      SEL_B:    result = shb;
      SEL_SATP: result = (is_signed && !link_lo) ? {1'b0, {DW-1{1'b1}}} : '1;
      SEL_SATN: result = (is_signed && !link_lo) ? {1'b1, {DW-1{1'b0}}} : '0;
      default:  result = sum;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe <= '0;
      flag <= 1'b0;
    end else if (valid) begin
      if (ir.latch) pipe <= result;
      if (ir.op inside {OP_CMP, OP_MAX, OP_MIN}) flag <= ge_use;
    end
  end

  assign dout       = opreg ? pipe : result;
  assign oe         = valid && ir.oe;
  assign obus       = ir.obus;
  assign lk_cout    = cout;
  assign lk_b_out   = b;
  assign lk_sel_out = sel;
  assign lk_ge_out  = ge;
endmodule
