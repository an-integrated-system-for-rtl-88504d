// tb_exu: self-checking test of the execution unit.
// Three EXUs share one instruction stream: a stand-alone one and a linked
// pair (lower and upper half of a 32-bit path). Each test writes random
// operands into both register files through the crossbar inputs, then runs
// one random operation and compares the result and the flag with a
// reference model of 16-bit and 32-bit arithmetic (wrap, two's complement
// and unsigned saturation, compare, max, min, pass, arithmetic shift of B).
// It also checks accumulation through the feedback path, the output
// pipeline register and that every operation takes one cycle.
module tb_exu;
  import paddi_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  instr_t ir;
  logic is_signed = 0, opreg = 0;
  logic [DW-1:0] xa_s, xb_s, xa_l, xb_l, xa_h, xb_h;
  logic [DW-1:0] dout_s, dout_l, dout_h;
  logic flag_s, flag_l, flag_h;
  logic oe_s, oe_l, oe_h;
  logic [1:0] obus_s, obus_l, obus_h;
  logic cout_s, cout_l, cout_h, ge_s, ge_l, ge_h;
  logic [DW-1:0] b_s, b_l, b_h;
  sel_e sel_s, sel_l, sel_h;
  logic so_s, so_l, so_h;
  int checks = 0, failures = 0;
  int n_op [9];

  exu u_s (.clk, .rst_n, .valid, .ir, .is_signed, .del_a(1'b0), .del_b(1'b0), .opreg,
           .link_lo(1'b0), .link_hi(1'b0), .xa(xa_s), .xb(xb_s),
           .lk_cin(1'b0), .lk_cout(cout_s), .lk_b_in('0), .lk_b_out(b_s),
           .lk_sel_in(SEL_SUM), .lk_sel_out(sel_s), .lk_ge_in(1'b0), .lk_ge_out(ge_s),
           .dout(dout_s), .flag(flag_s), .oe(oe_s), .obus(obus_s),
           .cfg_en(1'b0), .cfg_si(1'b0), .cfg_so(so_s));

  exu u_l (.clk, .rst_n, .valid, .ir, .is_signed, .del_a(1'b0), .del_b(1'b0), .opreg,
           .link_lo(1'b1), .link_hi(1'b0), .xa(xa_l), .xb(xb_l),
           .lk_cin(1'b0), .lk_cout(cout_l), .lk_b_in(b_h), .lk_b_out(b_l),
           .lk_sel_in(sel_h), .lk_sel_out(sel_l), .lk_ge_in(ge_h), .lk_ge_out(ge_l),
           .dout(dout_l), .flag(flag_l), .oe(oe_l), .obus(obus_l),
           .cfg_en(1'b0), .cfg_si(1'b0), .cfg_so(so_l));

  exu u_h (.clk, .rst_n, .valid, .ir, .is_signed, .del_a(1'b0), .del_b(1'b0), .opreg,
           .link_lo(1'b0), .link_hi(1'b1), .xa(xa_h), .xb(xb_h),
           .lk_cin(cout_l), .lk_cout(cout_h), .lk_b_in('0), .lk_b_out(b_h),
           .lk_sel_in(SEL_SUM), .lk_sel_out(sel_h), .lk_ge_in(1'b0), .lk_ge_out(ge_h),
           .dout(dout_h), .flag(flag_h), .oe(oe_h), .obus(obus_h),
           .cfg_en(1'b0), .cfg_si(1'b0), .cfg_so(so_h));

  always #5 clk = ~clk;

  // reference model: n-bit operation, returns {flag_valid, flag, result}
  function automatic void ref_op(input op_e op, input int n, input logic sgn,
                                 input longint a, input longint b, input int sh,
                                 output longint res, output logic fl, output logic sets_flag);
    longint mask, sa, sb, shb, r, lo, hi, ua, ub;
    mask = (longint'(1) << n) - 1;
    sa = (a & mask); if (sa[n-1]) sa = sa - (longint'(1) << n);
    sb = (b & mask); if (sb[n-1]) sb = sb - (longint'(1) << n);
    shb = sb >>> sh;                      // arithmetic shift of B
    ua = a & mask; ub = shb & mask;
    lo = sgn ? -(longint'(1) << (n-1)) : 0;
    hi = sgn ? (longint'(1) << (n-1)) - 1 : mask;
    fl = sgn ? (sa >= shb) : (ua >= ub);
    sets_flag = op inside {OP_CMP, OP_MAX, OP_MIN};
    case (op)
      OP_ADD:   r = ua + ub;
      OP_SUB:   r = ua - ub;
      OP_CMP:   r = ua - ub;
      OP_ADDS:  begin r = sgn ? sa + shb : ua + ub; if (r > hi) r = hi; if (r < lo) r = lo; end
      OP_SUBS:  begin r = sgn ? sa - shb : ua - ub; if (r > hi) r = hi; if (r < lo) r = lo; end
      OP_MAX:   r = fl ? ua : ub;
      OP_MIN:   r = fl ? ub : ua;
      OP_PASSA: r = ua;
      default:  r = ub;                   // OP_PASSB
    endcase
    res = r & mask;
  endfunction

  task automatic load(input logic [31:0] a32, input logic [31:0] b32, input logic [15:0] as, input logic [15:0] bs);
    @(negedge clk);
    ir = '0; ir.op = OP_PASSA; ir.we_a = 1; ir.wa = 3'd1; ir.we_b = 1; ir.wb = 3'd4;
    valid = 1;
    xa_s = as; xb_s = bs;
    xa_l = a32[15:0]; xb_l = b32[15:0]; xa_h = a32[31:16]; xb_h = b32[31:16];
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r16, r32;
    logic f16, f32, sf;
    logic fs_prev, fl_prev;
    ir = '0;
    {xa_s, xb_s, xa_l, xb_l, xa_h, xb_h} = '0;
    for (int i = 0; i < 9; i++) n_op[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] a32, b32;
      logic [15:0] as, bs;
      op_e op;
      int sh;
      a32 = $urandom; b32 = $urandom; as = 16'($urandom); bs = 16'($urandom);
      if (n % 4 == 0) begin a32[31:16] = {16{a32[15]}}; as = {1'b0, as[14:0]} | 16'h7000; end
      if (n % 8 == 1) b32 = a32;
      op = op_e'($urandom_range(0, 8));
      sh = $urandom_range(0, 7);
      is_signed = 1'($urandom);
      opreg = 0;
      load(a32, b32, as, bs);
      @(negedge clk);
      ir = '0; ir.op = op; ir.shamt = 3'(sh); ir.ra = 3'd1; ir.rb = 3'd4; ir.latch = 1;
      ir.oe = 1; ir.obus = 2'(n);
      fs_prev = flag_s; fl_prev = flag_h;
      #1;
      ref_op(op, 16, is_signed, longint'(as), longint'(bs), sh, r16, f16, sf);
      ref_op(op, 32, is_signed, longint'(a32), longint'(b32), sh, r32, f32, sf);
      checks += 2;
      if (dout_s !== r16[15:0]) begin failures++; $display("FAIL 16b %s s=%b a=%h b=%h sh=%0d got %h exp %h", op.name(), is_signed, as, bs, sh, dout_s, r16[15:0]); end
      if ({dout_h, dout_l} !== r32[31:0]) begin failures++; $display("FAIL 32b %s s=%b a=%h b=%h sh=%0d got %h exp %h", op.name(), is_signed, a32, b32, sh, {dout_h, dout_l}, r32[31:0]); end
      checks++;
      if (oe_s !== 1'b1 || obus_s !== 2'(n)) failures++;
      @(posedge clk); #1;
      checks += 2;
      if (flag_s !== (sf ? f16 : fs_prev)) begin failures++; $display("FAIL flag16 %s", op.name()); end
      if (flag_h !== (sf ? f32 : fl_prev) || flag_l !== flag_h) begin failures++; $display("FAIL flag32 %s", op.name()); end
      // output pipeline register holds the result latched in the op cycle
      opreg = 1; valid = 0;
      #1;
      checks++;
      if (dout_s !== r16[15:0]) begin failures++; $display("FAIL pipeline register"); end
      n_op[op]++;
    end
    // accumulate: B.R2 <= B.R2 + A.R1 via feedback, 10 cycles
    opreg = 0; is_signed = 1;
    load(32'd3, 32'd0, 16'd7, 16'd0);
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      ir = '0; ir.op = OP_ADD; ir.ra = 3'd1; ir.rb = 3'd4; ir.we_b = 1; ir.wb = 3'd4; ir.fb_b = 1;
    end
    @(negedge clk); ir = '0; ir.op = OP_PASSB; ir.rb = 3'd4; #1;
    checks += 2;
    if (dout_s !== 16'd70) begin failures++; $display("FAIL accumulate %0d", dout_s); end
    if ({dout_h, dout_l} !== 32'd30) begin failures++; $display("FAIL accumulate 32 %0d", {dout_h, dout_l}); end
    // invalid cycles change nothing
    valid = 0; ir.we_b = 1; ir.fb_b = 1; ir.op = OP_ADD;
    repeat (3) @(posedge clk);
    @(negedge clk); valid = 1; ir = '0; ir.op = OP_PASSB; ir.rb = 3'd4; #1;
    checks++;
    if (dout_s !== 16'd70) begin failures++; $display("FAIL write while invalid"); end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never tested", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
