// paddi_chip: the PADDI prototype chip, a cluster of eight execution units
// joined by a crossbar for algorithm-specific data paths in real-time DSP.
//
// Each EXU has its own control (exu_ctl) and eight-word nanostore. An
// external sequencer broadcasts a 3-bit global address every cycle; every
// EXU decodes it locally through its own nanostore into a 53-bit
// instruction, so the eight EXUs run different operations in lockstep. The
// crossbar moves EXU results and the four input channels into the EXU
// register files as the instructions direct, and drives the four output
// channels. Flags travel to other EXUs (local branches / interrupts) over
// static routes and leave the chip on flag_out for global branches by the
// sequencer.
//
// Pipeline (one clock per stage): F latches `ga`, D reads the nanostore,
// E executes, O registers the output channels at the pads. An instruction
// whose address is on `ga` in cycle n drives out_ch in cycle n+3. Flags
// from another chip (ext_flag_in) are registered once more at the pins,
// which adds a branch delay slot for interrupts between chips.
//
// Set-up: the configuration unit shifts the chain cfg_si -> EXU0 -> ... ->
// EXU7 -> cfg_so; per EXU the order is nanostore (word 0 first), static
// settings (exu_cfg_t), scan register A, scan register B. A master chip
// boots from an EPROM after reset; a slave takes cfg_si / cfg_en_in from
// the upstream chip. A `start` pulse after configuration begins execution.
//
// From the document: eight EXUs with their controls, the crossbar with four
// input and four output channels of 16 bits, 3-bit global address, 53-bit
// nanostore words, static flag routing, serial configuration with boot from
// EPROM, the start signal and the extra delay slot between chips. This
// design's own: the pin list, chain order, run control and that EXU pairs
// (0,1), (2,3), (4,5), (6,7) are the ones that can be linked.
module paddi_chip
  import paddi_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          master,
  output logic [15:0]   rom_addr,
  input  logic [7:0]    rom_data,
  input  logic          cfg_en_in,
  input  logic          cfg_si,
  output logic          cfg_en_out,
  output logic          cfg_so,
  output logic          cfg_done,
  // execution
  input  logic          start,
  input  logic [GA_W-1:0] ga,
  input  logic [DW-1:0] in_ch     [N_IN],
  output logic [DW-1:0] out_ch    [N_OUT],
  output logic          out_valid [N_OUT],
  output logic          flag_out  [N_EXU],
  input  logic          ext_flag_in [N_EXT_FLAG],
  output logic          int_taken [N_EXU]
);
  logic cfg_en, cfg_sd, cfg_busy, running;
  logic chain [N_EXU+1];

  config_unit #(.AW(16)) u_cfg (
    .clk, .rst_n, .master, .rom_addr, .rom_data,
    .up_en(cfg_en_in), .up_sd(cfg_si),
    .cfg_en, .cfg_sd, .down_en(cfg_en_out), .busy(cfg_busy), .done(cfg_done)
  );

  assign chain[0] = cfg_sd;
  assign cfg_so   = chain[N_EXU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        running <= 1'b0;
    else if (cfg_busy) running <= 1'b0;
    else if (start)    running <= 1'b1;
  end

  // flags from other chips: one extra register stage
  logic ext_flag_q [N_EXT_FLAG];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N_EXT_FLAG; i++) ext_flag_q[i] <= 1'b0;
    else        ext_flag_q <= ext_flag_in;
  end

  exu_cfg_t      cfg   [N_EXU];
  instr_t        ir    [N_EXU];
  logic          ir_valid [N_EXU];
  logic [DW-1:0] dout  [N_EXU];
  logic [DW-1:0] xa    [N_EXU];
  logic [DW-1:0] xb    [N_EXU];
  logic [3:0]    src_a [N_EXU];
  logic [3:0]    src_b [N_EXU];
  logic [3:0]    fsw1  [N_EXU];
  logic [3:0]    fsw2  [N_EXU];
  logic          oe    [N_EXU];
  logic [1:0]    obus  [N_EXU];
  logic          flag  [N_EXU];
  logic          iflag1 [N_EXU];
  logic          iflag2 [N_EXU];

  for (genvar i = 0; i < N_EXU; i++) begin : g_exu
    localparam int unsigned P = i ^ 1;   // link partner
    logic [GA_W-1:0] ns_raddr;
    logic [IW-1:0]   ns_rdata;
    logic            c1, c2;
    logic            linked;
    logic            lk_cout;
    logic [DW-1:0]   lk_b;
    sel_e            lk_sel;
    logic            lk_ge;

    nanostore u_ns (
      .clk, .cfg_en, .cfg_si(chain[i]), .cfg_so(c1),
      .raddr(ns_raddr), .rdata(ns_rdata)
    );

    cfg_shreg #(.W(CFG_W)) u_static (
      .clk, .cfg_en, .cfg_si(c1), .cfg_so(c2), .q(cfg[i])
    );

    exu_ctl u_ctl (
      .clk, .rst_n, .run(running), .ga,
      .int_flag1(iflag1[i]), .int_flag2(iflag2[i]),
      .iv1(cfg[i].iv1), .iv2(cfg[i].iv2),
      .ns_raddr, .ns_rdata(instr_t'(ns_rdata)),
      .ir(ir[i]), .ir_valid(ir_valid[i]), .int_taken(int_taken[i])
    );

    // a pair is linked by the link bit of its odd member
    assign linked = cfg[i | 1].link;

    exu u_exu (
      .clk, .rst_n, .valid(ir_valid[i]), .ir(ir[i]),
      .is_signed(cfg[i].is_signed), .del_a(cfg[i].del_a), .del_b(cfg[i].del_b),
      .opreg(cfg[i].opreg),
      .link_lo(linked && (i % 2 == 0)), .link_hi(linked && (i % 2 == 1)),
      .xa(xa[i]), .xb(xb[i]),
      .lk_cin(g_exu[P].lk_cout), .lk_cout(lk_cout),
      .lk_b_in(g_exu[P].lk_b), .lk_b_out(lk_b),
      .lk_sel_in(g_exu[P].lk_sel), .lk_sel_out(lk_sel),
      .lk_ge_in(g_exu[P].lk_ge), .lk_ge_out(lk_ge),
      .dout(dout[i]), .flag(flag[i]), .oe(oe[i]), .obus(obus[i]),
      .cfg_en, .cfg_si(c2), .cfg_so(chain[i+1])
    );

    assign src_a[i]    = ir[i].xsrc_a;
    assign src_b[i]    = ir[i].xsrc_b;
    assign fsw1[i]     = cfg[i].fsw1;
    assign fsw2[i]     = cfg[i].fsw2;
    assign flag_out[i] = flag[i];
  end

  logic [DW-1:0] out_bus [N_OUT];
  logic          out_drv [N_OUT];

  crossbar u_xbar (
    .clk, .exu_dout(dout), .in_ch, .src_a, .src_b, .xa, .xb,
    .oe, .obus, .out_bus, .out_drv,
    .exu_flag(flag), .ext_flag(ext_flag_q), .fsw1, .fsw2,
    .int_flag1(iflag1), .int_flag2(iflag2)
  );

  // O stage: output channel registers at the pads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_OUT; k++) begin
        out_ch[k]    <= '0;
        out_valid[k] <= 1'b0;
      end
    end else begin
      out_ch    <= out_bus;
      out_valid <= out_drv;
    end
  end
endmodule
