// tb_paddi_chip: end-to-end test of the PADDI chip at its full size.
//
// The test generates a random program for all eight EXUs (eight nanostore
// words each, interrupt vectors, flag routes, delay-line and pipeline
// register settings, scan-register constants; EXUs 6 and 7 linked into one
// 32-bit data path), packs it into a configuration bitstream, places it in
// a byte array that models the boot EPROM and lets the chip boot itself.
// The number of boot cycles is checked. After `start` the testbench acts as
// the external sequencer: it steps a global address through words 0..5
// and branches to word 6 when EXU 0's flag is set (a global branch). Input
// channels and flags from another chip are random.
//
// A cycle-level reference model of the architecture (registers, pipeline,
// crossbar, interrupts, saturation, 16/32-bit arithmetic) runs beside the
// chip; the output channels, their valid bits, the flags and the
// interrupt-taken signals are compared every cycle. The test counts how
// often each mechanism happened (local interrupts from on-chip and
// off-chip flags, global branches, saturation, delay-line writes, pipeline
// register use, feedback writes, input channel reads, output channel
// words, linked 32-bit operations) and counts a failure for any that never
// did. Several random programs are run, each with a fresh boot.
module tb_paddi_chip;
  import paddi_pkg::*;

  localparam int N_PROG   = 4;
  localparam int N_CYC    = 3000;
  localparam int N_BYTES  = N_EXU * EXU_CHAIN / 8;
  localparam int RA_W     = $clog2(N_BYTES + 2);

  logic clk = 0, rst_n = 0, master = 1, cfg_en_in = 0, cfg_si = 0;
  logic [15:0] rom_addr;
  logic [7:0]  rom_data;
  logic cfg_en_out, cfg_so, cfg_done, start = 0;
  logic [GA_W-1:0] ga = 0;
  logic [DW-1:0] in_ch [N_IN], out_ch [N_OUT];
  logic out_valid [N_OUT], flag_out [N_EXU], ext_flag_in [N_EXT_FLAG], int_taken [N_EXU];

  paddi_chip dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- program
  instr_t    prog  [N_EXU][NS_WORDS];
  exu_cfg_t  scfg  [N_EXU];
  logic [DW-1:0] scan_a [N_EXU], scan_b [N_EXU];
  logic [7:0] rom [N_BYTES + 2];

  assign rom_data = (rom_addr < 16'(N_BYTES + 2)) ? rom[RA_W'(rom_addr)] : 8'h00;

  function automatic bit linked_hi(int i); return i == 7; endfunction
  function automatic bit linked_lo(int i); return i == 6; endfunction

  task automatic make_program();
    for (int i = 0; i < N_EXU; i++) begin
      scfg[i] = exu_cfg_t'($urandom);
      scfg[i].fsw1 = 4'($urandom_range(0, 9));
      scfg[i].fsw2 = 4'($urandom_range(0, 9));
      scfg[i].link = (i == 7);
      scan_a[i] = DW'($urandom);
      scan_b[i] = DW'($urandom);
      for (int w = 0; w < NS_WORDS; w++) begin
        instr_t t;
        t = instr_t'({21'($urandom), 32'($urandom)});
        t.op   = op_e'($urandom_range(0, 8));
        t.rsvd = '0;
        t.ien  = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b00;
        t.obus = 2'(i % 4);
        t.oe   = (i < 4) && 1'($urandom);
        if (i >= 6) t.ien = 2'b00;
        prog[i][w] = t;
      end
    end
    scfg[6].is_signed = scfg[7].is_signed;
    for (int w = 0; w < NS_WORDS; w++) begin
      prog[6][w].op    = prog[7][w].op;
      prog[6][w].shamt = prog[7][w].shamt;
    end
  endtask

  // chain order: cfg_si -> EXU0 (nanostore word 0..7, static, scan A, scan B)
  // -> EXU1 ... -> EXU7; sent so that the last element's MSB goes first.
  task automatic make_rom();
    logic [N_EXU*EXU_CHAIN-1:0] bits;
    int p;
    p = 0;
    for (int i = 0; i < N_EXU; i++) begin
      for (int w = NS_WORDS - 1; w >= 0; w--) begin bits[p +: IW] = prog[i][w]; p += IW; end
      bits[p +: CFG_W] = scfg[i]; p += CFG_W;
      bits[p +: DW] = scan_a[i]; p += DW;
      bits[p +: DW] = scan_b[i]; p += DW;
    end
    rom[0] = 8'(N_BYTES >> 8);
    rom[1] = 8'(N_BYTES);
    for (int k = 0; k < N_BYTES; k++) rom[2 + k] = bits[(N_BYTES - 1 - k) * 8 +: 8];
  endtask

  // ---------------------------------------------------------------- model
  function automatic void ref_op(input op_e op, input int n, input logic sgn,
                                 input longint a, input longint b, input int sh,
                                 output longint res, output logic fl, output logic sat);
    longint mask, sa, sb, shb, r, lo, hi, ua, ub;
    mask = (longint'(1) << n) - 1;
    sa = (a & mask); if (sa[n-1]) sa = sa - (longint'(1) << n);
    sb = (b & mask); if (sb[n-1]) sb = sb - (longint'(1) << n);
    shb = sb >>> sh;
    ua = a & mask; ub = shb & mask;
    lo = sgn ? -(longint'(1) << (n-1)) : 0;
    hi = sgn ? (longint'(1) << (n-1)) - 1 : mask;
    fl = sgn ? (sa >= shb) : (ua >= ub);
    sat = 1'b0;
    case (op)
      OP_ADD, OP_SUB, OP_CMP: r = (op == OP_ADD) ? ua + ub : ua - ub;
      OP_ADDS, OP_SUBS: begin
        if (op == OP_ADDS) r = sgn ? sa + shb : ua + ub;
        else               r = sgn ? sa - shb : ua - ub;
        if (r > hi) begin r = hi; sat = 1'b1; end
        if (r < lo) begin r = lo; sat = 1'b1; end
      end
      OP_MAX:   r = fl ? ua : ub;
      OP_MIN:   r = fl ? ub : ua;
      OP_PASSA: r = ua;
      default:  r = ub;
    endcase
    res = r & mask;
  endfunction

  logic [DW-1:0] m_ra [N_EXU][N_REG], m_rb [N_EXU][N_REG], m_pipe [N_EXU];
  logic          m_flag [N_EXU], m_irv [N_EXU], m_fv, m_run, m_ext [N_EXT_FLAG];
  instr_t        m_ir [N_EXU];
  logic [GA_W-1:0] m_gaq;
  logic [DW-1:0] m_out [N_OUT];
  logic          m_ov [N_OUT];
  bit            model_on = 0;

  int checks = 0, failures = 0;
  int c_int_local = 0, c_int_ext = 0, c_gbranch = 0, c_sat = 0, c_delay = 0, c_pipe = 0;
  int c_fb = 0, c_in = 0, c_out = 0, c_link = 0, c_xbar = 0;

  task automatic model_reset();
    for (int i = 0; i < N_EXU; i++) begin
      for (int r = 0; r < N_REG - 1; r++) begin m_ra[i][r] = '0; m_rb[i][r] = '0; end
      m_ra[i][SCAN_IDX] = scan_a[i];
      m_rb[i][SCAN_IDX] = scan_b[i];
      m_pipe[i] = '0; m_flag[i] = 0; m_irv[i] = 0; m_ir[i] = '0;
    end
    m_fv = 0; m_run = 0; m_gaq = '0;
    for (int k = 0; k < N_EXT_FLAG; k++) m_ext[k] = 0;
    for (int k = 0; k < N_OUT; k++) begin m_out[k] = '0; m_ov[k] = 0; end
  endtask

  function automatic logic [DW-1:0] rd(input logic [DW-1:0] f [N_REG], input logic [2:0] a);
    return (a < 3'(N_REG)) ? f[a] : '0;
  endfunction

  task automatic rf_write(inout logic [DW-1:0] f [N_REG], input logic del,
                          input logic [2:0] a, input logic [DW-1:0] d);
    if (del && a != 3'(SCAN_IDX)) begin
      for (int r = N_REG - 2; r > 0; r--) f[r] = f[r-1];
      f[0] = d;
      c_delay++;
    end else if (a < 3'(N_REG)) f[a] = d;
  endtask

  task automatic model_step();
    logic [DW-1:0] a [N_EXU], b [N_EXU], res [N_EXU], dout [N_EXU];
    logic          ge [N_EXU], sets [N_EXU];
    logic [DW-1:0] n_out [N_OUT];
    logic          n_ov [N_OUT];
    instr_t        n_ir [N_EXU];
    logic          n_irv [N_EXU];
    longint r;
    logic fl, sat;

    for (int i = 0; i < N_EXU; i++) begin
      a[i] = rd(m_ra[i], m_ir[i].ra);
      b[i] = rd(m_rb[i], m_ir[i].rb);
    end
    for (int i = 0; i < 6; i++) begin
      ref_op(m_ir[i].op, 16, scfg[i].is_signed, longint'(a[i]), longint'(b[i]), int'(m_ir[i].shamt), r, fl, sat);
      res[i] = r[15:0]; ge[i] = fl;
      if (sat && m_irv[i]) c_sat++;
    end
    ref_op(m_ir[7].op, 32, scfg[7].is_signed, longint'({a[7], a[6]}), longint'({b[7], b[6]}),
           int'(m_ir[7].shamt), r, fl, sat);
    res[6] = r[15:0]; res[7] = r[31:16]; ge[6] = fl; ge[7] = fl;
    if (m_irv[7]) c_link++;
    if (sat && m_irv[7]) c_sat++;
    for (int i = 0; i < N_EXU; i++) begin
      dout[i] = scfg[i].opreg ? m_pipe[i] : res[i];
      sets[i] = m_ir[i].op inside {OP_CMP, OP_MAX, OP_MIN};
    end

    // interrupt decisions and decode
    for (int i = 0; i < N_EXU; i++) begin
      logic f1, f2, t1, t2;
      logic [GA_W-1:0] ad;
      f1 = (scfg[i].fsw1 < 8) ? m_flag[scfg[i].fsw1[2:0]] : m_ext[scfg[i].fsw1 - 8];
      f2 = (scfg[i].fsw2 < 8) ? m_flag[scfg[i].fsw2[2:0]] : m_ext[scfg[i].fsw2 - 8];
      t1 = m_fv && m_irv[i] && m_ir[i].ien[0] && f1;
      t2 = m_fv && m_irv[i] && m_ir[i].ien[1] && f2;
      ad = t1 ? scfg[i].iv1 : t2 ? scfg[i].iv2 : m_gaq;
      checks++;
      if (int_taken[i] !== (t1 || t2)) begin
        failures++; $display("FAIL %0t int_taken[%0d]=%b model %b", $time, i, int_taken[i], t1 || t2);
      end
      if (t1 || t2) begin
        if ((t1 && scfg[i].fsw1 >= 8) || (!t1 && scfg[i].fsw2 >= 8)) c_int_ext++;
        else c_int_local++;
      end
      n_ir[i] = prog[i][ad];
      n_irv[i] = m_fv;
    end

    // output channels
    for (int k = 0; k < N_OUT; k++) begin n_out[k] = '0; n_ov[k] = 0; end
    for (int i = N_EXU - 1; i >= 0; i--)
      if (m_irv[i] && m_ir[i].oe) begin n_out[m_ir[i].obus] = dout[i]; n_ov[m_ir[i].obus] = 1; end

    // execute
    for (int i = 0; i < N_EXU; i++) begin
      if (m_irv[i]) begin
        logic [DW-1:0] xa, xb;
        xa = (m_ir[i].xsrc_a < 8) ? dout[m_ir[i].xsrc_a[2:0]] :
             (m_ir[i].xsrc_a < 12) ? in_ch[m_ir[i].xsrc_a - 8] : '0;
        xb = (m_ir[i].xsrc_b < 8) ? dout[m_ir[i].xsrc_b[2:0]] :
             (m_ir[i].xsrc_b < 12) ? in_ch[m_ir[i].xsrc_b - 8] : '0;
        if (m_ir[i].we_a) begin
          rf_write(m_ra[i], scfg[i].del_a, m_ir[i].wa, m_ir[i].fb_a ? dout[i] : xa);
          if (m_ir[i].fb_a) c_fb++;
          else if (m_ir[i].xsrc_a >= 8 && m_ir[i].xsrc_a < 12) c_in++;
          else if (m_ir[i].xsrc_a < 8) c_xbar++;
        end
        if (m_ir[i].we_b) begin
          rf_write(m_rb[i], scfg[i].del_b, m_ir[i].wb, m_ir[i].fb_b ? dout[i] : xb);
          if (m_ir[i].fb_b) c_fb++;
        end
        if (m_ir[i].latch) begin m_pipe[i] = res[i]; if (scfg[i].opreg) c_pipe++; end
        if (sets[i]) m_flag[i] = (i == 6) ? ge[7] : ge[i];
      end
    end

    m_ir = n_ir;
    m_irv = n_irv;
    m_out = n_out;
    m_ov = n_ov;
    m_fv = m_run;
    m_gaq = ga;
    if (start) m_run = 1;
    m_ext = ext_flag_in;
  endtask

  // compare registered outputs, then advance the model, at every clock edge
  always @(posedge clk) if (model_on) begin
    for (int k = 0; k < N_OUT; k++) begin
      checks++;
      if (out_valid[k] !== m_ov[k] || (m_ov[k] && out_ch[k] !== m_out[k])) begin
        failures++;
        $display("FAIL %0t out[%0d]=%h/%b model %h/%b", $time, k, out_ch[k], out_valid[k], m_out[k], m_ov[k]);
      end
      if (m_ov[k]) c_out++;
    end
    for (int i = 0; i < N_EXU; i++) begin
      checks++;
      if (flag_out[i] !== m_flag[i]) begin
        failures++; $display("FAIL %0t flag[%0d]=%b model %b", $time, i, flag_out[i], m_flag[i]);
      end
    end
    model_step();
  end

  // ---------------------------------------------------------------- run
  initial begin
    repeat (N_PROG * (N_CYC + 6000) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int boot_cycles;
    logic [GA_W-1:0] pc;
    for (int k = 0; k < N_IN; k++) in_ch[k] = '0;
    for (int k = 0; k < N_EXT_FLAG; k++) ext_flag_in[k] = 0;
    for (int p = 0; p < N_PROG; p++) begin
      make_program();
      make_rom();
      model_on = 0;
      @(negedge clk) rst_n = 0;
      @(negedge clk) rst_n = 1;
      boot_cycles = 0;
      while (!cfg_done) begin @(posedge clk); boot_cycles++; #1; end
      checks++;
      if (boot_cycles != 4 + 10 * N_BYTES) begin
        failures++; $display("FAIL boot took %0d cycles", boot_cycles);
      end
      @(negedge clk);
      model_reset();
      model_on = 1;
      start = 1;
      pc = 0;
      for (int n = 0; n < N_CYC; n++) begin
        @(negedge clk);
        start = 0;
        // external sequencer: words 0..5 in order; from word 5 branch to 6
        // when EXU 0 flags
        if (pc == 3'd5 && flag_out[0]) begin pc = 3'd6; c_gbranch++; end
        else if (pc >= 3'd5) pc = 3'd0;
        else pc = pc + 1'b1;
        if (n % 97 == 50) pc = 3'd7;
        ga = pc;
        for (int k = 0; k < N_IN; k++) in_ch[k] = DW'($urandom);
        if (n % 5 == 0) for (int k = 0; k < N_EXT_FLAG; k++) ext_flag_in[k] = 1'($urandom);
      end
    end
    $display("mechanisms: local_int=%0d ext_int=%0d global_branch=%0d saturation=%0d delay_line=%0d pipe_reg=%0d feedback=%0d in_ch=%0d xbar=%0d out_words=%0d linked32=%0d",
             c_int_local, c_int_ext, c_gbranch, c_sat, c_delay, c_pipe, c_fb, c_in, c_xbar, c_out, c_link);
    checks += 11;
    if (c_int_local == 0) begin failures++; $display("FAIL no on-chip interrupt"); end
    if (c_int_ext == 0)   begin failures++; $display("FAIL no off-chip interrupt"); end
    if (c_gbranch == 0)   begin failures++; $display("FAIL no global branch"); end
    if (c_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    if (c_delay == 0)     begin failures++; $display("FAIL no delay-line write"); end
    if (c_pipe == 0)      begin failures++; $display("FAIL no pipeline register use"); end
    if (c_fb == 0)        begin failures++; $display("FAIL no feedback write"); end
    if (c_in == 0)        begin failures++; $display("FAIL no input channel read"); end
    if (c_xbar == 0)      begin failures++; $display("FAIL no EXU-to-EXU transfer"); end
    if (c_out == 0)       begin failures++; $display("FAIL no output word"); end
    if (c_link == 0)      begin failures++; $display("FAIL no linked operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
