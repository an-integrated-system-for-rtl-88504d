// tb_paddi_filters: fixed-coefficient filters mapped by hand onto the chip.
//
// Two programs of the kind the architecture targets, each booted from the
// EPROM model and run with the chip at full size:
//
//  * Biquad (direct form II, shift-add coefficients) on two EXUs with a
//    five-cycle sample period:
//        w[n] = x[n] + w[n-1]/2 - w[n-2]/4
//        y[n] = w[n] + w[n-2]/2 + w[n-1]/8
//    EXU0 computes w[n] (words 1, 2) and keeps w[n-1], w[n-2] in its B file
//    used as a delay line; EXU1 keeps its own copy the same way and forms
//    y[n] (words 3, 4), which it drives on output channel 0.
//
//  * 6th-order IIR as a cascade of three such biquad sections on six EXUs
//    with an eight-cycle sample period. Section s runs the same five-word
//    schedule on EXUs 2s and 2s+1, shifted by 4s words (modulo 8), so that
//    its first EXU takes the previous section's y in the cycle it is
//    computed. The coefficients of section s are x + w1>>a1 - w2>>a2 and
//    w + w2>>b2 + w1>>b1 with the shifts in the bq_* tables. The output
//    comes 12 cycles after the input; the one output word issued before the
//    first sample has passed all sections must be zero.
//
//  * 7th-order IIR: the same three sections followed by a first-order
//    high-pass section (w = x + w1>>1, y = w - w1) on EXUs 6 and 7, which
//    reads the zero scan register where a biquad reads w2. Output after 16
//    cycles; two leading zero words.
//
//  * 11-tap FIR y[n] = sum_k sgn_k * (x[n-k] >> s_k) on four EXUs with an
//    eight-cycle sample period. EXU0 and EXU1 hold taps 0..4 and 5..9 in
//    their B files as delay lines (EXU0 passes x[n-5] on to EXU1, EXU1
//    passes x[n-10] to EXU2) and accumulate five shift-add terms each in
//    A-file R1, starting from the zero constant in scan register R6. EXU2
//    holds tap 10 and adds EXU1's sum; EXU3 adds the two partial sums and
//    drives output channel 0.
//
// x[n] is presented on input channel 0 in the cycle in which word 0 is
// executed. The test compares each output with a reference computed here
// from the formulas above (16-bit wrap-around, arithmetic shifts), and
// checks the sample period (one output every 5 or 8 cycles) and the
// latency: the output register holds y[n] 4 (biquad), 12 or 16 (IIRs) or
// 7 (FIR) clock edges after the edge that samples x[n] into the register
// file.
module tb_paddi_filters;
  import paddi_pkg::*;

  localparam int N_BYTES = N_EXU * EXU_CHAIN / 8;
  localparam int RA_W    = $clog2(N_BYTES + 2);
  localparam int N_SAMP  = 200;

  logic clk = 0, rst_n = 0, master = 1, cfg_en_in = 0, cfg_si = 0;
  logic [15:0] rom_addr;
  logic [7:0]  rom_data;
  logic cfg_en_out, cfg_so, cfg_done, start = 0;
  logic [GA_W-1:0] ga = 0;
  logic [DW-1:0] in_ch [N_IN], out_ch [N_OUT];
  logic out_valid [N_OUT], flag_out [N_EXU], ext_flag_in [N_EXT_FLAG], int_taken [N_EXU];

  paddi_chip dut (.*);

  always #5 clk = ~clk;

  instr_t   prog  [N_EXU][NS_WORDS];
  exu_cfg_t scfg  [N_EXU];
  logic [DW-1:0] scan_a [N_EXU], scan_b [N_EXU];
  logic [7:0] rom [N_BYTES + 2];

  assign rom_data = (rom_addr < 16'(N_BYTES + 2)) ? rom[RA_W'(rom_addr)] : 8'h00;

  int checks = 0, failures = 0;

  task automatic clear_program();
    for (int i = 0; i < N_EXU; i++) begin
      scfg[i] = '0; scan_a[i] = '0; scan_b[i] = '0;
      for (int w = 0; w < NS_WORDS; w++) prog[i][w] = '0;
    end
  endtask

  // an instruction that computes op(A[ra], B[rb] >> sh) and writes nothing
  function automatic instr_t op_i(op_e op, int ra, int rb, int sh);
    instr_t t;
    t = '0; t.op = op; t.ra = 3'(ra); t.rb = 3'(rb); t.shamt = 3'(sh);
    return t;
  endfunction

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

  // ---------------------------------------------------------------- biquad
  // Section s (on EXUs 2s, 2s+1) runs word offsets 0..4 of its own schedule,
  // shifted by 4s words modulo the period, so that its even EXU picks up the
  // previous section's y in the very cycle that y is computed.
  // A first-order section (bq_ord 1) reads the zero scan register B.R6 in
  // place of w2, so its w2 terms vanish. bq_ysub makes the w1 term of y a
  // subtraction.
  int bq_a1   [4] = '{1, 1, 1, 1};
  int bq_a2   [4] = '{2, 2, 2, 0};
  int bq_b2   [4] = '{1, 2, 3, 0};
  int bq_b1   [4] = '{3, 1, 2, 0};
  int bq_ord  [4] = '{2, 2, 2, 1};
  bit bq_ysub [4] = '{0, 0, 0, 1};

  task automatic biquad_program(input int nsec, input int period);
    instr_t t;
    int e0, e1, off;
    clear_program();
    for (int s = 0; s < nsec; s++) begin
      e0 = 2 * s; e1 = 2 * s + 1; off = 4 * s;
      for (int i = e0; i <= e1; i++) begin scfg[i].is_signed = 1; scfg[i].del_b = 1; end
      // even EXU: w = x + w1>>a1 - w2>>a2
      t = '0; t.we_a = 1; t.wa = 3'd0;                                // A.R1 <= x
      t.xsrc_a = (s == 0) ? 4'(SRC_IN0) : 4'(e0 - 1);
      prog[e0][off % period] = t;
      t = op_i(OP_ADD, 0, 0, bq_a1[s]); t.we_a = 1; t.wa = 3'd1; t.fb_a = 1; // A.R2 <= x + w1>>a1
      prog[e0][(off + 1) % period] = t;
      t = op_i(OP_SUB, 1, (bq_ord[s] == 2) ? 1 : SCAN_IDX, bq_a2[s]);  // w <= t1 - w2>>a2,
      t.we_b = 1; t.fb_b = 1;                                         // into the B line
      prog[e0][(off + 2) % period] = t;
      // odd EXU: y = w + w2>>b2 + w1>>b1
      t = '0; t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'(e0);             // A.R1 <= w
      t.we_b = 1; t.xsrc_b = 4'(e0);                                  // B line <= w
      prog[e1][(off + 2) % period] = t;
      t = op_i(OP_ADD, 0, (bq_ord[s] == 2) ? 2 : SCAN_IDX, bq_b2[s]);  // A.R2 <= w + w2>>b2
      t.we_a = 1; t.wa = 3'd1; t.fb_a = 1;
      prog[e1][(off + 3) % period] = t;
      t = op_i(bq_ysub[s] ? OP_SUB : OP_ADD, 1, 1, bq_b1[s]);         // y = t2 +/- w1>>b1
      if (s == nsec - 1) begin t.oe = 1; t.obus = 2'd0; end
      prog[e1][(off + 4) % period] = t;
    end
  endtask

  // ---------------------------------------------------------------- FIR
  int fir_sh  [11] = '{0, 1, 2, 3, 1, 2, 3, 4, 2, 1, 0};
  bit fir_neg [11] = '{0, 0, 1, 0, 1, 0, 0, 1, 0, 1, 0};

  task automatic fir_program();
    instr_t t;
    clear_program();
    for (int i = 0; i < 4; i++) scfg[i].is_signed = 1;
    scfg[0].del_b = 1; scfg[1].del_b = 1;   // R6 of every A file stays 0
    for (int e = 0; e < 2; e++) begin
      // word 0: shift the new sample in, pass the oldest one on
      t = op_i(OP_PASSB, 0, 4, 0); t.we_b = 1; t.xsrc_b = (e == 0) ? 4'(SRC_IN0) : 4'd0;
      prog[e][0] = t;
      // words 1..5: A.R1 <= (k == 0 ? 0 : A.R1) +/- B.R(k+1) >> s
      for (int k = 0; k < 5; k++) begin
        int tap;
        tap = e * 5 + k;
        t = op_i(fir_neg[tap] ? OP_SUB : OP_ADD, (k == 0) ? SCAN_IDX : 0, k, fir_sh[tap]);
        t.we_a = 1; t.wa = 3'd0; t.fb_a = 1;
        prog[e][1 + k] = t;
      end
    end
    prog[0][6] = op_i(OP_PASSA, 0, 0, 0);                           // EXU0 sum -> EXU3
    // EXU2: tap 10 and EXU1's sum
    t = '0; t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd1;               // B.R1 <= x[n-10]
    prog[2][0] = t;
    t = op_i(fir_neg[10] ? OP_SUB : OP_ADD, SCAN_IDX, 0, fir_sh[10]);
    t.we_a = 1; t.wa = 3'd0; t.fb_a = 1;
    prog[2][1] = t;
    t = '0; t.we_b = 1; t.wb = 3'd1; t.xsrc_b = 4'd1;               // B.R2 <= EXU1 sum
    prog[2][5] = t;
    prog[2][6] = op_i(OP_ADD, 0, 1, 0);                             // acc2 + acc1 -> EXU3
    // EXU3
    t = '0; t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'd0;
    t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd2;
    prog[3][6] = t;
    t = op_i(OP_ADD, 0, 0, 0); t.oe = 1; t.obus = 2'd0;
    prog[3][7] = t;
  endtask

  // ---------------------------------------------------------------- run
  logic signed [DW-1:0] xs [N_SAMP];
  logic [DW-1:0] yref [N_SAMP];

  task automatic boot();
    make_rom();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    while (!cfg_done) @(negedge clk);
    start = 1;
    @(negedge clk) start = 0;
  endtask

  // Issue words 0..period-1 repeatedly; present x[n] when word 0 is in E;
  // collect outputs and check value, spacing and latency.
  // The first `skip` outputs come from the still-empty pipeline of sections
  // and must be zero.
  task automatic run_filter(input int period, input int latency, input int skip, input string name);
    int n_in, n_out, cyc, last_out, t_in [N_SAMP];
    logic [GA_W-1:0] hist [2];
    bit  hv [2];
    n_in = 0; n_out = 0; cyc = 0; last_out = -1;
    hv[0] = 0; hv[1] = 0; hist[0] = 0; hist[1] = 0;
    while (n_out < N_SAMP && cyc < N_SAMP * period + 50) begin
      // negedge: inputs for the coming cycle
      ga = 3'(cyc % period);
      if (hv[1] && hist[1] == 0 && n_in < N_SAMP) begin
        in_ch[0] = xs[n_in]; t_in[n_in] = cyc; n_in++;
      end
      @(posedge clk); #1;
      if (out_valid[0] && skip > 0) begin
        checks++;
        if (out_ch[0] !== '0) begin failures++; $display("FAIL %s leading output %0d", name, $signed(out_ch[0])); end
        skip--;
        last_out = cyc;
      end else if (out_valid[0]) begin
        checks++;
        if (out_ch[0] !== yref[n_out]) begin
          failures++;
          $display("FAIL %s y[%0d]=%0d expected %0d", name, n_out, $signed(out_ch[0]), $signed(yref[n_out]));
        end
        checks++;
        if (cyc - t_in[n_out] != latency) begin
          failures++; $display("FAIL %s latency %0d", name, cyc - t_in[n_out]);
        end
        if (last_out >= 0) begin
          checks++;
          if (cyc - last_out != period) begin failures++; $display("FAIL %s period %0d", name, cyc - last_out); end
        end
        last_out = cyc;
        n_out++;
      end
      hist[1] = hist[0]; hv[1] = hv[0];
      hist[0] = ga;      hv[0] = 1;
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (n_out != N_SAMP) begin failures++; $display("FAIL %s produced %0d outputs", name, n_out); end
    $display("%s: %0d samples, one every %0d cycles, latency %0d clock edges", name, n_out, period, latency);
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [DW-1:0] w1, w2, w0, x, acc;
    for (int k = 0; k < N_IN; k++) in_ch[k] = '0;
    for (int k = 0; k < N_EXT_FLAG; k++) ext_flag_in[k] = 0;
    for (int n = 0; n < N_SAMP; n++)
      xs[n] = (n < 3) ? DW'(n == 0 ? 1024 : 0) : DW'($urandom_range(0, 8000)) - 16'sd4000;

    // biquad, 6th-order (three sections) and 7th-order (three sections and
    // a first-order high-pass section) cascade references
    for (int cfg = 0; cfg < 3; cfg++) begin
      int nsec;
      logic signed [DW-1:0] sw1 [4], sw2 [4];
      nsec = (cfg == 0) ? 1 : (cfg == 1) ? 3 : 4;
      for (int s = 0; s < 4; s++) begin sw1[s] = 0; sw2[s] = 0; end
      for (int n = 0; n < N_SAMP; n++) begin
        x = xs[n];
        for (int s = 0; s < nsec; s++) begin
          w1 = sw1[s]; w2 = (bq_ord[s] == 2) ? sw2[s] : 16'sd0;
          w0 = x + (w1 >>> bq_a1[s]) - (w2 >>> bq_a2[s]);
          x  = w0 + (w2 >>> bq_b2[s]);
          x  = bq_ysub[s] ? x - (w1 >>> bq_b1[s]) : x + (w1 >>> bq_b1[s]);
          sw2[s] = w1; sw1[s] = w0;
        end
        yref[n] = x;
      end
      case (cfg)
        0: begin
          biquad_program(1, 5);
          @(negedge clk);
          boot();
          run_filter(5, 4, 0, "biquad");
        end
        1: begin
          biquad_program(3, 8);
          boot();
          run_filter(8, 12, 1, "iir6");
        end
        default: begin
          biquad_program(4, 8);
          boot();
          run_filter(8, 16, 2, "iir7");
        end
      endcase
    end

    // FIR reference
    for (int n = 0; n < N_SAMP; n++) begin
      acc = 0;
      for (int k = 0; k < 11; k++) begin
        logic signed [DW-1:0] xv, term;
        xv = (n - k >= 0) ? xs[n-k] : 16'sd0;
        term = xv >>> fir_sh[k];
        acc = fir_neg[k] ? acc - term : acc + term;
      end
      yref[n] = acc;
    end
    fir_program();
    boot();
    run_filter(8, 7, 0, "fir11");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
