// tb_paddi_fir21: a 21-tap FIR partitioned over two chips.
//
// The filter is split over two chips, the way a design is partitioned when
// it needs more EXUs than one chip holds. The chips share the global
// address and one
// configuration EPROM (chip A master, chip B slave on A's scan output). The
// coefficients are shift-add approximations of a symmetric low-pass
// response, +/-2^-s with s and the signs in the tables below; they are
// chosen for the example. The sample period is eight cycles.
//
// Chip A runs taps 0..10 exactly as the single-chip 11-tap mapping:
//   EXU0, EXU1  B files as delay lines, five taps each, accumulated in A.R1
//               from the zero constant in A.R6 (words 1..5); word 0 shifts
//               the new sample in and passes the oldest one on
//   EXU2        tap 10 (word 1), EXU1's sum (word 5), both added (word 6);
//               word 2 drives x[n-10] on out_ch1 for chip B
//   EXU3        adds the two partial sums (word 7) and drives them on out_ch0
// Chip B runs taps 11..20 on the x[n-10] stream z[n] from in_ch1:
//   EXU0        word 3: shifts z[n] into its B delay line and passes z[n-5]
//               to EXU1; words 4..7 and 0 accumulate taps 11..15 of the next
//               output from z[n]..z[n-4]
//   EXU1        the same for z[n-5]..z[n-9], taps 16..20
//   EXU2        word 0: takes both sums and passes the previous total on;
//               word 1: adds them into A.R2
//   EXU3        word 0: takes chip A's partial sum from in_ch0 and EXU2's
//               total; word 1: adds them and drives y[n] on out_ch0
// y[n] therefore appears in word 1 of the following sample, 9 clock edges
// after x[n] is written into the register file; the one word issued before
// the first sample is through must be zero. The test checks every output
// against a reference computed here, and the period and latency.
module tb_paddi_fir21;
  import paddi_pkg::*;

  localparam int CHIP_BYTES = N_EXU * EXU_CHAIN / 8;
  localparam int N_BYTES    = 2 * CHIP_BYTES;
  localparam int RA_W       = $clog2(N_BYTES + 2);
  localparam int N_SAMP     = 200;
  localparam int PERIOD     = 8;
  localparam int LATENCY    = 9;
  localparam int N_TAPS     = 21;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] rom_addr_a, rom_addr_b;
  logic [7:0]  rom_data;
  logic en_ab, sd_ab, en_b_out, so_b, done_a, done_b;
  logic [GA_W-1:0] ga = 0;
  logic [DW-1:0] in_a [N_IN], out_a [N_OUT], in_b [N_IN], out_b [N_OUT];
  logic ov_a [N_OUT], ov_b [N_OUT], flag_a [N_EXU], flag_b [N_EXU];
  logic ext_a [N_EXT_FLAG], ext_b [N_EXT_FLAG], it_a [N_EXU], it_b [N_EXU];
  logic [7:0] rom [N_BYTES + 2];

  paddi_chip chip_a (
    .clk, .rst_n, .master(1'b1), .rom_addr(rom_addr_a), .rom_data,
    .cfg_en_in(1'b0), .cfg_si(1'b0), .cfg_en_out(en_ab), .cfg_so(sd_ab), .cfg_done(done_a),
    .start, .ga, .in_ch(in_a), .out_ch(out_a), .out_valid(ov_a), .flag_out(flag_a),
    .ext_flag_in(ext_a), .int_taken(it_a));

  paddi_chip chip_b (
    .clk, .rst_n, .master(1'b0), .rom_addr(rom_addr_b), .rom_data(8'h00),
    .cfg_en_in(en_ab), .cfg_si(sd_ab), .cfg_en_out(en_b_out), .cfg_so(so_b), .cfg_done(done_b),
    .start, .ga, .in_ch(in_b), .out_ch(out_b), .out_valid(ov_b), .flag_out(flag_b),
    .ext_flag_in(ext_b), .int_taken(it_b));

  assign rom_data = (rom_addr_a < 16'(N_BYTES + 2)) ? rom[RA_W'(rom_addr_a)] : 8'h00;
  always_comb begin
    in_b[0] = out_a[0];
    in_b[1] = out_a[1];
    for (int k = 2; k < N_IN; k++) in_b[k] = '0;
    for (int k = 0; k < N_EXT_FLAG; k++) begin ext_a[k] = 1'b0; ext_b[k] = 1'b0; end
    for (int k = 1; k < N_IN; k++) in_a[k] = '0;
  end

  always #5 clk = ~clk;

  int sh  [N_TAPS] = '{7, 6, 5, 5, 4, 3, 3, 2, 1, 1, 0, 1, 1, 2, 3, 3, 4, 5, 5, 6, 7};
  bit neg [N_TAPS] = '{0, 0, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 0, 0};

  instr_t   prog  [2][N_EXU][NS_WORDS];
  exu_cfg_t scfg  [2][N_EXU];

  int checks = 0, failures = 0;

  function automatic instr_t op_i(op_e op, int ra, int rb, int s);
    instr_t t;
    t = '0; t.op = op; t.ra = 3'(ra); t.rb = 3'(rb); t.shamt = 3'(s);
    return t;
  endfunction

  // accumulate one tap into A.R1, starting from the zero in A.R6
  function automatic instr_t tap_i(int tap, bit first, int rb);
    instr_t t;
    t = op_i(neg[tap] ? OP_SUB : OP_ADD, first ? SCAN_IDX : 0, rb, sh[tap]);
    t.we_a = 1; t.wa = 3'd0; t.fb_a = 1;
    return t;
  endfunction

  task automatic program_chips();
    instr_t t;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N_EXU; i++) begin
        scfg[c][i] = '0;
        scfg[c][i].is_signed = 1;
        for (int w = 0; w < NS_WORDS; w++) prog[c][i][w] = '0;
      end
    // chip A: taps 0..10
    scfg[0][0].del_b = 1; scfg[0][1].del_b = 1;
    for (int e = 0; e < 2; e++) begin
      t = op_i(OP_PASSB, 0, 4, 0); t.we_b = 1; t.xsrc_b = (e == 0) ? 4'(SRC_IN0) : 4'd0;
      prog[0][e][0] = t;
      for (int k = 0; k < 5; k++) prog[0][e][1 + k] = tap_i(e * 5 + k, k == 0, k);
    end
    prog[0][0][6] = op_i(OP_PASSA, 0, 0, 0);
    t = '0; t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd1;               // B.R1 <= x[n-10]
    prog[0][2][0] = t;
    prog[0][2][1] = tap_i(10, 1, 0);
    t = op_i(OP_PASSB, 0, 0, 0); t.oe = 1; t.obus = 2'd1;           // x[n-10] -> chip B
    prog[0][2][2] = t;
    t = '0; t.we_b = 1; t.wb = 3'd1; t.xsrc_b = 4'd1;               // B.R2 <= EXU1 sum
    prog[0][2][5] = t;
    prog[0][2][6] = op_i(OP_ADD, 0, 1, 0);
    t = '0; t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'd0;
    t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd2;
    prog[0][3][6] = t;
    t = op_i(OP_ADD, 0, 0, 0); t.oe = 1; t.obus = 2'd0;             // partial sum -> chip B
    prog[0][3][7] = t;
    // chip B: taps 11..20
    scfg[1][0].del_b = 1; scfg[1][1].del_b = 1;
    for (int e = 0; e < 2; e++) begin
      t = op_i(OP_PASSB, 0, 4, 0); t.we_b = 1; t.xsrc_b = (e == 0) ? 4'(SRC_IN0 + 1) : 4'd0;
      prog[1][e][3] = t;
      for (int k = 0; k < 5; k++) prog[1][e][(4 + k) % PERIOD] = tap_i(11 + e * 5 + k, k == 0, k);
    end
    t = op_i(OP_PASSA, 1, 0, 0);                                    // previous total on
    t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'd0;
    t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd1;
    prog[1][2][0] = t;
    t = op_i(OP_ADD, 0, 0, 0); t.we_a = 1; t.wa = 3'd1; t.fb_a = 1;
    prog[1][2][1] = t;
    t = '0; t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'(SRC_IN0);
    t.we_b = 1; t.wb = 3'd0; t.xsrc_b = 4'd2;
    prog[1][3][0] = t;
    t = op_i(OP_ADD, 0, 0, 0); t.oe = 1; t.obus = 2'd0;
    prog[1][3][1] = t;
  endtask

  // chain EPROM -> chip A -> chip B; stream {chip B, chip A}, MSB first;
  // scan registers are all zero
  task automatic make_rom();
    logic [2*N_EXU*EXU_CHAIN-1:0] bits;
    int p;
    p = 0;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N_EXU; i++) begin
        for (int w = NS_WORDS - 1; w >= 0; w--) begin bits[p +: IW] = prog[c][i][w]; p += IW; end
        bits[p +: CFG_W] = scfg[c][i]; p += CFG_W;
        bits[p +: 2*DW] = '0; p += 2 * DW;
      end
    rom[0] = 8'(N_BYTES >> 8);
    rom[1] = 8'(N_BYTES);
    for (int k = 0; k < N_BYTES; k++) rom[2 + k] = bits[(N_BYTES - 1 - k) * 8 +: 8];
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [DW-1:0] xs [N_SAMP];
  logic [DW-1:0] yref [N_SAMP];

  initial begin
    int n_in, n_out, cyc, last_out, skip, t_in [N_SAMP];
    logic [GA_W-1:0] hist [2];
    bit hv [2];
    in_a[0] = '0;
    for (int n = 0; n < N_SAMP; n++)
      xs[n] = (n < 25) ? DW'(n == 0 ? 1024 : 0) : DW'($urandom_range(0, 4000)) - 16'sd2000;
    for (int n = 0; n < N_SAMP; n++) begin
      logic signed [DW-1:0] acc, xv, term;
      acc = 0;
      for (int k = 0; k < N_TAPS; k++) begin
        xv = (n - k >= 0) ? xs[n-k] : 16'sd0;
        term = xv >>> sh[k];
        acc = neg[k] ? acc - term : acc + term;
      end
      yref[n] = acc;
    end
    program_chips();
    make_rom();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    while (!done_a) @(negedge clk);
    checks++;
    if (rom_addr_a != 16'(N_BYTES + 2)) begin failures++; $display("FAIL master read %0d bytes", rom_addr_a); end
    start = 1;
    @(negedge clk) start = 0;

    // sequencer: words 0..7 repeatedly; x[n] on A.in_ch0 when word 0 is in E
    n_in = 0; n_out = 0; cyc = 0; last_out = -1; skip = 1;
    hv[0] = 0; hv[1] = 0; hist[0] = 0; hist[1] = 0;
    while (n_out < N_SAMP && cyc < N_SAMP * PERIOD + 50) begin
      ga = 3'(cyc % PERIOD);
      if (hv[1] && hist[1] == 0 && n_in < N_SAMP) begin
        in_a[0] = xs[n_in]; t_in[n_in] = cyc; n_in++;
      end
      @(posedge clk); #1;
      if (ov_b[0] && skip > 0) begin
        checks++;
        if (out_b[0] !== '0) begin failures++; $display("FAIL leading output %0d", $signed(out_b[0])); end
        skip--;
        last_out = cyc;
      end else if (ov_b[0]) begin
        checks++;
        if (out_b[0] !== yref[n_out]) begin
          failures++;
          $display("FAIL y[%0d]=%0d expected %0d", n_out, $signed(out_b[0]), $signed(yref[n_out]));
        end
        checks++;
        if (cyc - t_in[n_out] != LATENCY) begin failures++; $display("FAIL latency %0d", cyc - t_in[n_out]); end
        if (last_out >= 0) begin
          checks++;
          if (cyc - last_out != PERIOD) begin failures++; $display("FAIL period %0d", cyc - last_out); end
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
    if (n_out != N_SAMP) begin failures++; $display("FAIL produced %0d outputs", n_out); end
    $display("fir21 on two chips: %0d samples, one every %0d cycles, latency %0d clock edges",
             n_out, PERIOD, LATENCY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
