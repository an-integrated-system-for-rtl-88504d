// tb_paddi_two_chips: two PADDI chips on one scan path and one data link.
//
// Chip A is the boot master and reads one EPROM image that covers both
// chips; chip B is a slave whose configuration chain continues chip A's
// (cfg_so/cfg_en_out -> cfg_si/cfg_en_in). Output channel 0 of A feeds
// input channel 0 of B, and A's flags feed B's external flag inputs.
//
// Programs (the same word in all eight nanostore entries, so the address
// sequence does not matter):
//   A.EXU0  A.R1 <= in_ch0; flag <= A.R1 >= threshold (scan register B.R6)
//   A.EXU1  A.R1 <= in_ch0; drives A.R1 on out_ch0
//   A.EXU2  interrupt 1 from A.EXU0's flag; normal words drive 16'h1111 on
//           out_ch1, the vector word drives 16'h2222
//   B.EXU0  interrupt 1 from external flag 0 (A.EXU0's flag); normal words
//           drive 16'h1111 on out_ch0, the vector word 16'h7777
//   B.EXU1  A.R1 <= in_ch0; drives A.R1 + 1 on out_ch1
// Checks: both chips are configured from the single image (scan
// constants and programs behave as loaded); the value on B's out_ch1 is
// A's input from three clock edges earlier plus one; the on-chip interrupt
// shows at A two
// cycles after A.EXU0's flag rises, the chip-to-chip interrupt at B one
// cycle later still (the extra delay slot between chips). The testbench,
// acting as the sequencer, answers A.EXU0's flag in the next cycle with a
// global branch to word 6; A.EXU3's output for word 6 (16'h6666 instead of
// 16'h3333) must appear three cycles after the flag, i.e. after two delay
// slots.
module tb_paddi_two_chips;
  import paddi_pkg::*;

  localparam int CHIP_BYTES = N_EXU * EXU_CHAIN / 8;
  localparam int N_BYTES    = 2 * CHIP_BYTES;
  localparam int RA_W       = $clog2(N_BYTES + 2);

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
    for (int k = 1; k < N_IN; k++) in_b[k] = '0;
    ext_b[0] = flag_a[0];
    ext_b[1] = 1'b0;
    for (int k = 0; k < N_EXT_FLAG; k++) ext_a[k] = 1'b0;
  end

  always #5 clk = ~clk;

  instr_t   prog  [2][N_EXU];      // one word per EXU, replicated
  instr_t   ivw   [2][N_EXU];      // word at the vector address 7
  instr_t   gbw   [2][N_EXU];      // word 6, the global branch target
  exu_cfg_t scfg  [2][N_EXU];
  logic [DW-1:0] scan_a [2][N_EXU], scan_b [2][N_EXU];

  int checks = 0, failures = 0;
  localparam logic [DW-1:0] THRESH = 16'd1000;

  task automatic program_chips();
    instr_t t;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N_EXU; i++) begin
        prog[c][i] = '0; ivw[c][i] = '0; gbw[c][i] = '0; scfg[c][i] = '0; scan_a[c][i] = '0; scan_b[c][i] = '0;
      end
    // chip A
    t = '0; t.op = OP_CMP; t.ra = 3'd0; t.rb = 3'(SCAN_IDX); t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'(SRC_IN0);
    prog[0][0] = t; scan_b[0][0] = THRESH; scfg[0][0].is_signed = 0;
    t = '0; t.op = OP_PASSA; t.ra = 3'd0; t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'(SRC_IN0); t.oe = 1; t.obus = 2'd0;
    prog[0][1] = t;
    t = '0; t.op = OP_PASSA; t.ra = 3'(SCAN_IDX); t.oe = 1; t.obus = 2'd1; t.ien = 2'b01;
    prog[0][2] = t;
    t.op = OP_PASSB; t.rb = 3'(SCAN_IDX);
    ivw[0][2] = t;
    scan_a[0][2] = 16'h1111; scan_b[0][2] = 16'h2222;
    scfg[0][2].fsw1 = 4'd0; scfg[0][2].iv1 = 3'd7;
    t = '0; t.op = OP_PASSA; t.ra = 3'(SCAN_IDX); t.oe = 1; t.obus = 2'd2;
    prog[0][3] = t;
    t.op = OP_PASSB; t.rb = 3'(SCAN_IDX);
    gbw[0][3] = t;
    scan_a[0][3] = 16'h3333; scan_b[0][3] = 16'h6666;
    // chip B
    t = '0; t.op = OP_PASSA; t.ra = 3'(SCAN_IDX); t.oe = 1; t.obus = 2'd0; t.ien = 2'b01;
    prog[1][0] = t;
    t.op = OP_PASSB; t.rb = 3'(SCAN_IDX);
    ivw[1][0] = t;
    scan_a[1][0] = 16'h1111; scan_b[1][0] = 16'h7777;
    scfg[1][0].fsw1 = 4'(FSRC_EXT0); scfg[1][0].iv1 = 3'd7;
    t = '0; t.op = OP_ADD; t.ra = 3'd0; t.rb = 3'(SCAN_IDX); t.we_a = 1; t.wa = 3'd0; t.xsrc_a = 4'(SRC_IN0);
    t.oe = 1; t.obus = 2'd1;
    prog[1][1] = t; scan_b[1][1] = 16'd1;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N_EXU; i++) begin
        if (ivw[c][i] == '0) ivw[c][i] = prog[c][i];
        if (gbw[c][i] == '0) gbw[c][i] = prog[c][i];
      end
  endtask

  // chain: EPROM -> chip A (EXU0..7) -> chip B (EXU0..7); the stream is
  // {chip B, chip A}, most significant bit first
  task automatic make_rom();
    logic [2*N_EXU*EXU_CHAIN-1:0] bits;
    int p;
    p = 0;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N_EXU; i++) begin
        for (int w = NS_WORDS - 1; w >= 0; w--) begin
          bits[p +: IW] = (w == 7) ? ivw[c][i] : (w == 6) ? gbw[c][i] : prog[c][i]; p += IW;
        end
        bits[p +: CFG_W] = scfg[c][i]; p += CFG_W;
        bits[p +: DW] = scan_a[c][i]; p += DW;
        bits[p +: DW] = scan_b[c][i]; p += DW;
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

  initial begin
    logic [DW-1:0] xin [64];
    int t_flag, t_int_a, t_int_b, t_gb, boot_cycles;
    for (int k = 0; k < N_IN; k++) in_a[k] = '0;
    program_chips();
    make_rom();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    boot_cycles = 0;
    while (!done_a) begin @(negedge clk); boot_cycles++; end
    checks++;
    if (boot_cycles != 4 + 10 * N_BYTES) begin failures++; $display("FAIL boot %0d cycles", boot_cycles); end
    checks++;
    if (done_b !== 1'b0 || en_b_out !== 1'b0) begin failures++; $display("FAIL slave status"); end
    start = 1;
    @(negedge clk) start = 0;
    t_flag = -1; t_int_a = -1; t_int_b = -1; t_gb = -1;
    for (int n = 0; n < 64; n++) begin
      xin[n] = (n < 30) ? DW'($urandom_range(0, 999)) : DW'($urandom_range(1000, 5000));
      // sequencer: words 0..5, one global branch to word 6 on A.EXU0's flag
      ga = (t_flag >= 0 && n == t_flag + 1) ? 3'd6 : 3'($urandom_range(0, 5));
      in_a[0] = xin[n];
      @(posedge clk); #1;
      if (flag_a[0] && t_flag < 0) t_flag = n;
      if (ov_a[1] && out_a[1] == 16'h2222 && t_int_a < 0) t_int_a = n;
      if (ov_b[0] && out_b[0] == 16'h7777 && t_int_b < 0) t_int_b = n;
      if (ov_a[2] && out_a[2] == 16'h6666) begin
        checks++;
        if (t_gb >= 0) begin failures++; $display("FAIL second branch-target word at %0d", n); end
        t_gb = n;
      end
      if (n >= 8) begin
        checks++;
        if (!ov_b[1] || out_b[1] !== xin[n-3] + 16'd1) begin
          failures++; $display("FAIL link data at %0d: %h expected %h", n, out_b[1], xin[n-3] + 16'd1);
        end
        if (t_int_a < 0) begin
          checks++;
          if (!ov_a[1] || out_a[1] !== 16'h1111) begin failures++; $display("FAIL chip A normal word at %0d", n); end
        end
        if (t_int_b < 0) begin
          checks++;
          if (!ov_b[0] || out_b[0] !== 16'h1111) begin failures++; $display("FAIL chip B normal word at %0d", n); end
        end
      end
      @(negedge clk);
    end
    $display("flag at %0d, on-chip vector visible at %0d, chip-to-chip vector at %0d, global branch target at %0d",
             t_flag, t_int_a, t_int_b, t_gb);
    checks += 4;
    if (t_gb - t_flag != 3) begin failures++; $display("FAIL global branch delay %0d", t_gb - t_flag); end
    if (t_flag < 30) begin failures++; $display("FAIL flag timing"); end
    if (t_int_a - t_flag != 2) begin failures++; $display("FAIL on-chip interrupt delay %0d", t_int_a - t_flag); end
    if (t_int_b - t_flag != 3) begin failures++; $display("FAIL chip-to-chip interrupt delay %0d", t_int_b - t_flag); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
