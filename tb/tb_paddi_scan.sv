// tb_paddi_scan: loading a chip through its scan path and reading it back.
//
// The chip runs in slave mode: the testbench drives cfg_en_in / cfg_si
// directly with a 3800-bit configuration (random scan constants, a
// program in which EXU0 copies input channel 0 into its scan register A.R6
// every cycle, and EXU1 drives that register on output channel 0). After
// `start` the test checks that the loaded constant appears on the output,
// then holds a new value on the input so that it overwrites the scan
// register, and finally shifts the whole chain out through cfg_so. The
// stream read back must equal the stream loaded, except for EXU0's scan
// register A, which must now hold the value written by the program: the
// scan registers serve both as constants and for scan testing.
module tb_paddi_scan;
  import paddi_pkg::*;

  localparam int NBITS = N_EXU * EXU_CHAIN;

  logic clk = 0, rst_n = 0, cfg_en_in = 0, cfg_si = 0, start = 0;
  logic [15:0] rom_addr;
  logic cfg_en_out, cfg_so, cfg_done;
  logic [GA_W-1:0] ga = 0;
  logic [DW-1:0] in_ch [N_IN], out_ch [N_OUT];
  logic out_valid [N_OUT], flag_out [N_EXU], ext_flag_in [N_EXT_FLAG], int_taken [N_EXU];

  paddi_chip dut (.clk, .rst_n, .master(1'b0), .rom_addr, .rom_data(8'h00), .cfg_en_in, .cfg_si,
                  .cfg_en_out, .cfg_so, .cfg_done, .start, .ga, .in_ch, .out_ch, .out_valid,
                  .flag_out, .ext_flag_in, .int_taken);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NBITS-1:0] bits, expect_bits, got;
    logic [DW-1:0] scan_a [N_EXU], scan_b [N_EXU], v;
    instr_t t0, t1;
    int p, pos_scan_a0;
    for (int k = 0; k < N_IN; k++) in_ch[k] = '0;
    for (int k = 0; k < N_EXT_FLAG; k++) ext_flag_in[k] = 1'b0;
    t0 = '0; t0.we_a = 1; t0.wa = 3'(SCAN_IDX); t0.xsrc_a = 4'(SRC_IN0);
    t1 = '0; t1.op = OP_PASSA; t1.ra = 3'(SCAN_IDX); t1.oe = 1; t1.obus = 2'd0;
    p = 0;
    for (int i = 0; i < N_EXU; i++) begin
      scan_a[i] = DW'($urandom); scan_b[i] = DW'($urandom);
      for (int w = 0; w < NS_WORDS; w++) begin
        bits[p +: IW] = (i == 0) ? t0 : (i == 1) ? t1 : '0; p += IW;
      end
      bits[p +: CFG_W] = '0; p += CFG_W;
      if (i == 0) pos_scan_a0 = p;
      bits[p +: DW] = scan_a[i]; p += DW;
      bits[p +: DW] = scan_b[i]; p += DW;
    end
    // EXU1 reads its own A.R6; give EXU0 and EXU1 the same constant
    scan_a[1] = scan_a[0];
    bits[EXU_CHAIN + NS_BITS + CFG_W +: DW] = scan_a[0];

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = NBITS - 1; k >= 0; k--) begin
      cfg_en_in = 1; cfg_si = bits[k];
      @(negedge clk);
    end
    cfg_en_in = 0;
    checks++;
    if (cfg_done !== 1'b0) begin failures++; $display("FAIL slave reports done"); end
    // run: first the constant must come out, then the overwritten value
    in_ch[0] = scan_a[0];
    start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!out_valid[0] || out_ch[0] !== scan_a[0]) begin
      failures++; $display("FAIL constant %h expected %h", out_ch[0], scan_a[0]);
    end
    v = ~scan_a[0];
    in_ch[0] = v;
    repeat (10) @(negedge clk);
    // EXU1 still shows its own constant, EXU0's register now holds v
    checks++;
    if (out_ch[0] !== scan_a[0]) begin failures++; $display("FAIL EXU1 constant changed"); end
    // scan out
    expect_bits = bits;
    expect_bits[pos_scan_a0 +: DW] = v;
    for (int k = NBITS - 1; k >= 0; k--) begin
      got[k] = cfg_so;
      cfg_en_in = 1; cfg_si = 1'b0;
      @(negedge clk);
    end
    cfg_en_in = 0;
    checks++;
    if (got !== expect_bits) begin
      failures++;
      for (int k = 0; k < NBITS; k++) if (got[k] !== expect_bits[k]) begin
        $display("FAIL scan-out bit %0d: %b expected %b", k, got[k], expect_bits[k]);
        break;
      end
    end
    checks++;
    if (got[pos_scan_a0 +: DW] !== v) begin failures++; $display("FAIL scan register not overwritten"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
