// tb_config_unit: self-checking test of the boot FSM.
// A byte array models the EPROM (read data follows the address
// combinationally). The test boots a random 37-byte image in master mode,
// captures the serial stream into a shift register and compares it with the
// image, checks the cycle count (2 header bytes x 2 cycles + 37 x 10 cycles),
// then checks slave mode passes the upstream scan path through.
module tb_config_unit;
  logic clk = 0, rst_n = 0, master = 1;
  logic [15:0] rom_addr;
  logic [7:0] rom_data;
  logic up_en = 0, up_sd = 0, cfg_en, cfg_sd, down_en, busy, done;
  logic [7:0] rom [64];
  localparam int NBYTES = 37;
  logic [NBYTES*8-1:0] got, image;
  int checks = 0, failures = 0, cycles, shifts;

  config_unit #(.AW(16)) dut (.*);

  assign rom_data = rom[rom_addr[5:0]];
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cfg_en) begin
    got <= {got[NBYTES*8-2:0], cfg_sd};
    shifts <= shifts + 1;
  end

  initial begin
    rom[0] = 8'(NBYTES >> 8); rom[1] = 8'(NBYTES);
    for (int i = 0; i < NBYTES; i++) begin
      rom[2+i] = 8'($urandom);
      image[(NBYTES-1-i)*8 +: 8] = rom[2+i];
    end
    for (int i = 2 + NBYTES; i < 64; i++) rom[i] = 8'hA5;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cycles = 0; shifts = 0;
    while (!done) begin
      @(posedge clk); cycles++; #1;
      checks++;
      if (down_en !== cfg_en) failures++;
    end
    @(negedge clk);
    checks++;
    if (got !== image) begin failures++; $display("FAIL stream mismatch"); end
    checks++;
    if (shifts != NBYTES * 8) begin failures++; $display("FAIL shifts %0d", shifts); end
    checks++;
    if (cycles != 4 + NBYTES * 10) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++;
    if (busy !== 1'b0) failures++;
    repeat (5) @(posedge clk);
    checks++;
    if (cfg_en !== 1'b0) begin failures++; $display("FAIL shifting after done"); end
    // slave mode
    master = 0; rst_n = 0;
    @(negedge clk) rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      @(negedge clk); up_en = 1'($urandom); up_sd = 1'($urandom);
      #1;
      checks += 3;
      if (cfg_en !== up_en || cfg_sd !== up_sd || busy !== up_en) begin
        failures++; $display("FAIL slave pass-through");
      end
      if (done) failures++;
      if (down_en !== up_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
