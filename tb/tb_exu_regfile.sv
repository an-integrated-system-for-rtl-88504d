// tb_exu_regfile: self-checking test of the six-register file.
// Loads the scan register through the chain and reads it back, runs random
// writes and reads in normal mode against a reference array, checks that
// a read in the cycle of a write returns the old value, then checks the
// delay-line mode: R1..R5 hold the last five values written and R6 keeps
// its constant.
module tb_exu_regfile;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, delay = 0, we = 0, cfg_en = 0, cfg_si = 0, cfg_so;
  logic [2:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [6];
  int checks = 0, failures = 0;

  exu_regfile #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_read(input logic [2:0] a, input logic [W-1:0] v, input string what);
    raddr = a;
    #1;
    checks++;
    if (rdata !== v) begin failures++; $display("FAIL %s R%0d=%h expected %h", what, a+1, rdata, v); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] konst, got;
    logic [2:0] ra;
    konst = 16'hBEEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // configure the scan register
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk); cfg_en = 1; cfg_si = konst[i];
    end
    @(negedge clk); cfg_en = 0;
    for (int i = 0; i < 5; i++) model[i] = '0;
    model[5] = konst;
    for (int a = 0; a < 6; a++) expect_read(3'(a), model[a], "after config");
    expect_read(3'd6, '0, "unused address");
    // random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom_range(0, 5)); wdata = W'($urandom);
      ra = 3'($urandom_range(0, 5));
      expect_read(ra, model[ra], "random");
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 6; a++) expect_read(3'(a), model[a], "after random");
    // delay line
    delay = 1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      we = 1; waddr = 3'd0; wdata = W'(16'h100 + n);
      @(posedge clk);
      for (int i = 4; i > 0; i--) model[i] = model[i-1];
      model[0] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 5; a++) expect_read(3'(a), W'(16'h100 + 19 - a), "delay line");
    expect_read(3'd5, model[5], "scan kept in delay mode");
    // scan register still shifts out its contents
    got = '0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); got = {got[W-2:0], cfg_so}; cfg_en = 1; cfg_si = 0;
    end
    @(negedge clk); cfg_en = 0;
    checks++;
    if (got !== model[5]) begin failures++; $display("FAIL scan out %h expected %h", got, model[5]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
