// tb_nanostore: self-checking test of the serially loaded nanostore.
// Shifts eight random 53-bit words in (word 0 first, MSB first), reads all
// eight addresses back, then shifts a second program in and checks the
// first one comes out of cfg_so in the same order.
module tb_nanostore;
  localparam int unsigned WORDS = 8, W = 53;
  logic clk = 0, cfg_en = 0, cfg_si = 0, cfg_so;
  logic [2:0] raddr = 0;
  logic [W-1:0] rdata;
  logic [W-1:0] prog0 [WORDS], prog1 [WORDS];
  int checks = 0, failures = 0;

  nanostore #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      prog0[w] = {21'($urandom), 32'($urandom)};
      prog1[w] = {21'($urandom), 32'($urandom)};
    end
    for (int w = 0; w < WORDS; w++)
      for (int i = W - 1; i >= 0; i--) begin
        @(negedge clk); cfg_en = 1; cfg_si = prog0[w][i];
      end
    @(negedge clk); cfg_en = 0;
    for (int w = 0; w < WORDS; w++) begin
      raddr = 3'(w); #1;
      checks++;
      if (rdata !== prog0[w]) begin failures++; $display("FAIL word %0d = %h expected %h", w, rdata, prog0[w]); end
    end
    for (int w = 0; w < WORDS; w++)
      for (int i = W - 1; i >= 0; i--) begin
        @(negedge clk);
        checks++;
        if (cfg_so !== prog0[w][i]) failures++;
        cfg_en = 1; cfg_si = prog1[w][i];
      end
    @(negedge clk); cfg_en = 0;
    for (int w = 0; w < WORDS; w++) begin
      raddr = 3'(w); #1;
      checks++;
      if (rdata !== prog1[w]) begin failures++; $display("FAIL reload word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
