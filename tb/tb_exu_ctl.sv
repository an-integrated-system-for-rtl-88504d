// tb_exu_ctl: self-checking test of the EXU control.
// A testbench array stands in for the nanostore. Checks that the word at the
// global address issued in cycle n is in the instruction register (valid)
// in cycle n+2, that the pipeline is empty while `run` is low, and that a
// raised interrupt flag redirects the next decode to IV1 or IV2 (IV1 first)
// only when the instruction in E has the matching enable set.
module tb_exu_ctl;
  import paddi_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, int_flag1 = 0, int_flag2 = 0, ir_valid, int_taken;
  logic [2:0] ga = 0, iv1 = 3'd6, iv2 = 3'd7, ns_raddr;
  instr_t ns_rdata, ir;
  instr_t mem [8];
  logic [2:0] ga_hist [4];
  logic       run_hist [4];
  int checks = 0, failures = 0, n_int = 0;

  exu_ctl dut (.*);

  assign ns_rdata = mem[ns_raddr];
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++) begin
      mem[w] = instr_t'({21'($urandom), 32'($urandom)});
      mem[w].rsvd = 16'(w);          // tag each word with its address
      mem[w].ien  = 2'b00;
    end
    mem[3].ien = 2'b01;
    mem[4].ien = 2'b10;
    mem[5].ien = 2'b11;
    for (int i = 0; i < 4; i++) begin ga_hist[i] = 0; run_hist[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [2:0] exp_addr;
      logic       exp_int;
      @(negedge clk);
      // expected decode address for the word being latched at the next edge
      exp_int = 1'b0;
      exp_addr = ga_hist[0];
      if (run_hist[0] && ir_valid && ir.ien[0] && int_flag1) begin exp_addr = iv1; exp_int = 1; end
      else if (run_hist[0] && ir_valid && ir.ien[1] && int_flag2) begin exp_addr = iv2; exp_int = 1; end
      checks++;
      if (int_taken !== exp_int) begin failures++; $display("FAIL int_taken at %0d", n); end
      if (exp_int) n_int++;
      checks++;
      if (ns_raddr !== exp_addr) begin failures++; $display("FAIL raddr %0d expected %0d", ns_raddr, exp_addr); end
      @(posedge clk); #1;
      checks += 2;
      if (ir_valid !== run_hist[0]) begin failures++; $display("FAIL valid at %0d", n); end
      if (ir_valid && ir.rsvd !== 16'(exp_addr)) begin failures++; $display("FAIL ir word %0d expected %0d", ir.rsvd, exp_addr); end
      // next stimulus
      ga_hist[0] = ga; run_hist[0] = run;
      run = (n % 100) < 90;
      ga = 3'($urandom_range(0, 5));
      int_flag1 = 1'($urandom);
      int_flag2 = 1'($urandom);
    end
    checks++;
    if (n_int < 10) begin failures++; $display("FAIL only %0d interrupts", n_int); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
