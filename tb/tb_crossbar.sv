// tb_crossbar: self-checking test of the crossbar switch.
// Random source selections for both operand inputs of every EXU, random
// output-channel requests (at most one driver per channel, as the
// assertion demands) and random static flag routes, checked against a
// reference model of the routing.
module tb_crossbar;
  import paddi_pkg::*;
  logic clk = 0;
  logic [DW-1:0] exu_dout [N_EXU], in_ch [N_IN], xa [N_EXU], xb [N_EXU], out_bus [N_OUT];
  logic [3:0] src_a [N_EXU], src_b [N_EXU], fsw1 [N_EXU], fsw2 [N_EXU];
  logic oe [N_EXU], out_drv [N_OUT], exu_flag [N_EXU], ext_flag [N_EXT_FLAG];
  logic [1:0] obus [N_EXU];
  logic int_flag1 [N_EXU], int_flag2 [N_EXU];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] ref_data(input logic [3:0] s);
    if (s < 8) return exu_dout[s[2:0]];
    if (s < 12) return in_ch[s - 8];
    return '0;
  endfunction

  function automatic logic ref_flag(input logic [3:0] s);
    if (s < 8) return exu_flag[s[2:0]];
    if (s < 10) return ext_flag[s - 8];
    return 1'b0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int owner [N_OUT];
      @(negedge clk);
      for (int k = 0; k < N_OUT; k++) owner[k] = -1;
      for (int i = 0; i < N_EXU; i++) begin
        exu_dout[i] = DW'($urandom);
        src_a[i] = 4'($urandom); src_b[i] = 4'($urandom);
        fsw1[i] = 4'($urandom); fsw2[i] = 4'($urandom);
        exu_flag[i] = 1'($urandom);
        obus[i] = 2'($urandom);
        oe[i] = 1'($urandom) && owner[obus[i]] < 0;
        if (oe[i]) owner[obus[i]] = i;
      end
      for (int k = 0; k < N_IN; k++) in_ch[k] = DW'($urandom);
      for (int k = 0; k < N_EXT_FLAG; k++) ext_flag[k] = 1'($urandom);
      #1;
      for (int i = 0; i < N_EXU; i++) begin
        checks += 4;
        if (xa[i] !== ref_data(src_a[i])) begin failures++; $display("FAIL xa[%0d]", i); end
        if (xb[i] !== ref_data(src_b[i])) begin failures++; $display("FAIL xb[%0d]", i); end
        if (int_flag1[i] !== ref_flag(fsw1[i])) begin failures++; $display("FAIL iflag1[%0d]", i); end
        if (int_flag2[i] !== ref_flag(fsw2[i])) begin failures++; $display("FAIL iflag2[%0d]", i); end
      end
      for (int k = 0; k < N_OUT; k++) begin
        checks += 2;
        if (out_drv[k] !== (owner[k] >= 0)) begin failures++; $display("FAIL drv[%0d]", k); end
        if (owner[k] >= 0 && out_bus[k] !== exu_dout[owner[k]]) begin failures++; $display("FAIL bus[%0d]", k); end
        if (owner[k] < 0 && out_bus[k] !== '0) begin failures++; $display("FAIL idle bus[%0d]", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
