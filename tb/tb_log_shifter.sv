// tb_log_shifter: self-checking test of the logarithmic right shifter.
// Checks every shift amount with sign fill (arithmetic shift) and with an
// arbitrary fill word (lower half of a linked 32-bit path) against a
// reference computed on the 32-bit concatenation.
module tb_log_shifter;
  localparam int unsigned W = 16;
  logic [W-1:0] d, fill, q;
  logic [2:0] sh;
  int checks = 0, failures = 0;

  log_shifter #(.W(W), .SW(3)) dut (.d, .fill, .sh, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] x, f, expect_q;
      logic signed [W-1:0] xs;
      logic [2*W-1:0] cat;
      x = W'($urandom);
      f = W'($urandom);
      for (int s = 0; s < 8; s++) begin
        // arithmetic shift
        d = x; fill = {W{x[W-1]}}; sh = 3'(s);
        #1;
        xs = x;
        expect_q = W'(xs >>> s);
        checks++;
        if (q !== expect_q) begin failures++; $display("FAIL asr x=%h s=%0d q=%h", x, s, q); end
        // linked fill
        fill = f;
        #1;
        cat = {f, x} >> s;
        checks++;
        if (q !== cat[W-1:0]) begin failures++; $display("FAIL fill x=%h f=%h s=%0d q=%h", x, f, s, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
