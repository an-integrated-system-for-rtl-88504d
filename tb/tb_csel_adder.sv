// tb_csel_adder: self-checking test of the carry-select adder.
// Compares sum, carry out and the carry into the top bit with a plain
// wide addition for corner values and random operands, both carry-in values.
module tb_csel_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, sum;
  logic cin, cout, c_msb;
  int checks = 0, failures = 0;

  csel_adder #(.W(W), .BLK(4)) dut (.a, .b, .cin, .sum, .cout, .c_msb);

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] ref_sum;
    logic [W-1:0] low;
    a = x; b = y; cin = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    low = {1'b0, x[W-2:0]} + {1'b0, y[W-2:0]} + W'(ci);
    checks++;
    if ({cout, sum} !== ref_sum || c_msb !== low[W-1]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b sum=%h cout=%b cmsb=%b", x, y, ci, sum, cout, c_msb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'hFFFF, 16'h0000, 1'b1);
    check_one(16'hFFFF, 16'hFFFF, 1'b1);
    check_one(16'h7FFF, 16'h0001, 1'b0);
    check_one(16'h000F, 16'h0001, 1'b0);
    check_one(16'h0FFF, 16'h0000, 1'b1);
    for (int i = 0; i < 2000; i++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
