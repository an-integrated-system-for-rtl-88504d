// exu_regfile: one of the two register files of an EXU.
//
// Six registers R1..R6 (addresses 0..5) with one read port and one write
// port, so a value can be written and another read in the same cycle. The
// read is combinational; a write lands at the clock edge. R6 is the scan
// register: it also sits in the serial configuration chain, so it can be
// preset to a constant at set-up time, and otherwise behaves like the rest.
//
// With `delay` set, a write to any address but R6 shifts the line
// R1 -> R2 -> ... -> R5 and puts the new value in R1, so reading Rk gives
// the value written k writes earlier: a programmable delay line. A write to
// R6 in this mode still writes R6 only.
//
// Six registers, the scan register and the delay-line use follow the
// document (and its delay-line figure, which shows five registers in
// series). The choice of R6 as the scan register, the shift direction and
// reads of addresses 6 and 7 returning zero are this design's own.
// Registers R1..R5 reset to zero; R6 keeps what configuration put there.
module exu_regfile
  import paddi_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         delay,    // static: delay-line mode
  input  logic         we,
  input  logic [2:0]   waddr,
  input  logic [W-1:0] wdata,
  input  logic [2:0]   raddr,
  output logic [W-1:0] rdata,
  // configuration chain through the scan register, MSB out first
  input  logic         cfg_en,
  input  logic         cfg_si,
  output logic         cfg_so
);
  logic [W-1:0] r [N_REG-1];  // R1..R5
  logic [W-1:0] scan;         // R6

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REG - 1; i++) r[i] <= '0;
    end else if (we) begin
      if (delay && waddr != 3'(SCAN_IDX)) begin
        r[0] <= wdata;
        for (int i = 1; i < N_REG - 1; i++) r[i] <= r[i-1];
      end else if (waddr < 3'(SCAN_IDX)) begin
        r[3'(waddr)] <= wdata;
      end
    end
  end

  // The scan register is not reset: its value comes from the chain.
  always_ff @(posedge clk) begin
    if (cfg_en)
      scan <= {scan[W-2:0], cfg_si};
    else if (we && waddr == 3'(SCAN_IDX))
      scan <= wdata;
  end

  assign cfg_so = scan[W-1];
  always_comb begin
    if (raddr == 3'(SCAN_IDX))     rdata = scan;
    else if (raddr < 3'(SCAN_IDX)) rdata = r[raddr];
    else                           rdata = '0;
  end
endmodule
