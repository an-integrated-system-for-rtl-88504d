// crossbar: the on-chip switch between the EXUs and the I/O channels.
//
// Data routing is receiver controlled and may change every cycle: each EXU's
// current instruction names, for each of its two register-file inputs, one
// source among the eight EXU results (codes 0..7) and the four input
// channels (codes 8..11); other codes give zero. A sending EXU only chooses
// whether to drive an output channel and which one. An output channel
// carries the value of the lowest-numbered EXU driving it; `out_drv` says
// whether any does, and an assertion reports two drivers in one cycle.
//
// Flag routing is static: two set-up time selectors per EXU pick the flags
// of its interrupt inputs among the eight EXU flags (codes 0..7) and the
// external flag inputs (codes 8..9).
//
// Purely combinational; `clk` only samples the assertion. From the
// document: a crossbar carrying data and flags, dynamic data routing,
// static flag routing, four 16-bit input and four output channels, the
// receiver-controlled model. The source codes, the priority among drivers
// and the external flag inputs are this design's own.
module crossbar
  import paddi_pkg::*;
(
  input  logic          clk,
  input  logic [DW-1:0] exu_dout [N_EXU],
  input  logic [DW-1:0] in_ch    [N_IN],
  input  logic [3:0]    src_a    [N_EXU],
  input  logic [3:0]    src_b    [N_EXU],
  output logic [DW-1:0] xa       [N_EXU],
  output logic [DW-1:0] xb       [N_EXU],
  input  logic          oe       [N_EXU],
  input  logic [1:0]    obus     [N_EXU],
  output logic [DW-1:0] out_bus  [N_OUT],
  output logic          out_drv  [N_OUT],
  input  logic          exu_flag [N_EXU],
  input  logic          ext_flag [N_EXT_FLAG],
  input  logic [3:0]    fsw1     [N_EXU],
  input  logic [3:0]    fsw2     [N_EXU],
  output logic          int_flag1 [N_EXU],
  output logic          int_flag2 [N_EXU]
);
  function automatic logic [DW-1:0] pick_data(input logic [3:0] s,
                                              input logic [DW-1:0] d [N_EXU],
                                              input logic [DW-1:0] c [N_IN]);
    if (s < 4'(N_EXU))                return d[s[2:0]];
    else if (s < 4'(SRC_IN0 + N_IN))  return c[2'(s - 4'(SRC_IN0))];
    else                              return '0;
  endfunction

  function automatic logic pick_flag(input logic [3:0] s,
                                     input logic f [N_EXU],
                                     input logic e [N_EXT_FLAG]);
    if (s < 4'(N_EXU))                         return f[s[2:0]];
    else if (s < 4'(FSRC_EXT0 + N_EXT_FLAG))   return e[1'(s - 4'(FSRC_EXT0))];
    else                                       return 1'b0;
  endfunction

  always_comb begin
    for (int i = 0; i < N_EXU; i++) begin
      xa[i]        = pick_data(src_a[i], exu_dout, in_ch);
      xb[i]        = pick_data(src_b[i], exu_dout, in_ch);
      int_flag1[i] = pick_flag(fsw1[i], exu_flag, ext_flag);
      int_flag2[i] = pick_flag(fsw2[i], exu_flag, ext_flag);
    end
  end

  logic [N_EXU-1:0] drv [N_OUT];

  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      out_bus[k] = '0;
      out_drv[k] = 1'b0;
      for (int i = 0; i < N_EXU; i++) drv[k][i] = oe[i] && obus[i] == 2'(k);
      for (int i = N_EXU - 1; i >= 0; i--) begin
        if (drv[k][i]) begin
          out_bus[k] = exu_dout[i];
          out_drv[k] = 1'b1;
        end
      end
    end
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_chk
    a_one_driver: assert property (@(posedge clk) $onehot0(drv[k]))
      else $error("output channel %0d driven by more than one EXU", k);
  end
endmodule
