// fpp1: the FPP1 floating-point coprocessor board, without its two WEITEK
// arithmetic chips.
//
// The board is a slave of the processor node controller (PNC) on the MAD bus
// and runs in lock step with it. The PNC starts an operation with an address
// phase that has MAD[21:16] all ones, then puts the function code on MAD[7:0]
// (it is also the microcode entry address), then the two halves of operand 1
// and of operand 2 (most significant half first), and later reads the two
// halves of the result from MAD[15:0] while mad_oe is high.
// Inside: the control unit (decoder, OPREG, MUX, FSM PROM, CTLREG), the
// two-stage function register, and the bus interface registers. The WEITEK
// 1032 multiplier and 1033 ALU are bought parts; their pins are ports of this
// module: shared A, B and F inputs, a load code L and an unload code U for
// each chip, and the shared C result bus and S status lines.
//
// Cycle plan of one two-operand ALU operation (cycle 0 = address phase):
// function code in cycle 1, operand 1 halves in cycles 3 and 4, operand 2
// halves in cycles 7 and 8, result halves driven on MAD in cycles 19 and 20;
// the multiplier and one-operand tails are one cycle longer. Exact cycle
// counts of each tail come from the document's microcode; the cycle plan of
// the PNC side is this design's reading of it.
module fpp1
  import fpp1_pkg::*;
(
  input  logic        clk,
  input  logic        mreset_n,
  // MAD bus
  input  logic [21:0] mad_i,
  input  logic        adrld,
  output logic [15:0] mad_o,
  output logic        mad_oe,
  // pins of the WEITEK chips
  output logic [15:0] wtc_a,
  output logic [15:0] wtc_b,
  output logic [3:0]  wtc_f,
  output logic [1:0]  mul_l,     // {L1,L0} of the 1032
  output logic [1:0]  mul_u,     // {U1,U0} of the 1032
  output logic [1:0]  alu_l,     // {L1,L0} of the 1033
  output logic [1:0]  alu_u,     // {U1,U0} of the 1033
  input  logic [15:0] wtc_c,
  input  logic [2:0]  wtc_s,
  // observation
  output logic [7:0]  uaddr,
  output logic        start
);

  microword_t ctl;

  fpp1_control u_control (
    .clk      (clk),
    .mreset_n (mreset_n),
    .mad_i    (mad_i),
    .adrld    (adrld),
    .ctl      (ctl),
    .uaddr    (uaddr),
    .start    (start)
  );

  fpp1_function_reg u_freg (
    .clk    (clk),
    .rst_n  (mreset_n),
    .ld_f_n (ctl.ld_f_n),
    .f_in   (ctl.f),
    .f_out  (wtc_f)
  );

  fpp1_bus_interface u_bus (
    .clk      (clk),
    .rst_n    (mreset_n),
    .mad_i    (mad_i[15:0]),
    .mad_o    (mad_o),
    .mad_oe   (mad_oe),
    .ld_a_n   (ctl.ld_a_n),
    .ld_b_n   (ctl.ld_b_n),
    .ld_c_n   (ctl.ld_c_n),
    .gate_c_n (ctl.gate_c_n),
    .ld_s_n   (ctl.ld_s_n),
    .gate_s_n (ctl.gate_s_n),
    .a_o      (wtc_a),
    .b_o      (wtc_b),
    .c_i      (wtc_c),
    .s_i      (wtc_s)
  );

  assign mul_l = {ctl.l1_2, ctl.l0_2};
  assign mul_u = {ctl.u1_2, ctl.u0_2};
  assign alu_l = {ctl.l1_3, ctl.l0_3};
  assign alu_u = {ctl.u1_3, ctl.u0_3};

endmodule
