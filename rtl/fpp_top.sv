// fpp_top: the two floating-point coprocessor boards for the Butterfly
// processor node, side by side.
//
//  - fpp1: the built prototype (control unit with a fixed FSM PROM,
//    function register and MAD bus interface around a WEITEK 1032
//    multiplier and 1033 ALU). Ports prefixed fpp1_.
//  - fpp3: the proposed high-speed board (microprogrammed engine with a
//    writable control store loaded over MAD, dual-port operand memory,
//    reciprocal / square-root table ROM, and its own pair of WEITEK chips).
//    Ports prefixed fpp3_.
// Each board would sit on its own processor node, so they share only the
// clock and reset; each has its own MAD bus ports. The WEITEK chips are
// bought parts, so their pins are ports of this module.
module fpp_top
(
  input  logic        clk,
  input  logic        rst_n,
  // ---- FPP1: MAD bus
  input  logic [21:0] fpp1_mad_i,
  input  logic        fpp1_adrld,
  output logic [15:0] fpp1_mad_o,
  output logic        fpp1_mad_oe,
  // ---- FPP1: WEITEK chip pins
  output logic [15:0] fpp1_wtc_a,
  output logic [15:0] fpp1_wtc_b,
  output logic [3:0]  fpp1_wtc_f,
  output logic [1:0]  fpp1_mul_l,
  output logic [1:0]  fpp1_mul_u,
  output logic [1:0]  fpp1_alu_l,
  output logic [1:0]  fpp1_alu_u,
  input  logic [15:0] fpp1_wtc_c,
  input  logic [2:0]  fpp1_wtc_s,
  output logic [7:0]  fpp1_uaddr,
  output logic        fpp1_start,
  // ---- FPP3: MAD bus
  input  logic [21:0] fpp3_mad_i,
  input  logic        fpp3_adrld,
  output logic [15:0] fpp3_mad_o,
  output logic        fpp3_mad_oe,
  // ---- FPP3: WEITEK chip pins
  output logic [15:0] fpp3_wtc_a,
  output logic [15:0] fpp3_wtc_b,
  output logic [3:0]  fpp3_wtc_f,
  output logic [1:0]  fpp3_mul_l,
  output logic [1:0]  fpp3_mul_u,
  output logic [1:0]  fpp3_alu_l,
  output logic [1:0]  fpp3_alu_u,
  input  logic [15:0] fpp3_wtc_c,
  input  logic [2:0]  fpp3_wtc_s,
  // ---- FPP3: engine state
  output logic [11:0] fpp3_upc,
  output logic [11:0] fpp3_next_addr,
  output logic [7:0]  fpp3_seg,
  output logic [15:0] fpp3_scan_o,
  output logic        fpp3_diag,
  output logic        fpp3_boot
);

  fpp1 u_fpp1 (
    .clk      (clk),
    .mreset_n (rst_n),
    .mad_i    (fpp1_mad_i),
    .adrld    (fpp1_adrld),
    .mad_o    (fpp1_mad_o),
    .mad_oe   (fpp1_mad_oe),
    .wtc_a    (fpp1_wtc_a),
    .wtc_b    (fpp1_wtc_b),
    .wtc_f    (fpp1_wtc_f),
    .mul_l    (fpp1_mul_l),
    .mul_u    (fpp1_mul_u),
    .alu_l    (fpp1_alu_l),
    .alu_u    (fpp1_alu_u),
    .wtc_c    (fpp1_wtc_c),
    .wtc_s    (fpp1_wtc_s),
    .uaddr    (fpp1_uaddr),
    .start    (fpp1_start)
  );

  fpp3 u_fpp3 (
    .clk       (clk),
    .rst_n     (rst_n),
    .mad_i     (fpp3_mad_i),
    .adrld     (fpp3_adrld),
    .mad_o     (fpp3_mad_o),
    .mad_oe    (fpp3_mad_oe),
    .wtc_a     (fpp3_wtc_a),
    .wtc_b     (fpp3_wtc_b),
    .wtc_f     (fpp3_wtc_f),
    .mul_l     (fpp3_mul_l),
    .mul_u     (fpp3_mul_u),
    .alu_l     (fpp3_alu_l),
    .alu_u     (fpp3_alu_u),
    .wtc_c     (fpp3_wtc_c),
    .wtc_s     (fpp3_wtc_s),
    .upc       (fpp3_upc),
    .next_addr (fpp3_next_addr),
    .seg       (fpp3_seg),
    .scan_o    (fpp3_scan_o),
    .diag      (fpp3_diag),
    .boot      (fpp3_boot)
  );

endmodule
