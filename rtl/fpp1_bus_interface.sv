// fpp1_bus_interface: registers between the MAD bus and the WEITEK chip ports.
//
// Operands arrive from the PNC 16 bits at a time on MAD[15:0], most
// significant half first. LD_A shifts MAD into a two-deep A register (the
// older half moves to the A port), so both halves of operand 1 are held
// while operand 2 is fetched; LD_B loads MAD into the B register that drives
// the B port. The chips put their result on the shared 16-bit C bus and a
// 3-bit status on S; LD_C and LD_S load them into the C and S registers, and
// GATE_C / GATE_S drive those registers onto MAD[15:0] (status in the low
// three bits). All strobes are active low, as in the microword.
// From the document: A, B, C (16 bits) and S (3 bits) between the interface and
// the chips, LD_A/LD_B/LD_C/LD_S/GATE_C/GATE_S. Own choices: the two-deep A
// register, reset of all registers, and C taking precedence if both gates
// were ever asserted together (the microcode never does that).
module fpp1_bus_interface (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] mad_i,
  output logic [15:0] mad_o,
  output logic        mad_oe,
  input  logic        ld_a_n,
  input  logic        ld_b_n,
  input  logic        ld_c_n,
  input  logic        gate_c_n,
  input  logic        ld_s_n,
  input  logic        gate_s_n,
  output logic [15:0] a_o,       // to A ports of both chips
  output logic [15:0] b_o,       // to B ports of both chips
  input  logic [15:0] c_i,       // C bus from the chips
  input  logic [2:0]  s_i        // S status from the chips
);

  logic [15:0] a_lo;
  logic [15:0] c_reg;
  logic [2:0]  s_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_lo  <= '0;
      a_o   <= '0;
      b_o   <= '0;
      c_reg <= '0;
      s_reg <= '0;
    end else begin
      if (!ld_a_n) begin
        a_lo <= mad_i;
        a_o  <= a_lo;
      end
      if (!ld_b_n) b_o   <= mad_i;
      if (!ld_c_n) c_reg <= c_i;
      if (!ld_s_n) s_reg <= s_i;
    end
  end

  always_comb begin
    mad_oe = !gate_c_n || !gate_s_n;
    if (!gate_c_n)      mad_o = c_reg;
    else if (!gate_s_n) mad_o = {13'd0, s_reg};
    else                mad_o = '0;
  end

endmodule
