// fpp1_function_reg: two-stage function register in front of the WEITEK chips.
//
// The F field of the microword is clocked into the first 4-bit stage whenever
// LD_F (active low) is asserted, and the first stage moves into the second in
// the same clock. The second stage drives the F inputs of both the 1032
// multiplier and the 1033 ALU. The entry microcode therefore puts out the mode
// code and then the function code with LD_F, so that the chip sees the mode
// code while its mode register is loaded and the function code while its
// operands are loaded.
// From the document: two cascaded 4-bit registers enabled by LD_F, feeding F
// of both chips. Own choice: reset clears both stages.
module fpp1_function_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_f_n,   // load strobe, active low
  input  logic [3:0] f_in,     // F field of the microword
  output logic [3:0] f_out     // F inputs of the arithmetic chips
);

  logic [3:0] stage1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= '0;
      f_out  <= '0;
    end else if (!ld_f_n) begin
      stage1 <= f_in;
      f_out  <= stage1;
    end
  end

endmodule
