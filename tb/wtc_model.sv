// wtc_model: behavioural model of a WEITEK 1032 multiplier or 1033 ALU as
// the FPP1 uses it (not synthesizable, testbench only).
//
// Pins: 16-bit A and B operand ports, 4-bit F function input, load code L
// ({L1,L0}: 00 none, 01 load A and B, 10 load A only, 11 load mode from F),
// unload code U ({U1,U0}: U1 low enables the C output, U0 selects the most (0)
// or least (1) significant half), 16-bit C result bus and 3-bit S status.
// Operands are loaded in two cycles, most significant halves first; the
// function in F at the second load is executed and the result is ready
// LATENCY cycles later. U is registered in the chip and the output half is
// registered again, so C shows a half two cycles after U asks for it.
// Only the behaviour the board relies on is modelled; the real chips' wrapped
// (denormal) formats and pipelined mode are not.
module wtc_model #(
  parameter bit          IS_MUL  = 1'b0,
  parameter int unsigned LATENCY = 6
) (
  input  logic        clk,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [3:0]  f,
  input  logic [1:0]  l,
  input  logic [1:0]  u,
  output logic [15:0] c,
  output logic        c_en,
  output logic [2:0]  s,
  output logic [3:0]  mode,
  output int          ops       // operations executed
);
  import fp32_ref_pkg::*;

  logic [31:0] x, y, result;
  logic [3:0]  func;
  logic        half = 1'b0;
  int          count = -1;
  logic [1:0]  u_q = 2'b10;

  initial begin
    c = '0; c_en = 1'b0; s = '0; mode = '0; ops = 0; result = '0;
    x = '0; y = '0; func = '0;
  end

  always @(posedge clk) begin
    if (l == 2'b11) mode <= f;
    if (l == 2'b01 || l == 2'b10) begin
      if (!half) begin
        x[31:16] <= a;
        if (l == 2'b01) y[31:16] <= b;
        half <= 1'b1;
      end else begin
        x[15:0] <= a;
        if (l == 2'b01) y[15:0] <= b;
        func  <= f;
        half  <= 1'b0;
        count <= int'(LATENCY) - 1;
      end
    end
    if (count == 0) begin
      result <= IS_MUL ? mul_ref(x, y) : alu_ref(func, x, y);
      s      <= status_of(IS_MUL ? mul_ref(x, y) : alu_ref(func, x, y));
      ops    <= ops + 1;
    end
    if (count >= 0) count <= count - 1;
    u_q  <= u;
    c_en <= !u_q[1];
    if (!u_q[1]) c <= u_q[0] ? result[15:0] : result[31:16];
  end

endmodule
