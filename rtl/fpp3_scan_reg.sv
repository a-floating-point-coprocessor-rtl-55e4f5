// fpp3_scan_reg: register with a parallel and a serial port, the building
// block of the FPP3 diagnostic chain.
//
// Function: in normal mode it is an ordinary W-bit register that takes d when
// ld is high (clr has priority and loads zero). When shift is high it moves
// one place towards the MSB, taking si into bit 0; so is always the MSB, so
// that registers chain by joining so to the next si. Shifting has priority
// over loading, so the owner decides the mode.
// Timing: all changes at the rising clock edge; asynchronous active-low reset
// to zero.
// From the document: "The pipeline register in the control unit and all the
// registers interfacing the busses have both parallel and serial I/O ports
// ... In the diagnostic mode, these registers behave like a single shift
// register chain." Own choices: shift direction, MSB out first, the clear
// input, and the shift-over-load priority.
module fpp3_scan_reg #(
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,    // synchronous clear
  input  logic         ld,     // parallel load
  input  logic [W-1:0] d,
  input  logic         shift,  // serial shift by one place
  input  logic         si,
  output logic         so,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[W-2:0], si};
    else if (clr)   q <= '0;
    else if (ld)    q <= d;
  end

  assign so = q[W-1];

endmodule
