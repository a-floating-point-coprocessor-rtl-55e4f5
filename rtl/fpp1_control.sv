// fpp1_control: control unit of the FPP1 (address decoder, MUX controller,
// opcode register, next-address MUX, FSM PROM and pipeline register CTLREG).
//
// The board normally sits in the idle loop: the MUX passes the next-address
// field of CTLREG to the PROM, and the PROM word for that address is clocked
// into CTLREG every cycle. The PNC starts an operation with an address phase
// in which MAD[21:16] are all ones while ADRLD is asserted. The address
// decoder recognises that pattern; its hit goes through two flip-flops (the
// MUX controller), and in the cycle the second one is set the MUX takes the
// PROM address from the opcode register (OPREG) instead of CTLREG. OPREG
// samples {MAD[7:1], 0} every clock, so it holds the function code the PNC put
// on MAD in the cycle after the address phase; that code is the entry address
// of the operation's microcode. From the next cycle on, the MUX follows the
// next-address field again.
//
// Timing (cycle 0 = address phase): function code on MAD in cycle 1, PROM
// entry word in CTLREG during cycle 3, i.e. the first operand half must be on
// MAD in cycle 3.
// From the document: the decoded bits MAD[21:16], the two flip-flops between
// decoder and MUX, the OPREG input {MAD[7:1], 0}, the 8-bit MUX and next-
// address field, the 512 x 28 PROM and CTLREG. Own choices: the hit is decoded
// combinationally in the address phase; reset (MRESET, active low) clears the
// two flip-flops and OPREG, and loads the idle word into CTLREG.
module fpp1_control
  import fpp1_pkg::*;
(
  input  logic        clk,
  input  logic        mreset_n,
  input  logic [21:0] mad_i,      // MAD bus address/data lines as driven by the PNC
  input  logic        adrld,      // PNC address-register load strobe
  output microword_t  ctl,        // CTLREG: the current microword
  output logic [7:0]  uaddr,      // PROM address chosen by the MUX this cycle
  output logic        start       // MUX is taking the entry address from OPREG
);

  logic       hit;
  logic       hit_q1, hit_q2;
  logic [7:0] opreg;
  microword_t prom_data;

  // address decoder: all-ones pattern on MAD[21:16] during ADRLD
  assign hit = adrld && (&mad_i[21:16]);

  always_ff @(posedge clk or negedge mreset_n) begin
    if (!mreset_n) begin
      hit_q1 <= 1'b0;
      hit_q2 <= 1'b0;
      opreg  <= '0;
    end else begin
      hit_q1 <= hit;
      hit_q2 <= hit_q1;
      opreg  <= {mad_i[7:1], 1'b0};
    end
  end

  // next-address MUX
  assign start = hit_q2;
  assign uaddr = start ? opreg : ctl.next_addr;

  fpp1_fsm_prom u_prom (
    .addr ({1'b0, uaddr}),
    .data (prom_data)
  );

  always_ff @(posedge clk or negedge mreset_n) begin
    if (!mreset_n) ctl <= noop_word(IDLE_LOOP);
    else           ctl <= prom_data;
  end

endmodule
