// fpp1_fsm_prom: the 512 x 28 microcode PROM of the FPP1 finite state machine.
//
// An asynchronous-read table. The address comes from the next-address
// multiplexer of the control unit; the data goes to the pipeline register
// (CTLREG). The contents are computed at elaboration time by
// fpp1_pkg::fsm_prom_word, so the table is held in the source as the program
// structure rather than as a list of numbers:
//   - address 0 is the idle loop (a no-operation word that branches to itself);
//   - every operation has a four-word entry block at its entry address: load
//     the MS and LS halves of operand 1 into the A interface register, put the
//     mode code into the function register, then the function code, and jump
//     to one of three shared tails;
//   - a tail loads the chip mode, loads the operand halves into the chip,
//     waits for the chip, unloads the two result halves and returns to idle.
// The size (512 words of 28 bits) and the program follow the document; the
// address width of 9 bits has its top bit tied low by the control unit,
// because the next-address field is 8 bits wide.
module fpp1_fsm_prom
  import fpp1_pkg::*;
#(
  parameter int unsigned WORDS = PROM_WORDS
) (
  input  logic [$clog2(WORDS)-1:0] addr,
  output microword_t               data
);

  function automatic microword_t [WORDS-1:0] build_prom();
    microword_t [WORDS-1:0] m;
    for (int unsigned a = 0; a < WORDS; a++) m[a] = fsm_prom_word(a);
    return m;
  endfunction

  localparam microword_t [WORDS-1:0] PROM = build_prom();

  assign data = PROM[addr];

endmodule
