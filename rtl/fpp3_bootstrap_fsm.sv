// fpp3_bootstrap_fsm: the FPP3 bootstrap finite state machine (BSFSM).
//
// Function: takes commands from the processor node controller (PNC) and
// steers the FPP3 control unit through microcode loading, normal running and
// diagnostics. A command is an address phase (adrld high) with
// MAD[21:16] = CMD_PAGE; MAD[15:12] is the command and MAD[11:0] an argument.
//   LOAD MICROINSTRUCTION (boot mode): five 16-bit words follow on MAD, one
//     every 19 cycles, the first 3 cycles after the command. Each word is
//     loaded into a 16-bit input register and shifted in 16 cycles into the
//     80-bit chain; after the fifth word the chain is written into the
//     control store at the sequencer's address, which then steps by one.
//   END OF LOADING: clears the pipeline register and the sequencer (so the
//     engine loops at location 0) and enters run mode.
//   BEGIN (run mode): the argument is the microcode start address (MAP
//     register); the sequencer takes it as its next address.
//   BEGIN DIAGNOSTICS / END DIAGNOSTICS: enter / leave diagnostic mode,
//     where the engine stops.
//   SCAN IN: one word on MAD 3 cycles after the command is shifted into the
//     chain in 16 cycles. SCAN OUT: the chain is rotated 16 places and the
//     bits leaving it are collected for the PNC. SINGLE STEP: the engine
//     advances by one microinstruction.
// Timing: registered outputs are not used; every output is decoded from the
// state in the same cycle. A command arriving while a load or scan is busy
// is ignored.
// From the document: the command names, loading through a shift register in
// blocks of one 80-bit microinstruction, 19 cycles per 16-bit word, the
// engine looping at location 0 after reset, BEGIN forcing the MAP address,
// and the diagnostic mode. Own choices: the MAD patterns (page, command
// codes, argument field), the cycle at which each word is sampled, and the
// priority rules.
module fpp3_bootstrap_fsm
#(
  parameter logic [5:0] CMD_PAGE = 6'b111110
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [21:0] mad_i,
  input  logic        adrld,
  output logic        in_ld,     // load the 16-bit input register from MAD
  output logic        shift,     // shift input register and chain by one
  output logic        rotate,    // chain input is its own output (scan out)
  output logic        wcs_we,    // write the chain into the control store
  output logic        clear,     // clear pipeline register and sequencer
  output logic        run,       // engine advances this cycle
  output logic        take_map,  // next address comes from the MAP register
  output logic [11:0] map_addr,
  output logic        diag,
  output logic        boot
);

  localparam logic [3:0] C_LOAD = 4'd0, C_END_LOAD = 4'd1, C_BEGIN = 4'd2,
                         C_BEGIN_DIAG = 4'd3, C_SCAN_IN = 4'd4, C_SCAN_OUT = 4'd5,
                         C_STEP = 4'd6, C_END_DIAG = 4'd7;
  localparam int unsigned WORDS   = 5;    // 80-bit microinstruction / 16
  localparam int unsigned PERWORD = 19;   // 3 bus cycles + 16 shifts

  typedef enum logic [1:0] { M_BOOT, M_RUN, M_DIAG } mode_e;
  typedef enum logic [2:0] { OP_NONE, OP_LOAD, OP_SCAN_IN, OP_SCAN_OUT, OP_WRITE } op_e;

  mode_e      mode;
  op_e        op;
  logic [4:0] cnt;
  logic [2:0] word;
  logic       step_q, clear_q, map_q;

  logic       cmd;
  logic [3:0] code;
  assign cmd  = adrld && (mad_i[21:16] == CMD_PAGE) && (op == OP_NONE);
  assign code = mad_i[15:12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_BOOT;
      op       <= OP_NONE;
      cnt      <= '0;
      word     <= '0;
      step_q   <= 1'b0;
      clear_q  <= 1'b0;
      map_q    <= 1'b0;
      map_addr <= '0;
    end else begin
      step_q  <= 1'b0;
      clear_q <= 1'b0;
      map_q   <= 1'b0;
      if (cmd) begin
        cnt  <= '0;
        word <= '0;
        unique case (code)
          C_LOAD:       if (mode == M_BOOT) op <= OP_LOAD;
          C_END_LOAD:   if (mode == M_BOOT) begin mode <= M_RUN; clear_q <= 1'b1; end
          C_BEGIN:      if (mode == M_RUN) begin map_q <= 1'b1; map_addr <= mad_i[11:0]; end
          C_BEGIN_DIAG: if (mode == M_RUN) mode <= M_DIAG;
          C_SCAN_IN:    if (mode == M_DIAG) op <= OP_SCAN_IN;
          C_SCAN_OUT:   if (mode == M_DIAG) op <= OP_SCAN_OUT;
          C_STEP:       if (mode == M_DIAG) step_q <= 1'b1;
          C_END_DIAG:   if (mode == M_DIAG) mode <= M_RUN;
          default: ;
        endcase
      end else if (op == OP_WRITE) begin
        op <= OP_NONE;
      end else if (op != OP_NONE) begin
        if (cnt == 5'(PERWORD - 1)) begin
          cnt <= '0;
          if (op == OP_LOAD && word != 3'(WORDS - 1)) word <= word + 3'd1;
          else op <= (op == OP_LOAD) ? OP_WRITE : OP_NONE;
        end else begin
          cnt <= cnt + 5'd1;
        end
      end
    end
  end

  assign in_ld    = (op == OP_LOAD || op == OP_SCAN_IN) && cnt == 5'd2;
  assign shift    = (op == OP_LOAD || op == OP_SCAN_IN || op == OP_SCAN_OUT) && cnt >= 5'd3;
  assign rotate   = (op == OP_SCAN_OUT);
  assign wcs_we   = (op == OP_WRITE);
  assign clear    = clear_q;
  assign take_map = map_q;
  assign run      = (mode == M_RUN) || step_q;
  assign diag     = (mode == M_DIAG);
  assign boot     = (mode == M_BOOT);

endmodule
