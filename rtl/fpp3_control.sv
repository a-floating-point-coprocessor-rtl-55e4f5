// fpp3_control: the FPP3 micro engine - sequencer, writable control store
// (WCS), pipeline register and the bootstrap state machine that loads it.
//
// Function: an 80-bit pipeline register drives the whole board (output ctl).
// Its control-unit field (bits 18..0) is read here as
//   [11:0]  branch address
//   [15:12] sequencer instruction, a subset of the 2910 set:
//           0 JZ (to 0, stack cleared), 1 CJS (call if condition),
//           2 JMAP (to the MAP register), 3 CJP (jump if condition),
//           10 CRTN (return if condition), every other code CONT (next word)
//   [18:16] condition select: 0 is "always", 1..7 pick cond[1..7]
// The sequencer keeps a microprogram counter (next address + 1) and a
// five-word subroutine stack, like the 2910. Each running cycle the WCS word
// at the next address is loaded into the pipeline register.
// Loading and diagnostics: a 16-bit input register takes words from MAD and
// shifts them serially into the pipeline register, which is also the scan
// chain. A full 80-bit word is written into the WCS at the microprogram
// counter, which then steps by one. In diagnostic mode the chain can be
// scanned in and out and the engine single-stepped (see fpp3_bootstrap_fsm).
// Scanned-out bits collect in scan_o. ctl_valid is low while ctl holds a
// partly loaded or partly shifted word, so the board can ignore it.
// A call with a full stack still jumps, but its return address is lost.
// Timing: one microinstruction per clock; the WCS is read asynchronously and
// written at the clock edge.
// From the document: 4K x 80 WCS, 80-bit pipeline register, 2910-type
// sequencer, a MAP register giving the start address, bits 0..18 as the
// control unit's field, serial loading, and the scan chain. Own choices: the
// layout inside bits 0..18, the instruction subset, the condition inputs
// (the condition PLA is not built) and the scan order.
module fpp3_control
#(
  parameter int unsigned WCS_WORDS = 4096,
  parameter int unsigned WORD_W    = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [21:0]       mad_i,
  input  logic              adrld,
  input  logic [7:1]        cond,
  output logic [WORD_W-1:0] ctl,
  output logic [11:0]       upc,
  output logic [11:0]       next_addr,
  output logic [15:0]       scan_o,
  output logic              diag,
  output logic              boot,
  output logic              ctl_valid   // ctl holds a microinstruction
);

  localparam int unsigned AW = $clog2(WCS_WORDS);

  localparam logic [3:0] I_JZ = 4'd0, I_CJS = 4'd1, I_JMAP = 4'd2, I_CJP = 4'd3,
                         I_CRTN = 4'd10;

  logic        in_ld, shift, rotate, wcs_we, clear, run, take_map;
  logic [11:0] map_addr;

  fpp3_bootstrap_fsm u_bsfsm (
    .clk, .rst_n, .mad_i, .adrld,
    .in_ld, .shift, .rotate, .wcs_we, .clear, .run, .take_map, .map_addr,
    .diag, .boot
  );

  // input register: parallel from MAD, serial out MSB first
  logic        in_so;
  logic [15:0] in_q;
  fpp3_scan_reg #(.W(16)) u_in_reg (
    .clk, .rst_n, .clr (1'b0), .ld (in_ld), .d (mad_i[15:0]),
    .shift (shift), .si (1'b0), .so (in_so), .q (in_q)
  );

  // pipeline register, also the scan chain
  logic [WORD_W-1:0] wcs [WCS_WORDS];
  logic              pipe_so;
  fpp3_scan_reg #(.W(WORD_W)) u_pipe (
    .clk, .rst_n, .clr (clear), .ld (run), .d (wcs[next_addr[AW-1:0]]),
    .shift (shift), .si (rotate ? pipe_so : in_so), .so (pipe_so), .q (ctl)
  );

  // while loading, and while the chain shifts, ctl holds partial words
  assign ctl_valid = !boot && !shift;

  always_ff @(posedge clk) begin
    if (wcs_we) wcs[upc[AW-1:0]] <= ctl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                scan_o <= '0;
    else if (shift && rotate)  scan_o <= {scan_o[14:0], pipe_so};
  end

  // ------------------------------------------------------------- sequencer
  logic [3:0]  instr;
  logic [11:0] ba;
  logic        cc;
  logic [11:0] stack [5];
  logic [2:0]  sp;              // number of words on the stack
  logic        push, pop, flush;

  assign instr = ctl[15:12];
  assign ba    = ctl[11:0];
  assign cc    = (ctl[18:16] == 3'd0) ? 1'b1 : cond[ctl[18:16]];

  always_comb begin
    next_addr = upc;
    push      = 1'b0;
    pop       = 1'b0;
    flush     = 1'b0;
    if (take_map) begin
      next_addr = map_addr;
    end else begin
      unique case (instr)
        I_JZ:   begin next_addr = '0; flush = 1'b1; end
        I_CJS:  if (cc) begin next_addr = ba; push = 1'b1; end
        I_JMAP: next_addr = map_addr;
        I_CJP:  if (cc) next_addr = ba;
        I_CRTN: if (cc && sp != 3'd0) begin next_addr = stack[sp - 3'd1]; pop = 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= '0;
      sp  <= '0;
    end else if (clear) begin
      upc <= '0;
      sp  <= '0;
    end else if (wcs_we) begin
      upc <= upc + 12'd1;
    end else if (run) begin
      upc <= next_addr + 12'd1;
      if (flush)                   sp <= '0;
      else if (push && sp != 3'd5) sp <= sp + 3'd1;
      else if (pop)                sp <= sp - 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (run && push && !flush && sp != 3'd5) stack[sp] <= upc;
  end

endmodule
