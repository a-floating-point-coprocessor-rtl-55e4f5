// fpp1_pkg: shared types and constants of the FPP1 floating-point coprocessor.
//
// The FPP1 is a microprogrammed board that sits on the memory daughter-board
// connector of a Butterfly processor node and runs in lock step with the
// processor node controller (PNC). A 28-bit microword, held in a pipeline
// register (CTLREG), drives every strobe on the board. This package gives the
// microword a packed-struct layout, the function codes of the two WEITEK
// arithmetic chips, the entry addresses of each operation, and a function that
// computes the contents of the 512-word FSM PROM.
//
// Taken from the document: the bit assignment of the microword (bits 0..18
// control, 19..26 next address, 27 unused), the active-low strobes, the L/U/F
// encodings, the entry addresses (equal to the low byte of the "magic"
// address the 68000 writes), the three shared microcode tails (two-operand ALU,
// multiplier, one-operand ALU) and their lengths.
// Own choices: where two printed versions of the microcode disagree, the
// program follows the generator source (one-operand tail for WRAP/UNWRAP/
// FLOAT/FIX, seven wait words for the multiplier, a separate GATE_C word).
package fpp1_pkg;

  // ---------------------------------------------------------------- microword
  // Bit order, LSB first: GATE_S, LD_S, GATE_C, LD_C, LD_B, LD_A (all active
  // low), L1/L0 and U1/U0 of the 1032 multiplier, L1/L0 and U1/U0 of the 1033
  // ALU, F0..F3, LD_F (active low), an 8-bit next address, one unused bit.
  typedef struct packed {
    logic       unused;     // bit 27
    logic [7:0] next_addr;  // bits 26:19
    logic       ld_f_n;     // bit 18
    logic [3:0] f;          // bits 17:14 (F3..F0)
    logic       u0_3;       // bit 13
    logic       u1_3;       // bit 12
    logic       l0_3;       // bit 11
    logic       l1_3;       // bit 10
    logic       u0_2;       // bit 9
    logic       u1_2;       // bit 8
    logic       l0_2;       // bit 7
    logic       l1_2;       // bit 6
    logic       ld_a_n;     // bit 5
    logic       ld_b_n;     // bit 4
    logic       ld_c_n;     // bit 3
    logic       gate_c_n;   // bit 2
    logic       ld_s_n;     // bit 1
    logic       gate_s_n;   // bit 0
  } microword_t;

  localparam int unsigned PROM_WORDS = 512;  // 512 x 28 PROM

  // L field of a WEITEK chip: {L1,L0}
  localparam logic [1:0] L_NONE = 2'b00;   // no load
  localparam logic [1:0] L_AB   = 2'b01;   // load A and B ports
  localparam logic [1:0] L_A    = 2'b10;   // load A port only
  localparam logic [1:0] L_MODE = 2'b11;   // load the mode register from F

  // F codes of the 1033 ALU
  typedef enum logic [3:0] {
    F_WRAP   = 4'd0, F_UNWRAP = 4'd1, F_FLOAT = 4'd2, F_FIX  = 4'd3,
    F_ADD    = 4'd4, F_SUB    = 4'd5, F_NSUB  = 4'd6, F_AADD = 4'd7,
    F_SUBA   = 4'd8, F_ADDA   = 4'd9
  } alu_func_e;

  // F codes of the 1032 multiplier
  typedef enum logic [3:0] {
    F_MUL = 4'd0, F_WMUL = 4'd1, F_MULW = 4'd2, F_WMULW = 4'd3
  } mul_func_e;

  // F value put out before the function code; it is loaded as the chip mode.
  localparam logic [3:0] F_MODEWORD = 4'd8;

  // Entry addresses, one per operation (low byte of the magic address)
  localparam logic [7:0] ADD_E   = 8'h04, SUB_E   = 8'h08, NSUB_E  = 8'h0c;
  localparam logic [7:0] WRAP_E  = 8'h10, UNWRAP_E= 8'h14, FLOAT_E = 8'h18;
  localparam logic [7:0] FIX_E   = 8'h1c, AADD_E  = 8'h20, ADDA_E  = 8'h24;
  localparam logic [7:0] SUBA_E  = 8'h28, MUL_E   = 8'h2c, WMUL_E  = 8'h30;
  localparam logic [7:0] MULW_E  = 8'h34, WMULW_E = 8'h38;

  // Shared tails
  localparam logic [7:0] COMMON_1 = 8'h90;  // one-operand ALU operations
  localparam logic [7:0] COMMON_2 = 8'h70;  // multiplier
  localparam logic [7:0] COMMON_3 = 8'h50;  // two-operand ALU operations
  localparam logic [7:0] IDLE_LOOP = 8'h00;

  // Number of pure wait words between the last operand load and the first
  // result-unload word in each tail.
  localparam int unsigned WAIT_1 = 7;
  localparam int unsigned WAIT_2 = 7;
  localparam int unsigned WAIT_3 = 6;

  typedef enum logic [1:0] { TAIL_ALU2, TAIL_MUL, TAIL_ALU1 } tail_e;

  // The idle word: every strobe inactive, no load, outputs disabled, F = 1111.
  function automatic microword_t noop_word(logic [7:0] nxt);
    microword_t w;
    w           = '0;
    w.next_addr = nxt;
    w.ld_f_n    = 1'b1;
    w.f         = 4'hf;
    w.u1_3      = 1'b1;
    w.u1_2      = 1'b1;
    w.ld_a_n    = 1'b1;
    w.ld_b_n    = 1'b1;
    w.ld_c_n    = 1'b1;
    w.gate_c_n  = 1'b1;
    w.ld_s_n    = 1'b1;
    w.gate_s_n  = 1'b1;
    return w;
  endfunction

  // Decode an entry address: is it an entry block, which function, which tail.
  typedef struct packed {
    logic       valid;
    logic [3:0] fcode;
    tail_e      tail;
  } entry_t;

  function automatic entry_t entry_info(logic [7:0] base);
    logic [3:0] fcode;
    tail_e      tail;
    fcode = 4'h0;
    tail  = TAIL_ALU2;
    case (base)
      ADD_E:    begin fcode = F_ADD;    tail = TAIL_ALU2; end
      SUB_E:    begin fcode = F_SUB;    tail = TAIL_ALU2; end
      NSUB_E:   begin fcode = F_NSUB;   tail = TAIL_ALU2; end
      AADD_E:   begin fcode = F_AADD;   tail = TAIL_ALU2; end
      ADDA_E:   begin fcode = F_ADDA;   tail = TAIL_ALU2; end
      SUBA_E:   begin fcode = F_SUBA;   tail = TAIL_ALU2; end
      WRAP_E:   begin fcode = F_WRAP;   tail = TAIL_ALU1; end
      UNWRAP_E: begin fcode = F_UNWRAP; tail = TAIL_ALU1; end
      FLOAT_E:  begin fcode = F_FLOAT;  tail = TAIL_ALU1; end
      FIX_E:    begin fcode = F_FIX;    tail = TAIL_ALU1; end
      MUL_E:    begin fcode = F_MUL;    tail = TAIL_MUL;  end
      WMUL_E:   begin fcode = F_WMUL;   tail = TAIL_MUL;  end
      MULW_E:   begin fcode = F_MULW;   tail = TAIL_MUL;  end
      WMULW_E:  begin fcode = F_WMULW;  tail = TAIL_MUL;  end
      default:  return '{valid: 1'b0, fcode: 4'h0, tail: TAIL_ALU2};
    endcase
    return '{valid: 1'b1, fcode: fcode, tail: tail};
  endfunction

  function automatic logic [7:0] tail_base(tail_e t);
    case (t)
      TAIL_MUL:  return COMMON_2;
      TAIL_ALU1: return COMMON_1;
      default:   return COMMON_3;
    endcase
  endfunction

  // Number of words in a shared tail.
  function automatic int unsigned tail_len(tail_e t);
    return ((t == TAIL_MUL) ? WAIT_2 : (t == TAIL_ALU1) ? WAIT_1 : WAIT_3) + 9;
  endfunction

  // Word k of a shared tail (k below tail_len).
  function automatic microword_t tail_word(tail_e t, int unsigned k);
    microword_t  w;
    int unsigned nwait;
    logic        mul;
    logic [1:0]  l;
    logic [1:0]  u;         // {U1,U0}
    logic [7:0]  base;
    mul   = (t == TAIL_MUL);
    base  = tail_base(t);
    nwait = (t == TAIL_MUL) ? WAIT_2 : (t == TAIL_ALU1) ? WAIT_1 : WAIT_3;
    w     = noop_word(base + 8'(k) + 8'd1);
    l     = L_NONE;
    u     = 2'b10;          // output disabled
    if (k == 0) begin
      l        = L_MODE;
      w.ld_f_n = 1'b0;
      if (t != TAIL_ALU1) w.ld_b_n = 1'b0;
    end else if (k == 1 || k == 2) begin
      l = (t == TAIL_ALU1) ? L_A : L_AB;
      if (k == 1) begin
        w.ld_a_n = 1'b0;
        if (t != TAIL_ALU1) w.ld_b_n = 1'b0;
      end
    end else if (k == nwait + 3) begin
      u = 2'b00;            // most significant half out
    end else if (k == nwait + 4) begin
      u        = 2'b01;     // least significant half out
      w.ld_s_n = 1'b0;
    end else if (k == nwait + 5) begin
      w.ld_c_n = 1'b0;
    end else if (k == nwait + 6) begin
      w.ld_c_n   = 1'b0;
      w.gate_c_n = 1'b0;
    end else if (k == nwait + 7) begin
      w.gate_c_n = 1'b0;
    end else if (k == nwait + 8) begin
      w.ld_c_n    = 1'b0;
      w.gate_c_n  = 1'b0;
      w.next_addr = IDLE_LOOP;
    end
    if (mul) begin
      {w.l1_2, w.l0_2} = l;
      {w.u1_2, w.u0_2} = u;
    end else begin
      {w.l1_3, w.l0_3} = l;
      {w.u1_3, w.u0_3} = u;
    end
    return w;
  endfunction

  // Contents of the FSM PROM at address a.
  function automatic microword_t fsm_prom_word(int unsigned a);
    microword_t  w;
    entry_t      e;
    int unsigned base;
    int unsigned k;
    w = noop_word(IDLE_LOOP);
    if (a >= 256) return w;
    // entry blocks: four words each
    e = entry_info(8'(a & 32'hfc));
    if (e.valid) begin
      w = noop_word(8'(a) + 8'd1);
      case (a & 3)
        0, 1: w.ld_a_n = 1'b0;                       // operand 1, MS then LS
        2: begin w.ld_f_n = 1'b0; w.f = F_MODEWORD; end
        default: begin
          w.ld_f_n    = 1'b0;
          w.f         = e.fcode;
          w.next_addr = tail_base(e.tail);
        end
      endcase
      return w;
    end
    // shared tails
    for (int t = 0; t < 3; t++) begin
      base = 32'(tail_base(tail_e'(t)));
      if (a >= base && a < base + tail_len(tail_e'(t))) begin
        k = a - base;
        return tail_word(tail_e'(t), k);
      end
    end
    return w;
  endfunction

endpackage
