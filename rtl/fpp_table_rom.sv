// fpp_table_rom: seed tables for reciprocal (1/B) and reciprocal square root
// (1/sqrt B) of an IEEE-754 single-precision operand, with the register and
// bus-multiplexing logic around them (the table ROM unit shared by the FPP2
// and FPP3 proposals).
//
// The operand B arrives on the 16-bit B bus in two halves. ld_ms captures the
// sign, the 8-bit exponent E and fraction bits 22..16; ld_ls captures fraction
// bits 15..11. The twelve fraction bits F and the exponent address the tables:
//   EXP_ROM  (4K x 8):  address {func, E}; func 0: G = 253 - E,
//                       func 1: G = (379 - E) / 2 rounded up;
//                       other function numbers are left blank (zero).
//   DFRA_ROM (4K x 12): H = 4096*8192 / (4097 + F) - 4096
//   SFRA_ROM1 (even E): H = 2^19 / sqrt(8192 + 2F) - 4096
//   SFRA_ROM2 (odd E):  H = 2^19 / sqrt(4097 + F) - 4096
// (divisions and square roots rounded down). The approximation
// {sign of B, G, H, eleven zero bits} is good to about 12 bits and is meant
// to be refined by Newton iterations on the floating-point chips.
// The 32-bit approximation goes out on the 16-bit C bus in two cycles:
// drive_ms puts {sign, G, H[11:5]} on C and moves {H[4:0], 0} into the delay
// register; drive_ls puts the delay register on C in a later cycle.
// From the document: table sizes, formulas, address formation, the function
// select from microcode, the sign pass-through, the delay register and the
// zero low bits. Own choices: the function numbering, the control strobes,
// rounding down, reading the odd-exponent square-root formula with the
// square root that makes H approximate 1/sqrt(B).
module fpp_table_rom #(
  parameter int unsigned FRAC_BITS = 12   // table address / data width
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] b_i,        // B bus
  input  logic        ld_ms,      // capture MS half of B
  input  logic        ld_ls,      // capture LS half of B
  input  logic [3:0]  func,       // table function from the microcode
  input  logic        drive_ms,   // put MS half of the approximation on C
  input  logic        drive_ls,   // put LS half (delay register) on C
  output logic [15:0] c_o,
  output logic        c_oe
);

  localparam int unsigned N = 1 << FRAC_BITS;
  localparam int unsigned HI_BITS = 7;                 // fraction bits in the MS half
  localparam int unsigned LO_BITS = FRAC_BITS - HI_BITS;

  // -------------------------------------------------------------- table builds
  function automatic logic [63:0] isqrt64(logic [63:0] v);
    logic [63:0] q;
    q = '0;
    for (int i = 31; i >= 0; i--) begin
      logic [63:0] t;
      t = q | (64'd1 << i);
      if (t * t <= v) q = t;
    end
    return q;
  endfunction

  typedef logic [7:0]           exp_rom_t  [N];
  typedef logic [FRAC_BITS-1:0] frac_rom_t [N];

  function automatic exp_rom_t build_exp();
    exp_rom_t m;
    for (int a = 0; a < N; a++) begin
      int e, fn;
      logic [31:0] g;
      e  = a % 256;
      fn = a / 256;
      g  = 0;
      if (fn == 0) g = 32'(253 - e);
      if (fn == 1) g = 32'((379 - e + 1) / 2);   // (379 - E) / 2 rounded up
      m[a] = g[7:0];
    end
    return m;
  endfunction

  function automatic frac_rom_t build_frac(int kind);
    frac_rom_t m;
    longint unsigned scale, one;
    scale = longint'(N) * 2;                // 8192 for 12 bits
    one   = longint'(N);                    // 4096
    for (int f = 0; f < N; f++) begin
      logic [63:0] h;
      if (kind == 0)
        h = (one * scale) / (one + 1 + longint'(f)) - one;
      else if (kind == 1)
        h = isqrt64((scale * 64 * scale * 64) / (scale + 2 * longint'(f))) - one;
      else
        h = isqrt64((scale * 64 * scale * 64) / (one + 1 + longint'(f))) - one;
      m[f] = h[FRAC_BITS-1:0];
    end
    return m;
  endfunction

  localparam exp_rom_t  EXP_ROM   = build_exp();
  localparam frac_rom_t DFRA_ROM  = build_frac(0);
  localparam frac_rom_t SFRA_ROM1 = build_frac(1);
  localparam frac_rom_t SFRA_ROM2 = build_frac(2);

  // ------------------------------------------------------- address registers
  logic                 sign_q;
  logic [7:0]           exp_q;
  logic [HI_BITS-1:0]   frac_hi_q;
  logic [LO_BITS-1:0]   frac_lo_q;
  logic [LO_BITS-1:0]   delay_q;
  logic [FRAC_BITS-1:0] f_addr;   // fraction ROM address
  logic [FRAC_BITS-1:0] h;        // fraction ROM output
  logic [7:0]           g;        // exponent ROM output

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_q    <= 1'b0;
      exp_q     <= '0;
      frac_hi_q <= '0;
      frac_lo_q <= '0;
      delay_q   <= '0;
    end else begin
      if (ld_ms) begin
        sign_q    <= b_i[15];
        exp_q     <= b_i[14:7];
        frac_hi_q <= b_i[6:0];
      end
      if (ld_ls)    frac_lo_q <= b_i[15:16-LO_BITS];
      if (drive_ms) delay_q   <= h[LO_BITS-1:0];
    end
  end

  // ------------------------------------------------------------ table lookup
  assign f_addr = {frac_hi_q, frac_lo_q};
  assign g      = EXP_ROM[{func, exp_q}];

  always_comb begin
    if (func == 4'd1)
      h = exp_q[0] ? SFRA_ROM2[f_addr] : SFRA_ROM1[f_addr];
    else
      h = DFRA_ROM[f_addr];
  end

  // ------------------------------------------------------ C bus multiplexing
  always_comb begin
    c_oe = drive_ms || drive_ls;
    if (drive_ms)      c_o = {sign_q, g, h[FRAC_BITS-1 -: HI_BITS]};
    else if (drive_ls) c_o = {delay_q, {(16-LO_BITS){1'b0}}};
    else               c_o = '0;
  end

endmodule
