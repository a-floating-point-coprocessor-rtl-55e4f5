// fp32_ref_pkg: reference arithmetic for the testbenches (IEEE-754 single
// precision, normal numbers only, round to nearest even).
//
// Values are computed in double precision and rounded once to single. For the
// operands the testbenches use (exponents within a few binary orders of each
// other) sums and products are exact in double precision, so the single
// rounding gives the correctly rounded IEEE result. Subnormal results flush to
// zero and overflow gives infinity.
package fp32_ref_pkg;

  function automatic real to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) return x[31] ? -0.0 : 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] mant;
    logic [24:0] m24;
    logic [28:0] rest;
    d    = $realtobits(r);
    s    = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    mant = {1'b1, d[51:0]};
    m24  = {1'b0, mant[52:29]};
    rest = mant[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m24[0])) m24 = m24 + 25'd1;
    if (m24[24]) begin
      m24 = m24 >> 1;
      e   = e + 1;
    end
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m24[22:0]};
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // 1033 ALU function codes (see fpp1_pkg)
  function automatic logic [31:0] alu_ref(logic [3:0] f, logic [31:0] x, logic [31:0] y);
    real a, b;
    a = to_real(x);
    b = to_real(y);
    case (f)
      4'd2:    return to_single(real'($signed(x)));          // FLOAT
      4'd3:    return 32'($rtoi(a));                          // FIX, toward zero
      4'd4:    return to_single(a + b);
      4'd5:    return to_single(a - b);
      4'd6:    return to_single(-a + b);
      4'd7:    return to_single(fabs(a) + fabs(b));
      4'd8:    return to_single(fabs(a - b));
      4'd9:    return to_single(fabs(a + b));
      default: return x;                                       // WRAP, UNWRAP
    endcase
  endfunction

  function automatic logic [31:0] mul_ref(logic [31:0] x, logic [31:0] y);
    return to_single(to_real(x) * to_real(y));
  endfunction

  // status as the chip models report it: {infinity, negative, zero}
  function automatic logic [2:0] status_of(logic [31:0] r);
    return {r[30:23] == 8'hff, r[31], r[30:0] == 31'd0};
  endfunction

endpackage
