// tb_fpp_top: end-to-end test of the whole design at its default sizes.
//
// Both boards run at once, each on its own MAD bus and each with behavioural
// models of its two WEITEK chips; the testbench plays the two processor node
// controllers.
//  - FPP1: random operations of all fourteen kinds (two-operand ALU,
//    multiplier and one-operand ALU tails), back to back, with foreign
//    address phases in between. Each result must equal the reference value
//    and must appear on MAD in the cycles the PNC microcode reads it.
//  - FPP3: the microcode is built and loaded through the bootstrap machine;
//    then, per trial, constants and operands are stored in a random memory
//    segment, the division and square-root routines run, and the results
//    are read back over MAD and compared with the exact values (relative
//    error below 1e-6).
// Each mechanism is counted and the test fails if any count is zero.
module tb_fpp_top;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  // FPP1
  logic [21:0] mad_i;
  logic        adrld;
  logic [15:0] mad_o;
  logic        mad_oe;
  logic [15:0] wtc_a, wtc_b, c_mul, c_alu, wtc_c;
  logic [3:0]  wtc_f, mode_mul, mode_alu;
  logic [1:0]  mul_l, mul_u, alu_l, alu_u;
  logic [2:0]  s_mul, s_alu;
  logic        en_mul, en_alu;
  logic [7:0]  uaddr;
  logic        start;
  int          ops_mul, ops_alu;
  // FPP3
  logic [21:0] f3_mad_i;
  logic        f3_adrld;
  logic [15:0] f3_mad_o;
  logic        f3_mad_oe;
  logic [15:0] f3_a, f3_b, f3_c_mul, f3_c_alu, f3_c;
  logic [3:0]  f3_f, f3_mode_mul, f3_mode_alu;
  logic [1:0]  f3_mul_l, f3_mul_u, f3_alu_l, f3_alu_u;
  logic [2:0]  f3_s_mul, f3_s_alu;
  logic        f3_en_mul, f3_en_alu;
  logic [11:0] f3_upc, f3_next;
  logic [7:0]  f3_seg;
  logic [15:0] f3_scan_o;
  logic        f3_diag, f3_boot;
  int          f3_ops_mul, f3_ops_alu;

  int checks = 0, failures = 0;
  int n_alu2 = 0, n_mul = 0, n_alu1 = 0, n_ignored = 0, n_backtoback = 0;
  int n_div = 0, n_sqrt = 0, n_segments = 0, n_loaded = 0;
  bit fpp1_done = 1'b0, fpp3_done = 1'b0;

  always #5 clk = ~clk;

  fpp_top dut (
    .clk (clk), .rst_n (rst_n),
    .fpp1_mad_i (mad_i), .fpp1_adrld (adrld), .fpp1_mad_o (mad_o), .fpp1_mad_oe (mad_oe),
    .fpp1_wtc_a (wtc_a), .fpp1_wtc_b (wtc_b), .fpp1_wtc_f (wtc_f),
    .fpp1_mul_l (mul_l), .fpp1_mul_u (mul_u), .fpp1_alu_l (alu_l), .fpp1_alu_u (alu_u),
    .fpp1_wtc_c (wtc_c), .fpp1_wtc_s (en_mul ? s_mul : s_alu),
    .fpp1_uaddr (uaddr), .fpp1_start (start),
    .fpp3_mad_i (f3_mad_i), .fpp3_adrld (f3_adrld), .fpp3_mad_o (f3_mad_o), .fpp3_mad_oe (f3_mad_oe),
    .fpp3_wtc_a (f3_a), .fpp3_wtc_b (f3_b), .fpp3_wtc_f (f3_f),
    .fpp3_mul_l (f3_mul_l), .fpp3_mul_u (f3_mul_u), .fpp3_alu_l (f3_alu_l), .fpp3_alu_u (f3_alu_u),
    .fpp3_wtc_c (f3_c), .fpp3_wtc_s (f3_en_mul ? f3_s_mul : f3_s_alu),
    .fpp3_upc (f3_upc), .fpp3_next_addr (f3_next), .fpp3_seg (f3_seg), .fpp3_scan_o (f3_scan_o),
    .fpp3_diag (f3_diag), .fpp3_boot (f3_boot)
  );

  wtc_model #(.IS_MUL(1'b1), .LATENCY(7)) u_1032 (
    .clk (clk), .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (mul_l), .u (mul_u),
    .c (c_mul), .c_en (en_mul), .s (s_mul), .mode (mode_mul), .ops (ops_mul));
  wtc_model #(.IS_MUL(1'b0), .LATENCY(6)) u_1033 (
    .clk (clk), .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (alu_l), .u (alu_u),
    .c (c_alu), .c_en (en_alu), .s (s_alu), .mode (mode_alu), .ops (ops_alu));
  assign wtc_c = en_mul ? c_mul : c_alu;

  wtc_model #(.IS_MUL(1'b1), .LATENCY(7)) u3_1032 (
    .clk (clk), .a (f3_a), .b (f3_b), .f (f3_f), .l (f3_mul_l), .u (f3_mul_u),
    .c (f3_c_mul), .c_en (f3_en_mul), .s (f3_s_mul), .mode (f3_mode_mul), .ops (f3_ops_mul));
  wtc_model #(.IS_MUL(1'b0), .LATENCY(6)) u3_1033 (
    .clk (clk), .a (f3_a), .b (f3_b), .f (f3_f), .l (f3_alu_l), .u (f3_alu_u),
    .c (f3_c_alu), .c_en (f3_en_alu), .s (f3_s_alu), .mode (f3_mode_alu), .ops (f3_ops_alu));
  assign f3_c = f3_en_mul ? f3_c_mul : f3_c_alu;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [21:0] junk();
    logic [21:0] v;
    v = 22'($urandom);
    if (&v[21:16]) v[20] = 1'b0;
    return v;
  endfunction

  // ------------------------------------------------------------------- FPP1
  task automatic fpp1_op(input logic [7:0] entry, input int tail, input logic [3:0] fcode,
                         input logic [31:0] x, input logic [31:0] y,
                         output logic [31:0] got);
    int rd;
    logic [31:0] expect_r;
    rd = (tail === 0) ? 19 : 20;
    got = '0;
    for (int t = 0; t <= rd + 2; t++) begin
      @(negedge clk);
      if (t === 2) check(start && uaddr === entry, "FPP1 entry taken");
      if (t === rd)     begin check(mad_oe, "FPP1 drives MS half"); got[31:16] = mad_o; end
      if (t === rd + 1) begin check(mad_oe, "FPP1 drives LS half"); got[15:0]  = mad_o; end
      if (t >= 1 && t < rd) check(!mad_oe, "FPP1 quiet before its result");
      adrld = (t === 0);
      case (t)
        0:       mad_i = 22'h3f0000;
        1, 2:    mad_i = {14'd0, entry};
        3:       mad_i = {6'd0, x[31:16]};
        4:       mad_i = {6'd0, x[15:0]};
        7:       mad_i = {6'd0, y[31:16]};
        8:       mad_i = {6'd0, y[15:0]};
        default: mad_i = junk();
      endcase
    end
    expect_r = (tail === 1) ? mul_ref(x, y) : alu_ref(fcode, x, y);
    check(got === expect_r, $sformatf("FPP1 op %02h: %08h expected %08h", entry, got, expect_r));
    if (tail === 0) n_alu2++; else if (tail === 1) n_mul++; else n_alu1++;
  endtask

  `include "fpp3_pnc.svh"

  // entry address and WEITEK function code of each FPP1 operation:
  // ADD SUB NSUB AADD ADDA SUBA, MUL WMUL MULW WMULW, WRAP UNWRAP FLOAT FIX
  localparam logic [7:0] ENTRY [14] = '{8'h04, 8'h08, 8'h0c, 8'h20, 8'h24, 8'h28,
                                         8'h2c, 8'h30, 8'h34, 8'h38,
                                         8'h10, 8'h14, 8'h18, 8'h1c};
  localparam logic [3:0] FCODE [14] = '{4'd4, 4'd5, 4'd6, 4'd7, 4'd9, 4'd8,
                                         4'd0, 4'd1, 4'd2, 4'd3,
                                         4'd0, 4'd1, 4'd2, 4'd3};

  initial begin
    // a falling reset edge at time 1, so every register is reset before the
    // first clock edge
    rst_n = 1'b1; adrld = 1'b0; mad_i = '0; f3_adrld = 1'b0; f3_mad_i = '0;
    #1 rst_n = 1'b0;
    build_ucode();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  // ---- FPP1 bus
  initial begin
    logic [31:0] x, y, r;
    int e, tail;
    #2 @(posedge rst_n);
    repeat (20) begin
      @(negedge clk); adrld = 1'($urandom); mad_i = junk();
      check(uaddr === 8'h00 && !mad_oe, "FPP1 idle on foreign traffic"); n_ignored++;
    end
    adrld = 1'b0;
    for (int i = 0; i < 120; i++) begin
      e = $urandom % 14;
      tail = (e < 6) ? 0 : (e < 10) ? 1 : 2;
      x = {1'($urandom), 8'(100 + $urandom % 55), 23'($urandom)};
      y = {1'($urandom), 8'(100 + $urandom % 55), 23'($urandom)};
      if (ENTRY[e] == 8'h18) x = 32'($signed(int'($urandom % 200000) - 100000));
      fpp1_op(ENTRY[e], tail, FCODE[e], x, y, r);
      if (i > 0) n_backtoback++;
    end
    fpp1_done = 1'b1;
  end

  // ---- FPP3 bus
  initial begin
    logic [15:0] d [8], got [8];
    logic [7:0]  oe, s;
    logic [31:0] a, b, q, r;
    real ra, rb, err;
    #2 @(posedge rst_n);
    f3_boot_load();
    n_loaded = UC_WORDS;
    for (int i = 0; i < 10; i++) begin
      s = 8'(1 + $urandom % 255);
      a = {1'b0, 8'(110 + $urandom % 35), 23'($urandom)};
      b = {1'($urandom), 8'(110 + $urandom % 35), 23'($urandom)};
      d = '{16'(s), 16'h3f00, 16'h0000, 16'h4000, 16'h0000, 16'h4040, 16'h0000, 16'h0000};
      f3_call(R_CONST, 7, d, got, oe);
      d = '{16'(s), a[31:16], a[15:0], b[31:16], b[15:0], 16'h0, 16'h0, 16'h0};
      f3_call(R_STORE, 5, d, got, oe);
      check(f3_seg === s, "FPP3 segment taken from MAD"); n_segments++;
      f3_call(R_DIV, 0, d, got, oe);
      f3_wait(div_cycles);
      f3_call(R_SQRT, 0, d, got, oe);
      f3_wait(sqrt_cycles);
      d[0] = 16'(s);
      f3_call(R_READ, 1, d, got, oe);
      check(oe === 8'b0001_1110, "FPP3 results driven on MAD in cycles 3..6");
      q = {got[1], got[2]};
      r = {got[3], got[4]};
      ra = to_real(a); rb = to_real(b);
      err = (to_real(q) - ra / rb) / (ra / rb); if (err < 0.0) err = -err;
      check(err < 1.0e-6, $sformatf("FPP3 A/B %08h / %08h = %08h, rel. error %e", a, b, q, err));
      n_div++;
      err = (to_real(r) - $sqrt(ra)) / $sqrt(ra); if (err < 0.0) err = -err;
      check(err < 1.0e-6, $sformatf("FPP3 sqrt %08h = %08h, rel. error %e", a, r, err));
      n_sqrt++;
    end
    fpp3_done = 1'b1;
  end

  initial begin
    wait (fpp1_done && fpp3_done);
    check(n_alu2 > 0 && n_mul > 0 && n_alu1 > 0, "FPP1: all three microcode tails exercised");
    check(n_ignored > 0 && n_backtoback > 0, "FPP1: foreign traffic and back-to-back operations");
    check(ops_mul === n_mul && ops_alu === n_alu2 + n_alu1, "FPP1: each operation ran on its own chip once");
    check(n_loaded > 0 && n_div > 0 && n_sqrt > 0 && n_segments > 0, "FPP3: loading, division, square root, segments");
    check(f3_ops_mul === 8 * n_div && f3_ops_alu === 2 * n_div,
          "FPP3: three multiplications and one subtraction per division, five and one per square root");
    $display("FPP1 alu2=%0d mul=%0d alu1=%0d; FPP3 div=%0d sqrt=%0d (%0d and %0d cycles)",
             n_alu2, n_mul, n_alu1, n_div, n_sqrt, div_cycles, sqrt_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
