// tb_fpp1: end-to-end test of the FPP1 board with models of its two WEITEK
// chips, driven by a model of the PNC side of the MAD bus.
//
// Each operation follows the PNC's cycle plan: an address phase with
// MAD[21:16] all ones and ADRLD, the function code (twice), the two halves of
// operand 1, two cycles of unrelated bus traffic, the two halves of operand 2,
// then unrelated traffic until the result halves are read. The expected
// result is computed by the reference package; the cycles in which the board
// drives MAD are checked against the microcode tail lengths (result halves in
// cycles 19 and 20 for two-operand ALU operations, one cycle later for the
// multiplier and the one-operand operations), and the board must be back in
// its idle loop afterwards. Random traffic that is not an address phase must
// never start the board.
module tb_fpp1;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        mreset_n;
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

  int checks = 0, failures = 0;
  int n_alu2 = 0, n_alu1 = 0, n_mul = 0, n_backtoback = 0, n_ignored = 0;

  always #5 clk = ~clk;

  fpp1 dut (
    .clk (clk), .mreset_n (mreset_n), .mad_i (mad_i), .adrld (adrld),
    .mad_o (mad_o), .mad_oe (mad_oe),
    .wtc_a (wtc_a), .wtc_b (wtc_b), .wtc_f (wtc_f),
    .mul_l (mul_l), .mul_u (mul_u), .alu_l (alu_l), .alu_u (alu_u),
    .wtc_c (wtc_c), .wtc_s (en_mul ? s_mul : s_alu),
    .uaddr (uaddr), .start (start)
  );

  wtc_model #(.IS_MUL(1'b1), .LATENCY(7)) u_1032 (
    .clk (clk), .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (mul_l), .u (mul_u),
    .c (c_mul), .c_en (en_mul), .s (s_mul), .mode (mode_mul), .ops (ops_mul));
  wtc_model #(.IS_MUL(1'b0), .LATENCY(6)) u_1033 (
    .clk (clk), .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (alu_l), .u (alu_u),
    .c (c_alu), .c_en (en_alu), .s (s_alu), .mode (mode_alu), .ops (ops_alu));

  assign wtc_c = en_mul ? c_mul : c_alu;

  // the two chips must never drive C together
  always @(posedge clk) if (mreset_n && en_mul && en_alu) begin
    failures++;
    $display("FAIL: both chips drive the C bus");
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus traffic that is not an FPP address phase
  function automatic logic [21:0] junk();
    logic [21:0] v;
    v = 22'($urandom);
    if (&v[21:16]) v[20] = 1'b0;
    return v;
  endfunction

  // one operation; tail: 0 two-operand ALU, 1 multiplier, 2 one-operand ALU
  task automatic run_op(input logic [7:0] entry, input int tail,
                        input logic [31:0] x, input logic [31:0] y,
                        input logic [31:0] expect_r);
    int          last;
    int          rd;
    logic [31:0] got;
    rd   = (tail === 0) ? 19 : 20;
    last = rd + 2;
    got  = '0;
    for (int t = 0; t <= last; t++) begin
      @(negedge clk);
      // outputs of cycle t-1 were sampled at the previous negedge; check now
      if (t === 2) check(start === 1'b1 && uaddr === entry, "entry address taken from OPREG");
      if (t === rd)     begin check(mad_oe, "result MS half driven"); got[31:16] = mad_o; end
      if (t === rd + 1) begin check(mad_oe, "result LS half driven"); got[15:0]  = mad_o; end
      if (t >= 1 && t < rd) check(!mad_oe, "MAD not driven before the result");
      adrld = (t === 0);
      case (t)
        0:       mad_i = 22'h3f0000 | 22'($urandom & 16'hffff);
        1, 2:    mad_i = {14'($urandom) & 14'h3eff, entry};
        3:       mad_i = {6'd0, x[31:16]};
        4:       mad_i = {6'd0, x[15:0]};
        7:       mad_i = {6'd0, y[31:16]};
        8:       mad_i = {6'd0, y[15:0]};
        default: mad_i = junk();
      endcase
    end
    check(got === expect_r, $sformatf("result of entry %02h: got %08h expected %08h", entry, got, expect_r));
    check((tail === 1 ? mode_mul : mode_alu) === 4'd8, "chip mode register loaded with the mode code");
  endtask

  function automatic logic [31:0] rnd_float(int emin, int erange);
    return {1'($urandom), 8'(emin + int'($urandom % erange)), 23'($urandom)};
  endfunction

  logic [7:0]  alu2_entries [6] = '{8'h04, 8'h08, 8'h0c, 8'h20, 8'h24, 8'h28};
  logic [3:0]  alu2_f       [6] = '{4'd4, 4'd5, 4'd6, 4'd7, 4'd9, 4'd8};
  logic [7:0]  mul_entries  [4] = '{8'h2c, 8'h30, 8'h34, 8'h38};

  initial begin
    logic [31:0] x, y;
    int k;
    // a falling reset edge at time 1, so every register is reset before the
    // first clock edge the chip models see
    mreset_n = 1'b1;
    adrld    = 1'b0;
    mad_i    = '0;
    #1 mreset_n = 1'b0;
    repeat (3) @(negedge clk);
    mreset_n = 1'b1;
    // idle traffic must not start the board
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      adrld = 1'($urandom);
      mad_i = junk();
      check(uaddr === 8'h00 && !mad_oe, "board stays idle on foreign traffic");
      n_ignored++;
    end
    @(negedge clk); adrld = 1'b0;
    // a known case first: 1.5 + 2.25 = 3.75
    run_op(8'h04, 0, 32'h3fc00000, 32'h40100000, 32'h40700000);
    n_alu2++;
    run_op(8'h2c, 1, 32'h3fc00000, 32'h40100000, 32'h40580000);  // 3.375
    n_mul++; n_backtoback++;
    for (int i = 0; i < 60; i++) begin
      x = rnd_float(120, 14);
      y = rnd_float(120, 14);
      k = int'($urandom % 3);
      if (k === 0) begin
        int j;
        j = int'($urandom % 6);
        run_op(alu2_entries[j], 0, x, y, alu_ref(alu2_f[j], x, y));
        n_alu2++;
      end else if (k === 1) begin
        run_op(mul_entries[$urandom % 4], 1, x, y, mul_ref(x, y));
        n_mul++;
      end else begin
        if ($urandom % 2) begin
          x = 32'($signed(int'($urandom % 2000000) - 1000000));
          run_op(8'h18, 2, x, y, alu_ref(4'd2, x, y));      // FLOAT
        end else begin
          x = rnd_float(120, 25);
          run_op(8'h1c, 2, x, y, alu_ref(4'd3, x, y));      // FIX
        end
        n_alu1++;
      end
      // sometimes leave idle cycles between operations
      if ($urandom % 2) begin
        repeat (1 + $urandom % 3) begin
          @(negedge clk); adrld = 1'b0; mad_i = junk();
        end
      end else n_backtoback++;
      check(uaddr === 8'h00, "back in the idle loop after an operation");
    end
    check(n_alu2 > 0, "two-operand ALU tail exercised");
    check(n_mul > 0, "multiplier tail exercised");
    check(n_alu1 > 0, "one-operand tail exercised");
    check(n_backtoback > 0, "back-to-back operations exercised");
    check(n_ignored > 0, "foreign traffic exercised");
    check(ops_mul === n_mul && ops_alu === n_alu2 + n_alu1, "each operation ran on its own chip once");
    $display("alu2=%0d mul=%0d alu1=%0d back_to_back=%0d ignored=%0d",
             n_alu2, n_mul, n_alu1, n_backtoback, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
