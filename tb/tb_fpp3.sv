// tb_fpp3: end-to-end test of the FPP3 board with models of its WEITEK chips.
//
// The testbench is the processor node controller: it builds the microcode
// (fpp3_pnc.svh), loads it word by word through the bootstrap machine, then
// for random operands stores constants and operands into a random memory
// segment, runs the division and square-root routines, and reads the results
// back over MAD. Quotient and root must be within 1e-6 relative error of the
// exact values, which needs the table seeds, the WEITEK paths, the C-bus
// write-back and the dual-port reads all to work. Foreign MAD traffic
// (random address phases on other pages) runs between the commands.
module tb_fpp3;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0, rst_n;
  logic [21:0] f3_mad_i;
  logic        f3_adrld;
  logic [15:0] f3_mad_o;
  logic        f3_mad_oe;
  logic        f3_boot, diag;
  logic [15:0] wtc_a, wtc_b, wtc_c, c_mul, c_alu, scan_o;
  logic [3:0]  wtc_f, mode_mul, mode_alu;
  logic [1:0]  mul_l, mul_u, alu_l, alu_u;
  logic [2:0]  s_mul, s_alu;
  logic        en_mul, en_alu;
  logic [11:0] upc, next_addr;
  logic [7:0]  seg;
  int          ops_mul, ops_alu;
  localparam int NTRIALS = 60;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpp3 dut (
    .clk, .rst_n, .mad_i (f3_mad_i), .adrld (f3_adrld), .mad_o (f3_mad_o), .mad_oe (f3_mad_oe),
    .wtc_a, .wtc_b, .wtc_f, .mul_l, .mul_u, .alu_l, .alu_u,
    .wtc_c, .wtc_s (en_mul ? s_mul : s_alu),
    .upc, .next_addr, .seg, .scan_o, .diag, .boot (f3_boot)
  );

  wtc_model #(.IS_MUL(1'b1), .LATENCY(7)) u_1032 (
    .clk, .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (mul_l), .u (mul_u),
    .c (c_mul), .c_en (en_mul), .s (s_mul), .mode (mode_mul), .ops (ops_mul));
  wtc_model #(.IS_MUL(1'b0), .LATENCY(6)) u_1033 (
    .clk, .a (wtc_a), .b (wtc_b), .f (wtc_f), .l (alu_l), .u (alu_u),
    .c (c_alu), .c_en (en_alu), .s (s_alu), .mode (mode_alu), .ops (ops_alu));
  assign wtc_c = en_mul ? c_mul : c_alu;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (c !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "fpp3_pnc.svh"

  initial begin
    logic [15:0] d [8], got [8];
    logic [7:0]  oe, s;
    logic [31:0] a, b, q, r;
    real ra, rb, err;
    // a falling reset edge at time 1, so every register is reset before the
    // first clock edge
    rst_n = 1'b1; f3_adrld = 1'b0; f3_mad_i = '0;
    #1 rst_n = 1'b0;
    build_ucode();
    repeat (2) @(negedge clk); rst_n = 1'b1;
    f3_boot_load();
    f3_wait(10);
    check(!en_mul && !en_alu, "WEITEK outputs off while idle");
    for (int i = 0; i < NTRIALS; i++) begin
      s = 8'(1 + $urandom % 255);
      a = {1'b0, 8'(110 + $urandom % 35), 23'($urandom)};
      b = {1'($urandom), 8'(110 + $urandom % 35), 23'($urandom)};
      if (i == 0) begin a = 32'h40e00000; b = 32'h40400000; end
      d = '{16'(s), 16'h3f00, 16'h0000, 16'h4000, 16'h0000, 16'h4040, 16'h0000, 16'h0000};
      f3_call(R_CONST, 7, d, got, oe);
      d = '{16'(s), a[31:16], a[15:0], b[31:16], b[15:0], 16'h0, 16'h0, 16'h0};
      f3_call(R_STORE, 5, d, got, oe);
      check(seg === s, "segment taken from MAD");
      f3_call(R_DIV, 0, d, got, oe);
      f3_wait(div_cycles);
      f3_call(R_SQRT, 0, d, got, oe);
      f3_wait(sqrt_cycles);
      d[0] = 16'(s);
      f3_call(R_READ, 1, d, got, oe);
      check(oe === 8'b0001_1110, "result words driven on MAD in cycles 3..6");
      q = {got[1], got[2]};
      r = {got[3], got[4]};
      ra = to_real(a); rb = to_real(b);
      err = (to_real(q) - ra / rb) / (ra / rb); if (err < 0.0) err = -err;
      check(err < 1.0e-6, $sformatf("A/B %08h / %08h = %08h, rel. error %e", a, b, q, err));
      err = (to_real(r) - $sqrt(ra)) / $sqrt(ra); if (err < 0.0) err = -err;
      check(err < 1.0e-6, $sformatf("sqrt %08h = %08h, rel. error %e", a, r, err));
      f3_wait($urandom % 20);
    end
    check(ops_mul === NTRIALS * 8 && ops_alu === NTRIALS * 2, "three multiplications and one subtraction per division, five and one per root");
    $display("division %0d cycles, square root %0d cycles", div_cycles, sqrt_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
