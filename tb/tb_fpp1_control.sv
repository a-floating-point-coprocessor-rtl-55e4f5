// tb_fpp1_control: start-up and sequencing of the FPP1 control unit.
//
// Drives address phases and foreign traffic on MAD and checks: the entry
// address is taken from OPREG exactly two cycles after the address phase and
// equals {MAD[7:1],0} of the cycle after it; the following addresses step
// through the entry block and the shared tail to the idle loop; the strobes
// in CTLREG appear in the cycles the cycle plan expects (LD_A in cycles 3 and
// 4, LD_B in 7 and 8, GATE_C in 19..21 for a two-operand ALU operation);
// foreign traffic never leaves the idle loop.
module tb_fpp1_control;
  import fpp1_pkg::*;
  logic        clk = 1'b0;
  logic        mreset_n;
  logic [21:0] mad_i;
  logic        adrld;
  microword_t  ctl;
  logic [7:0]  uaddr;
  logic        start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpp1_control dut (.clk (clk), .mreset_n (mreset_n), .mad_i (mad_i), .adrld (adrld),
                    .ctl (ctl), .uaddr (uaddr), .start (start));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one start; entry, tail kind (0 alu2, 1 mul, 2 alu1); runs to idle
  task automatic run(input logic [7:0] entry, input int tail);
    int len, base, last;
    len  = (tail === 0) ? 15 : 16;
    base = (tail === 0) ? 8'h50 : (tail === 1) ? 8'h70 : 8'h90;
    last = 3 + 4 + len;              // cycle in which the idle word is back
    for (int t = 0; t <= last; t++) begin
      @(negedge clk);
      // observe cycle t-1 state (values settled since the last posedge)
      if (t === 2) check(start && uaddr === entry, $sformatf("entry %02h taken in cycle 2", entry));
      if (t !== 2) check(!start, "MUX follows CTLREG outside cycle 2");
      if (t >= 3 && t <= 6) check(uaddr === ((t === 6) ? 8'(base) : entry + 8'(t - 2)), "entry block walk");
      if (t >= 7 && t < 7 + len - 1) check(uaddr === 8'(base + t - 6), "tail walk");
      if (t === 3 || t === 4) check(!ctl.ld_a_n, "LD_A for operand 1");
      if (tail !== 2 && (t === 7 || t === 8)) check(!ctl.ld_b_n, "LD_B for operand 2");
      if (tail === 2) check(ctl.ld_b_n, "no LD_B for one-operand operations");
      if (t === last - 3 || t === last - 2 || t === last - 1) check(!ctl.gate_c_n, "GATE_C on result cycles");
      if (t < last - 3) check(ctl.gate_c_n, "no GATE_C before the result");
      if (t === last) check(uaddr === 8'h00 && ctl.next_addr === 8'h00, "back in the idle loop");
      adrld = (t === 0);
      mad_i = (t === 0) ? 22'h3f0000 : (t === 1) ? {14'h0123, entry | 8'(1)} : {2'b0, 20'($urandom)};
      if (t > 0 && &mad_i[21:16]) mad_i[21] = 1'b0;
    end
  endtask

  initial begin
    mreset_n = 1'b0; adrld = 1'b0; mad_i = '0;
    repeat (2) @(negedge clk);
    check(uaddr === 8'h00, "reset selects the idle loop");
    mreset_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      check(uaddr === 8'h00 && !start, "idle on foreign traffic");
      adrld = 1'($urandom);
      mad_i = 22'($urandom);
      if (&mad_i[21:16]) mad_i[16] = 1'b0;
    end
    // pattern without ADRLD must not start
    @(negedge clk); adrld = 1'b0; mad_i = 22'h3f0004;
    repeat (3) begin @(negedge clk); mad_i = '0; check(!start && uaddr === 8'h00, "no start without ADRLD"); end
    run(8'h04, 0); run(8'h2c, 1); run(8'h1c, 2); run(8'h28, 0); run(8'h38, 1); run(8'h10, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
