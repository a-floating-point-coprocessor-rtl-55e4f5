// tb_fpp3_scan_reg: random test of the parallel/serial register.
//
// Drives random clr/ld/shift/si/d for 3000 cycles at the default width of
// 80 bits and compares q and so every cycle with a model kept in the
// testbench; then checks that 80 shifts with so fed back to si restore the
// original value (the non-destructive scan-out the control unit relies on).
module tb_fpp3_scan_reg;
  localparam int W = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, ld, shift, si, so;
  logic [W-1:0] d, q, m, keep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpp3_scan_reg #(.W(W)) dut (.clk, .rst_n, .clr, .ld, .d, .shift, .si, .so, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    {clr, ld, shift, si} = '0; d = '0; m = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== m || so !== m[W-1]) begin failures++; $display("FAIL: cycle %0d q %h model %h", i, q, m); end
      clr = ($urandom % 10) === 0; ld = 1'($urandom); shift = ($urandom % 3) === 0;
      si = 1'($urandom); d = rnd();
      if (shift) m = {m[W-2:0], si}; else if (clr) m = '0; else if (ld) m = d;
    end
    @(negedge clk); clr = 1'b0; shift = 1'b0; ld = 1'b1; d = rnd(); keep = d;
    @(negedge clk); ld = 1'b0; shift = 1'b1;
    for (int i = 0; i < W; i++) begin si = so; @(negedge clk); end
    shift = 1'b0; #1;
    checks++;
    if (q !== keep) begin failures++; $display("FAIL: rotate did not restore the value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
