// tb_fpp1_function_reg: random F codes and LD_F strobes against a two-stage
// reference pipeline that advances only on LD_F.
module tb_fpp1_function_reg;
  logic clk = 1'b0, rst_n, ld_f_n;
  logic [3:0] f_in, f_out;
  logic [3:0] s1, s2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fpp1_function_reg dut (.clk (clk), .rst_n (rst_n), .ld_f_n (ld_f_n), .f_in (f_in), .f_out (f_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ld_f_n = 1'b1; f_in = '0; s1 = '0; s2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (f_out !== s2) begin failures++; $display("FAIL: cycle %0d f_out %h expected %h", i, f_out, s2); end
      ld_f_n = 1'($urandom % 3 === 0);
      f_in   = 4'($urandom);
      if (!ld_f_n) begin s2 = s1; s1 = f_in; end
    end
    // mode then function, as the entry microcode does
    @(negedge clk); ld_f_n = 1'b0; f_in = 4'd8;
    @(negedge clk); ld_f_n = 1'b0; f_in = 4'd4;
    @(negedge clk); ld_f_n = 1'b1; checks++;
    if (f_out !== 4'd8) begin failures++; $display("FAIL: mode code not at the output"); end
    ld_f_n = 1'b0; f_in = 4'hf;
    @(negedge clk); checks++;
    if (f_out !== 4'd4) begin failures++; $display("FAIL: function code not at the output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
