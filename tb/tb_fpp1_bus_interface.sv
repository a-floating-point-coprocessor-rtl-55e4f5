// tb_fpp1_bus_interface: random strobes and data against a reference model of
// the interface registers (two-deep A, B, C, S, and the MAD drivers).
module tb_fpp1_bus_interface;
  logic clk = 1'b0, rst_n;
  logic [15:0] mad_i, mad_o, a_o, b_o, c_i;
  logic        mad_oe;
  logic        ld_a_n, ld_b_n, ld_c_n, gate_c_n, ld_s_n, gate_s_n;
  logic [2:0]  s_i;
  logic [15:0] ra_lo, ra_hi, rb, rc;
  logic [2:0]  rs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fpp1_bus_interface dut (.clk (clk), .rst_n (rst_n), .mad_i (mad_i), .mad_o (mad_o), .mad_oe (mad_oe),
    .ld_a_n (ld_a_n), .ld_b_n (ld_b_n), .ld_c_n (ld_c_n), .gate_c_n (gate_c_n), .ld_s_n (ld_s_n),
    .gate_s_n (gate_s_n), .a_o (a_o), .b_o (b_o), .c_i (c_i), .s_i (s_i));

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0;
    {ld_a_n, ld_b_n, ld_c_n, gate_c_n, ld_s_n, gate_s_n} = '1;
    mad_i = '0; c_i = '0; s_i = '0;
    ra_lo = '0; ra_hi = '0; rb = '0; rc = '0; rs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      check(a_o === ra_hi, "A port");
      check(b_o === rb, "B port");
      // drive new strobes and check the combinational MAD drivers
      ld_a_n = 1'($urandom % 2); ld_b_n = 1'($urandom % 2); ld_c_n = 1'($urandom % 2);
      ld_s_n = 1'($urandom % 2);
      case ($urandom % 3)
        0: begin gate_c_n = 1'b0; gate_s_n = 1'b1; end
        1: begin gate_c_n = 1'b1; gate_s_n = 1'b0; end
        default: begin gate_c_n = 1'b1; gate_s_n = 1'b1; end
      endcase
      mad_i = 16'($urandom); c_i = 16'($urandom); s_i = 3'($urandom);
      #1;
      check(mad_oe === (!gate_c_n || !gate_s_n), "MAD output enable");
      if (!gate_c_n) check(mad_o === rc, "C register on MAD");
      if (!gate_s_n) check(mad_o === {13'd0, rs}, "S register on MAD");
      if (!ld_a_n) begin ra_hi = ra_lo; ra_lo = mad_i; end
      if (!ld_b_n) rb = mad_i;
      if (!ld_c_n) rc = c_i;
      if (!ld_s_n) rs = s_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
