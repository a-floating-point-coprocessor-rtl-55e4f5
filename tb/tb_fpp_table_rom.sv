// tb_fpp_table_rom: reciprocal and reciprocal-square-root seeds for random
// operands, checked against the table formulas evaluated here in floating
// point, against the accuracy the tables are meant to give (about 12 bits),
// and for the two-cycle C bus multiplexing.
module tb_fpp_table_rom;
  import fp32_ref_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [15:0] b_i, c_o;
  logic        ld_ms, ld_ls, drive_ms, drive_ls, c_oe;
  logic [3:0]  func;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fpp_table_rom dut (.clk (clk), .rst_n (rst_n), .b_i (b_i), .ld_ms (ld_ms), .ld_ls (ld_ls),
    .func (func), .drive_ms (drive_ms), .drive_ls (drive_ls), .c_o (c_o), .c_oe (c_oe));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected seed from the formulas, evaluated in floating point
  function automatic logic [31:0] seed(logic [31:0] b, int fn);
    int e, f, g, h;
    e = int'(b[30:23]);
    f = int'(b[22:11]);
    if (fn === 0) begin
      g = 253 - e;
      h = int'($floor(4096.0 * 8192.0 / (4097.0 + f))) - 4096;
    end else begin
      g = int'($ceil((379.0 - e) / 2.0));
      if (e % 2 === 1) h = int'($floor(524288.0 / $sqrt(4097.0 + f))) - 4096;
      else            h = int'($floor(524288.0 / $sqrt(8192.0 + 2.0 * f))) - 4096;
    end
    return {b[31], 8'(g), 12'(h), 11'd0};
  endfunction

  task automatic lookup(input logic [31:0] b, input int fn, output logic [31:0] r);
    @(negedge clk); b_i = b[31:16]; ld_ms = 1'b1; func = 4'(fn);
    @(negedge clk); b_i = b[15:0];  ld_ms = 1'b0; ld_ls = 1'b1;
    @(negedge clk); ld_ls = 1'b0; b_i = 16'($urandom); drive_ms = 1'b1;
    #1 check(c_oe, "C driven for MS half"); r[31:16] = c_o;
    @(negedge clk); drive_ms = 1'b0;
    #1 check(!c_oe && c_o === 16'd0, "C released between halves");
    // the address registers may be reloaded before the LS half goes out
    ld_ms = 1'b1; b_i = 16'($urandom);
    @(negedge clk); ld_ms = 1'b0; drive_ls = 1'b1;
    #1 check(c_oe, "C driven for LS half"); r[15:0] = c_o;
    @(negedge clk); drive_ls = 1'b0;
  endtask

  initial begin
    logic [31:0] b, r;
    real rb, rr, err;
    int n_recip = 0, n_rsqrt = 0;
    rst_n = 1'b0; {ld_ms, ld_ls, drive_ms, drive_ls} = '0; func = '0; b_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int fn;
      fn = i % 2;
      b  = {fn === 1 ? 1'b0 : 1'($urandom), 8'(100 + $urandom % 56), 23'($urandom)};
      if (i === 0) b = 32'h3f800000;                 // 1.0
      if (i === 1) b = 32'h40800000;                 // 4.0
      lookup(b, fn, r);
      check(r === seed(b, fn), $sformatf("seed fn%0d of %08h: got %08h expected %08h", fn, b, r, seed(b, fn)));
      rb = to_real(b);
      rr = to_real(r);
      err = (fn === 0) ? rr * rb - 1.0 : rr * rr * rb - 1.0;
      if (err < 0.0) err = -err;
      check(err < ((fn === 0) ? 0.0005 : 0.001), $sformatf("accuracy fn%0d of %08h: error %f", fn, b, err));
      if (fn === 0) n_recip++; else n_rsqrt++;
    end
    check(n_recip > 0 && n_rsqrt > 0, "both tables exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
