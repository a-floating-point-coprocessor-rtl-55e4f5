// tb_fpp3_dual_sram: random writes and two-port reads in random segments,
// checked against a reference memory; both read ports must always see the
// same contents, and every segment source (constant 0, MAD, C) is used.
module tb_fpp3_dual_sram;
  logic clk = 1'b0, rst_n;
  logic        ld_seg, we;
  logic [1:0]  seg_src;
  logic [7:0]  mad_seg, seg;
  logic [5:0]  off_a, off_b, off_w;
  logic [15:0] c_i, a_o, b_o;
  logic [15:0] ref_mem [logic [13:0]];
  logic [7:0]  ref_seg;
  int checks = 0, failures = 0;
  int n_src [3] = '{0, 0, 0};
  always #5 clk = ~clk;

  fpp3_dual_sram dut (.clk (clk), .rst_n (rst_n), .ld_seg (ld_seg), .seg_src (seg_src),
    .mad_seg (mad_seg), .off_a (off_a), .off_b (off_b), .off_w (off_w), .we (we), .c_i (c_i),
    .a_o (a_o), .b_o (b_o), .seg (seg));

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

  initial begin
    rst_n = 1'b0; ld_seg = 1'b0; we = 1'b0; seg_src = '0; mad_seg = '0;
    off_a = '0; off_b = '0; off_w = '0; c_i = '0; ref_seg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(seg === 8'd0, "segment 0 after reset");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // reads of the current state
      off_a = 6'($urandom); off_b = 6'($urandom);
      #1;
      if (ref_mem.exists({ref_seg, off_a})) check(a_o === ref_mem[{ref_seg, off_a}], "A port read");
      if (ref_mem.exists({ref_seg, off_b})) check(b_o === ref_mem[{ref_seg, off_b}], "B port read");
      if (off_a === off_b && ref_mem.exists({ref_seg, off_a})) check(a_o === b_o, "both copies hold the same word");
      // next operation: write, segment change, or both
      we     = ($urandom % 2 === 0);
      off_w  = 6'($urandom);
      c_i    = 16'($urandom);
      ld_seg = ($urandom % 8 === 0);
      seg_src = 2'($urandom % 3);
      mad_seg = 8'($urandom % 4);                 // keep to a few segments so reads hit
      if (seg_src === 2'd2) c_i[7:0] = 8'($urandom % 4);
      if (we) ref_mem[{ref_seg, off_w}] = c_i;
      if (ld_seg) begin
        n_src[seg_src]++;
        ref_seg = (seg_src === 2'd1) ? mad_seg : (seg_src === 2'd2) ? c_i[7:0] : 8'd0;
      end
      @(posedge clk); #1;
      check(seg === ref_seg, "segment register");
    end
    check(n_src[0] > 0 && n_src[1] > 0 && n_src[2] > 0, "all segment sources used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
