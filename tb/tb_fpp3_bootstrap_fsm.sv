// tb_fpp3_bootstrap_fsm: command decoding and strobe timing of the BSFSM.
//
// Sends every command in every mode (plus random foreign bus traffic) and
// compares all outputs cycle by cycle with a reference schedule written in
// the testbench: for LOAD MICROINSTRUCTION the input register load at
// 3 + 19k, sixteen shifts after it for each of five words and the control
// store write at cycle 96; for SCAN IN one load and sixteen shifts; for
// SCAN OUT sixteen rotating shifts; one-cycle clear, take_map and step
// pulses; mode changes only where the command is allowed.
module tb_fpp3_bootstrap_fsm;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [21:0] mad_i;
  logic        adrld;
  logic        in_ld, shift, rotate, wcs_we, clear, run, take_map, diag, boot;
  logic [11:0] map_addr;
  int checks = 0, failures = 0;
  int mode;   // 0 boot, 1 run, 2 diag
  int n_cmd [8];

  always #5 clk = ~clk;

  fpp3_bootstrap_fsm dut (.clk, .rst_n, .mad_i, .adrld, .in_ld, .shift, .rotate,
                          .wcs_we, .clear, .run, .take_map, .map_addr, .diag, .boot);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic e_in_ld, e_shift, e_rotate, e_we, e_clear,
                            e_run, e_map, input string what);
    checks++;
    if ({in_ld, shift, rotate, wcs_we, clear, run, take_map} !==
        {e_in_ld, e_shift, e_rotate, e_we, e_clear, e_run, e_map} ||
        diag !== (mode == 2) || boot !== (mode == 0)) begin
      failures++;
      $display("FAIL: %s: got %b expected %b mode %0d", what,
               {in_ld, shift, rotate, wcs_we, clear, run, take_map},
               {e_in_ld, e_shift, e_rotate, e_we, e_clear, e_run, e_map}, mode);
    end
  endtask

  task automatic command(input int code);
    logic [11:0] arg;
    int len, kind;   // kind: 0 none, 1 load, 2 scan in, 3 scan out
    arg = 12'($urandom);
    @(negedge clk); adrld = 1'b1; mad_i = {6'b111110, 4'(code), arg};
    #1 expect_out(0, 0, 0, 0, 0, mode == 1, 0, "command cycle");
    n_cmd[code]++;
    kind = 0; len = 1;
    case (code)
      0: if (mode == 0) begin kind = 1; len = 97; end
      4: if (mode == 2) begin kind = 2; len = 20; end
      5: if (mode == 2) begin kind = 3; len = 20; end
      default: ;
    endcase
    for (int t = 1; t <= len; t++) begin
      logic e_ld, e_sh, e_we;
      int c;
      @(negedge clk); adrld = 1'($urandom); mad_i = 22'($urandom);
      if (mad_i[21:16] === 6'b111110) mad_i[21] = 1'b0;
      #1;
      c = (t - 1) % 19;
      e_ld = (kind == 1 && t <= 95 && c == 2) || (kind == 2 && t == 3);
      e_sh = (kind == 1 && t <= 95 && c >= 3) || (kind >= 2 && t >= 4 && t <= 19);
      e_we = (kind == 1 && t == 96);
      if (t == 1) begin
        int old_mode;
        old_mode = mode;
        // one-cycle pulses and mode changes take effect here
        case (code)
          1: if (mode == 0) mode = 1;
          3: if (mode == 1) mode = 2;
          7: if (mode == 2) mode = 1;
          default: ;
        endcase
        expect_out(e_ld, e_sh, kind == 3, e_we,
                   code == 1 && old_mode == 0,
                   mode == 1 || (code == 6 && mode == 2),
                   code == 2 && old_mode == 1, $sformatf("cycle 1 of command %0d", code));
        if (code == 2 && old_mode == 1) begin
          checks++;
          if (map_addr !== arg) begin failures++; $display("FAIL: MAP address"); end
        end
      end else begin
        expect_out(e_ld, e_sh, kind == 3 && t <= 19, e_we, 0, mode == 1, 0,
                   $sformatf("cycle %0d of command %0d", t, code));
      end
    end
  endtask

  initial begin
    adrld = 1'b0; mad_i = '0; mode = 0;
    foreach (n_cmd[i]) n_cmd[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    // every command in boot mode, then run, then diag, in random order
    for (int i = 0; i < 300; i++) begin
      int code;
      code = $urandom % 8;
      if (i == 10) code = 1;            // make sure all modes are reached
      if (i == 20) code = 3;
      command(code);
      if (mode == 1 && ($urandom % 8) == 0) command(3);
      if (i == 150) begin               // back to boot mode through reset
        @(negedge clk); rst_n = 1'b0; mode = 0;
        @(negedge clk); rst_n = 1'b1;
      end
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (n_cmd[c] == 0) begin failures++; $display("FAIL: command %0d never sent", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
