// tb_fpp3_control: loads, runs and scans the FPP3 micro engine.
//
// Acting as the PNC, the testbench loads 64 random microinstructions through
// LOAD MICROINSTRUCTION commands (five MAD words each, 19 cycles apart), ends
// loading, and starts the engine with BEGIN at random start addresses while
// the condition inputs change at random. A model of the sequencer (JZ, CJS,
// JMAP, CJP, CRTN, CONT, five-word stack) and of the control store predicts
// the next address, the microprogram counter and the pipeline register every
// cycle. Diagnostics: SCAN OUT must return the pipeline register without
// changing it, SCAN IN must replace it, SINGLE STEP must advance the engine
// by exactly one word, and commands on another MAD page must be ignored.
module tb_fpp3_control;
  localparam int N = 64;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [21:0] mad_i;
  logic        adrld;
  logic [7:1]  cond;
  logic [79:0] ctl;
  logic [11:0] upc, next_addr;
  logic [15:0] scan_o;
  logic        diag, boot, ctl_valid;
  int checks = 0, failures = 0;

  logic [79:0] img [N];
  logic [79:0] m_ctl;
  logic [11:0] m_upc, m_next;
  logic [11:0] m_stack [5];
  int          m_sp;
  int          n_instr [16];

  always #5 clk = ~clk;

  fpp3_control dut (.clk, .rst_n, .mad_i, .adrld, .cond, .ctl, .upc, .next_addr,
                    .scan_o, .diag, .boot, .ctl_valid);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (c !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one command address phase followed by data words at 3 + 19k
  task automatic command(input logic [3:0] code, input logic [11:0] arg,
                         input int nwords, input logic [79:0] data);
    @(negedge clk); adrld = 1'b1; mad_i = {6'b111110, code, arg};
    for (int t = 1; t < 3 + 19 * 5 + 2; t++) begin
      @(negedge clk); adrld = 1'b0; mad_i = 22'($urandom);
      if (mad_i[21:16] === 6'b111110) mad_i[21] = 1'b0;
      for (int k = 0; k < nwords; k++)
        if (t == 3 + 19 * k) mad_i[15:0] = data[79 - 16 * k -: 16];
      if (nwords == 0 && t > 20) break;
    end
  endtask

  function automatic logic [79:0] rnd_word(int a);
    logic [79:0] w;
    logic [3:0] ins [5] = '{4'd1, 4'd2, 4'd3, 4'd10, 4'd14};
    w = {$urandom, $urandom, $urandom};
    w[15:12] = ins[$urandom % 5];
    if (($urandom % 20) == 0) w[15:12] = 4'd0;
    if (($urandom % 3) != 0) w[15:12] = 4'd14;
    w[11:0]  = 12'(1 + $urandom % (N - 2));
    if (a == 0 || a == N - 1) w[15:12] = 4'd0;
    return w;
  endfunction

  // model: next address from the current pipeline word
  task automatic model_next(input logic take_map, input logic [11:0] map,
                            output logic [11:0] nx, output int act);
    logic [3:0] ins;
    logic cc;
    ins = m_ctl[15:12];
    cc = (m_ctl[18:16] == 0) ? 1'b1 : cond[m_ctl[18:16]];
    nx = m_upc; act = 0;
    if (take_map) nx = map;
    else if (ins == 0) begin nx = 0; act = 3; end
    else if (ins == 1 && cc) begin nx = m_ctl[11:0]; act = 1; end
    else if (ins == 2) nx = map;
    else if (ins == 3 && cc) nx = m_ctl[11:0];
    else if (ins == 10 && cc && m_sp > 0) begin nx = m_stack[m_sp - 1]; act = 2; end
  endtask

  task automatic run_cycles(input int n, input logic first_map, input logic [11:0] map);
    logic [11:0] nx;
    int act;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      adrld = 1'b0;
      cond = 7'($urandom);
      #1;
      model_next(first_map && i == 0, map, nx, act);
      check(next_addr === nx && upc === m_upc && ctl === m_ctl,
            $sformatf("run: next %h/%h upc %h/%h", next_addr, nx, upc, m_upc));
      n_instr[m_ctl[15:12]]++;
      if (act == 1 && m_sp < 5) begin m_stack[m_sp] = m_upc; m_sp++; end
      if (act == 2) m_sp--;
      if (act == 3) m_sp = 0;
      m_upc = nx + 1;
      m_ctl = img[nx];
    end
  endtask

  initial begin
    logic [79:0] w, got;
    logic [11:0] map, last_map;
    adrld = 1'b0; mad_i = '0; cond = '0; m_sp = 0; last_map = '0;
    foreach (n_instr[i]) n_instr[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(boot === 1'b1 && ctl === '0 && upc === '0 && ctl_valid === 1'b0, "after reset: boot mode, location 0, ctl not valid");
    // foreign page ignored
    @(negedge clk); adrld = 1'b1; mad_i = {6'b111111, 4'd1, 12'd0};
    @(negedge clk); adrld = 1'b0;
    check(boot === 1'b1, "command on another page ignored");
    // load the program
    for (int a = 0; a < N; a++) begin
      img[a] = rnd_word(a);
      command(4'd0, 12'd0, 5, img[a]);
      check(upc === 12'(a + 1), $sformatf("load %0d: address stepped", a));
    end
    for (int a = 0; a < N; a++) check(dut.wcs[a] === img[a], $sformatf("WCS word %0d", a));
    command(4'd1, 12'd0, 0, '0);     // END OF LOADING
    check(!boot && !diag && ctl === img[0] && upc === 12'd1 && ctl_valid === 1'b1, "end of loading: run mode, looping at 0");
    // the engine has been running on word 0 (JZ) since END OF LOADING
    m_ctl = img[0]; m_upc = 12'd1; m_sp = 0;
    run_cycles(3, 1'b0, 12'd0);
    for (int r = 0; r < 60; r++) begin
      map = 12'(1 + $urandom % (N - 2));
      @(negedge clk); adrld = 1'b1; mad_i = {6'b111110, 4'd2, map};
      // BEGIN is seen this cycle; engine still advances on the old word
      #1;
      begin
        logic [11:0] nx; int act;
        model_next(1'b0, last_map, nx, act);
        check(next_addr === nx, $sformatf("cycle of BEGIN: next %h/%h ins %0d sp %0d/%0d", next_addr, nx, ctl[15:12], dut.sp, m_sp));
        if (act == 1 && m_sp < 5) begin m_stack[m_sp] = m_upc; m_sp++; end
        if (act == 2) m_sp--;
        if (act == 3) m_sp = 0;
        m_upc = nx + 1; m_ctl = img[nx];
      end
      run_cycles(50, 1'b1, map);
      last_map = map;
    end
    // diagnostics
    command(4'd3, 12'd0, 0, '0);
    check(diag === 1'b1, "begin diagnostics");
    w = ctl;
    @(negedge clk);
    check(ctl === w, "engine stopped in diagnostic mode");
    for (int k = 0; k < 5; k++) begin
      command(4'd5, 12'd0, 0, '0);
      got[79 - 16 * k -: 16] = scan_o;
    end
    check(got === w && ctl === w, "scan out returns the pipeline register unchanged");
    w = {$urandom, $urandom, $urandom};
    w[15:12] = 4'd3; w[18:16] = 3'd0; w[11:0] = 12'd5;   // CJP always to 5
    for (int k = 0; k < 5; k++) command(4'd4, 12'd0, 1, {w[79 - 16 * k -: 16], 64'd0});
    check(ctl === w, "scan in replaces the pipeline register");
    command(4'd6, 12'd0, 0, '0);
    check(ctl === img[5] && upc === 12'd6, "single step runs one word");
    command(4'd7, 12'd0, 0, '0);
    check(!diag, "end diagnostics");
    check(n_instr[0] > 0 && n_instr[1] > 0 && n_instr[2] > 0 && n_instr[3] > 0 &&
          n_instr[10] > 0 && n_instr[14] > 0, "every sequencer instruction executed");
    $display("JZ %0d CJS %0d JMAP %0d CJP %0d CRTN %0d CONT %0d", n_instr[0], n_instr[1], n_instr[2], n_instr[3], n_instr[10], n_instr[14]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
