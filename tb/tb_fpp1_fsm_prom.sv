// tb_fpp1_fsm_prom: checks every word of the FSM PROM against a reference
// program built here from the microword's bit positions (bit 5 LD_A*, bit 4
// LD_B*, ... bit 18 LD_F*, bits 19-26 next address), and spot-checks words
// against values printed with the original microcode listing.
module tb_fpp1_fsm_prom;
  logic [8:0]  addr;
  logic [27:0] data;
  int checks = 0, failures = 0;

  fpp1_fsm_prom dut (.addr (addr), .data (data));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [27:0] IDLE = 28'h007d13f;  // all strobes high, U1s high, F=1111

  function automatic logic [27:0] clr(logic [27:0] w, int b);
    w[b] = 1'b0; return w;
  endfunction
  function automatic logic [27:0] setf(logic [27:0] w, logic [3:0] f);
    w[17:14] = f; return w;
  endfunction
  function automatic logic [27:0] nxt(logic [27:0] w, int n);
    w[26:19] = 8'(n); return w;
  endfunction

  logic [27:0] ref_m [512];

  task automatic build_tail(int base, bit mul, bit single, int nwait);
    int k;
    int lb;   // bit of L1 (L0 is lb+1), U1 at lb+2, U0 at lb+3
    logic [27:0] w;
    lb = mul ? 6 : 10;
    k = 0;
    w = clr(IDLE, 18); if (!single) w = clr(w, 4); w[lb] = 1; w[lb+1] = 1;
    ref_m[base+k] = nxt(w, base+k+1); k++;
    w = clr(IDLE, 5); if (!single) w = clr(w, 4);
    if (single) w[lb] = 1; else w[lb+1] = 1;
    ref_m[base+k] = nxt(w, base+k+1); k++;
    w = IDLE; if (single) w[lb] = 1; else w[lb+1] = 1;
    ref_m[base+k] = nxt(w, base+k+1); k++;
    repeat (nwait) begin ref_m[base+k] = nxt(IDLE, base+k+1); k++; end
    w = clr(IDLE, lb+2);                       ref_m[base+k] = nxt(w, base+k+1); k++;
    w = clr(IDLE, lb+2); w[lb+3] = 1; w = clr(w, 1); ref_m[base+k] = nxt(w, base+k+1); k++;
    ref_m[base+k] = nxt(clr(IDLE, 3), base+k+1); k++;
    ref_m[base+k] = nxt(clr(clr(IDLE, 3), 2), base+k+1); k++;
    ref_m[base+k] = nxt(clr(IDLE, 2), base+k+1); k++;
    ref_m[base+k] = nxt(clr(clr(IDLE, 3), 2), 0);
  endtask

  task automatic build_entry(int e, logic [3:0] f, int tail);
    ref_m[e]   = nxt(clr(IDLE, 5), e+1);
    ref_m[e+1] = nxt(clr(IDLE, 5), e+2);
    ref_m[e+2] = nxt(setf(clr(IDLE, 18), 4'd8), e+3);
    ref_m[e+3] = nxt(setf(clr(IDLE, 18), f), tail);
  endtask

  initial begin
    for (int i = 0; i < 512; i++) ref_m[i] = IDLE;
    build_entry(8'h04, 4, 8'h50); build_entry(8'h08, 5, 8'h50); build_entry(8'h0c, 6, 8'h50);
    build_entry(8'h10, 0, 8'h90); build_entry(8'h14, 1, 8'h90); build_entry(8'h18, 2, 8'h90);
    build_entry(8'h1c, 3, 8'h90); build_entry(8'h20, 7, 8'h50); build_entry(8'h24, 9, 8'h50);
    build_entry(8'h28, 8, 8'h50); build_entry(8'h2c, 0, 8'h70); build_entry(8'h30, 1, 8'h70);
    build_entry(8'h34, 2, 8'h70); build_entry(8'h38, 3, 8'h70);
    build_tail(8'h50, 0, 0, 6);
    build_tail(8'h70, 1, 0, 7);
    build_tail(8'h90, 0, 1, 7);
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i);
      #1;
      checks++;
      if (data !== ref_m[i]) begin
        failures++;
        $display("FAIL: PROM[%03h] = %07h, expected %07h", i, data, ref_m[i]);
      end
    end
    // words as printed with the original listing (A+B entry block, first tail words)
    begin
      logic [27:0] printed [6] = '{28'h02fd11f, 28'h037d11f, 28'h03a113f, 28'h281113f,
                                   28'h28bdd2f, 28'h297d90f};
      int          at      [6] = '{4, 5, 6, 7, 8'h50, 8'h51};
      for (int i = 0; i < 6; i++) begin
        addr = 9'(at[i]); #1;
        checks++;
        if (data !== printed[i]) begin
          failures++;
          $display("FAIL: PROM[%03h] = %07h, printed %07h", at[i], data, printed[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
