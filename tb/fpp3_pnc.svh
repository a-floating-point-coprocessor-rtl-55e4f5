// fpp3_pnc.svh: microcode and processor-node-controller tasks for testing the
// FPP3 board; included inside a testbench module that declares clk, check(),
// f3_mad_i, f3_adrld, f3_mad_o, f3_mad_oe and f3_boot.
//
// The microcode is built here, field by field, in the layout fpp3 defines:
//   0x000         JZ (the engine idles at location 0)
//   STORE  0x040  segment number from MAD, then A (offsets 0,1) and B (2,3)
//   CONST  0x048  segment number from MAD, then 0.5, 2.0, 3.0 at 56..61
//   READ   0x050  segment number from MAD, then Q (12,13) and S (28,29) out
//   DIV    0x060  Q = A / B = A * H1, H1 = H * (2 - B*H), H = seed(1/B)
//   SQRT   0x0a0  S = A * H1, H1 = 0.5 * H * (3 - A*H*H), H = seed(1/sqrt A);
//                 A reaches the table through the C-to-B bypass
// The PNC drives data on MAD (or samples it) from the second cycle after its
// BEGIN command, one word per cycle, in step with the routine.

localparam int unsigned UC_WORDS = 256;
localparam int unsigned R_STORE = 'h40, R_CONST = 'h48, R_READ = 'h50,
                        R_DIV = 'h60, R_SQRT = 'ha0;
localparam int unsigned MUL_LAT = 7, ALU_LAT = 6;

logic [79:0] uc [UC_WORDS];
int          div_cycles, sqrt_cycles;

function automatic logic [79:0] cont_word();
  logic [79:0] w;
  w = '0;
  w[15:12] = 4'd14;
  return w;
endfunction

// routine of length n at base: CONT words ending in a JZ
task automatic uc_routine(input int base, input int n);
  for (int i = 0; i < n - 1; i++) uc[base + i] = cont_word();
  uc[base + n - 1] = '0;
endtask

task automatic uc_write(input int a, input int csrc, input int ow);
  uc[a][74:73] = 2'(csrc);
  uc[a][69]    = 1'b1;
  uc[a][68:63] = 6'(ow);
endtask

task automatic uc_segment_from_mad(input int a);
  uc[a][70]    = 1'b1;
  uc[a][72:71] = 2'd1;
endtask

// one WEITEK operation: result of (oa) op (ob) written to ow; returns next k
task automatic uc_wtc(input int base, inout int k, input bit is_mul,
                      input logic [3:0] f, input int oa, input int ob, input int ow);
  int j;
  for (int h = 0; h < 2; h++) begin
    if (is_mul) uc[base + k + h][20:19] = 2'b01; else uc[base + k + h][24:23] = 2'b01;
    uc[base + k + h][56:51] = 6'(oa + h);
    uc[base + k + h][62:57] = 6'(ob + h);
  end
  uc[base + k + 1][30:27] = f;
  j = k + 1 + (is_mul ? MUL_LAT : ALU_LAT);
  for (int h = 0; h < 2; h++) begin
    if (is_mul) uc[base + j + h][22:21] = {1'b1, 1'(h)};
    else        uc[base + j + h][26:25] = {1'b1, 1'(h)};
    uc_write(base + j + 2 + h, 0, ow + h);
  end
  k = j + 4;
endtask

// table look-up of the word at ob, seed written to ow; returns next k.
// With via_a the operand is read on the A port and reaches the B bus
// through the C bus and the C-to-B bypass.
task automatic uc_seed(input int base, inout int k, input int fn, input int ob, input int ow,
                       input bit via_a);
  for (int h = 0; h < 2; h++)
    if (via_a) begin
      uc[base + k + h][56:51] = 6'(ob + h);
      uc[base + k + h][74:73] = 2'd3;
      uc[base + k + h][75]    = 1'b1;
    end
  uc[base + k][62:57]     = 6'(ob);
  uc[base + k][36]        = 1'b1;
  uc[base + k][41:38]     = 4'(fn);
  uc[base + k + 1][62:57] = 6'(ob + 1);
  uc[base + k + 1][37]    = 1'b1;
  uc[base + k + 1][41:38] = 4'(fn);
  uc[base + k + 2][41:38] = 4'(fn);
  uc[base + k + 3][41:38] = 4'(fn);
  uc[base + k + 2][42]    = 1'b1;
  uc_write(base + k + 2, 1, ow);
  uc[base + k + 3][43]    = 1'b1;
  uc_write(base + k + 3, 1, ow + 1);
  k += 4;
endtask

task automatic build_ucode();
  int k;
  foreach (uc[i]) uc[i] = '0;
  // STORE: segment, then four words
  uc_routine(R_STORE, 6);
  uc_segment_from_mad(R_STORE);
  for (int i = 0; i < 4; i++) uc_write(R_STORE + 1 + i, 2, i);
  // CONST: segment, then six words
  uc_routine(R_CONST, 8);
  uc_segment_from_mad(R_CONST);
  for (int i = 0; i < 6; i++) uc_write(R_CONST + 1 + i, 2, 56 + i);
  // READ: segment, then Q and S through the A bus onto MAD
  uc_routine(R_READ, 6);
  uc_segment_from_mad(R_READ);
  for (int i = 0; i < 4; i++) begin
    uc[R_READ + 1 + i][56:51] = 6'((i < 2) ? 12 + i : 28 + i - 2);
    uc[R_READ + 1 + i][74:73] = 2'd3;
    uc[R_READ + 1 + i][76]    = 1'b1;
  end
  // DIV
  k = 0;
  uc_routine(R_DIV, 64);
  uc_seed(R_DIV, k, 0, 2, 4, 0);                  // H
  uc_wtc (R_DIV, k, 1'b1, 4'd0, 2, 4, 6);        // B*H
  uc_wtc (R_DIV, k, 1'b0, 4'd5, 58, 6, 8);       // 2 - B*H
  uc_wtc (R_DIV, k, 1'b1, 4'd0, 4, 8, 10);       // H1
  uc_wtc (R_DIV, k, 1'b1, 4'd0, 0, 10, 12);      // Q
  uc_routine(R_DIV + k, 1);
  div_cycles = k + 1;
  // SQRT
  k = 0;
  uc_routine(R_SQRT, 96);
  uc_seed(R_SQRT, k, 1, 0, 14, 1);                // H
  uc_wtc (R_SQRT, k, 1'b1, 4'd0, 14, 14, 16);    // H*H
  uc_wtc (R_SQRT, k, 1'b1, 4'd0, 0, 16, 18);     // A*H*H
  uc_wtc (R_SQRT, k, 1'b0, 4'd5, 60, 18, 22);    // 3 - A*H*H
  uc_wtc (R_SQRT, k, 1'b1, 4'd0, 14, 22, 24);    // H*(...)
  uc_wtc (R_SQRT, k, 1'b1, 4'd0, 56, 24, 26);    // H1 = 0.5*H*(...)
  uc_wtc (R_SQRT, k, 1'b1, 4'd0, 0, 26, 28);     // S
  uc_routine(R_SQRT + k, 1);
  sqrt_cycles = k + 1;
endtask

// ------------------------------------------------------------ PNC side
function automatic logic [21:0] f3_junk();
  logic [21:0] v;
  v = 22'($urandom);
  if (v[21:16] == 6'b111110) v[21] = 1'b0;
  return v;
endfunction

// a command address phase followed by quiet cycles
task automatic f3_command(input logic [3:0] code, input logic [11:0] arg, input int quiet);
  @(negedge clk); f3_adrld = 1'b1; f3_mad_i = {6'b111110, code, arg};
  repeat (quiet) begin @(negedge clk); f3_adrld = 1'b0; f3_mad_i = f3_junk(); end
endtask

// LOAD MICROINSTRUCTION: five words, one every 19 cycles from cycle 3
task automatic f3_load_word(input logic [79:0] w);
  @(negedge clk); f3_adrld = 1'b1; f3_mad_i = {6'b111110, 4'd0, 12'd0};
  for (int t = 1; t <= 97; t++) begin
    @(negedge clk); f3_adrld = 1'b0; f3_mad_i = f3_junk();
    for (int k = 0; k < 5; k++)
      if (t == 3 + 19 * k) f3_mad_i[15:0] = w[79 - 16 * k -: 16];
  end
endtask

task automatic f3_boot_load();
  check(f3_boot === 1'b1, "FPP3 in boot mode after reset");
  for (int a = 0; a < UC_WORDS; a++) f3_load_word(uc[a]);
  f3_command(4'd1, 12'd0, 2);               // END OF LOADING
  check(f3_boot === 1'b0, "FPP3 running after END OF LOADING");
endtask

// BEGIN a routine; words in data[] go on MAD from cycle 2, one per cycle;
// MAD output sampled in the same cycles into got[]
task automatic f3_call(input int map, input int n, input logic [15:0] data [8],
                       output logic [15:0] got [8], output logic [7:0] oe);
  @(negedge clk); f3_adrld = 1'b1; f3_mad_i = {6'b111110, 4'd2, 12'(map)};
  @(negedge clk); f3_adrld = 1'b0; f3_mad_i = f3_junk();
  oe = '0;
  for (int t = 0; t < 8; t++) begin
    @(negedge clk); f3_mad_i = f3_junk();
    if (t < n) f3_mad_i[15:0] = data[t];
    #1 got[t] = f3_mad_o; oe[t] = f3_mad_oe;
  end
endtask

task automatic f3_wait(input int n);
  repeat (n) begin @(negedge clk); f3_adrld = 1'($urandom); f3_mad_i = f3_junk(); end
  f3_adrld = 1'b0;
endtask
