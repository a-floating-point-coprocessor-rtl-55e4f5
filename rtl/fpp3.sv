// fpp3: the FPP3 board - micro engine, dual-port operand memory, table ROM
// unit and the bus paths that join them to the WEITEK chips and the MAD bus.
//
// Function: the 80-bit pipeline register of fpp3_control drives every part
// of the board. The PNC loads the microcode, starts routines with BEGIN and
// exchanges data through MAD while a routine runs (see fpp3_bootstrap_fsm).
// Buses: A carries the memory's A port; B carries the memory's B port or,
// through the bypass, the C bus; C carries one of the WEITEK result, the
// table ROM output, the MAD input or the A bus. C is written into the
// memory, can be put on MAD, and can supply the memory segment number.
// Microword fields (bit positions):
//   18..0   control unit (see fpp3_control)
//   20..19  1032 L code      22..21  1032 unload: {enable, LS half}
//   24..23  1033 L code      26..25  1033 unload: {enable, LS half}
//   30..27  F code to both chips                   35..31  unused
//   36 ld_ms  37 ld_ls  41..38 table function  42 drive_ms  43 drive_ls
//   50..44  unused
//   56..51  A offset   62..57  B offset   68..63  write offset  69 write
//   70 load segment    72..71  segment source (0 const 0, 1 MAD, 2 C)
//   74..73  C source (0 WEITEK, 1 table ROM, 2 MAD, 3 A bus)
//   75 B from C (bypass)   76 drive MAD from C   79..77 unused
// The WEITEK unload enables are active high in the microword so that the
// all-zero word (JZ, the reset state) leaves the chips' outputs off.
// While the bootstrap machine is loading microcode or shifting the scan
// chain, the board sees an all-zero microword, so no strobe is active.
// Timing: all paths between registers are combinational within one cycle;
// the memory, the table ROM registers and the pipeline register change at
// the rising edge.
// From the document: the four parts, the A/B/C buses and their paths (A to
// C towards MAD, C to B bypass), the segment sources, the field boundaries
// 0-18, 19-35, 36-50, 51-76 of Figure 4.6, and WEITEK status as condition
// input. Own choices: every bit position inside the fields, the C-bus
// source list, and which status bits feed the sequencer conditions (the
// condition PLA and comparators are not built).
module fpp3 (
  input  logic        clk,
  input  logic        rst_n,
  // MAD bus
  input  logic [21:0] mad_i,
  input  logic        adrld,
  output logic [15:0] mad_o,
  output logic        mad_oe,
  // WEITEK chip pins
  output logic [15:0] wtc_a,
  output logic [15:0] wtc_b,
  output logic [3:0]  wtc_f,
  output logic [1:0]  mul_l,
  output logic [1:0]  mul_u,
  output logic [1:0]  alu_l,
  output logic [1:0]  alu_u,
  input  logic [15:0] wtc_c,
  input  logic [2:0]  wtc_s,
  // engine state
  output logic [11:0] upc,
  output logic [11:0] next_addr,
  output logic [7:0]  seg,
  output logic [15:0] scan_o,
  output logic        diag,
  output logic        boot
);

  logic [79:0] ctl_raw, ctl;
  logic        ctl_valid;
  logic [15:0] a_bus, b_bus, c_bus, sram_b, tbl_c;
  logic        tbl_c_oe;

  fpp3_control u_control (
    .clk, .rst_n, .mad_i, .adrld,
    .cond      ({4'd0, wtc_s}),
    .ctl       (ctl_raw),
    .upc       (upc),
    .next_addr (next_addr),
    .scan_o    (scan_o),
    .diag      (diag),
    .boot      (boot),
    .ctl_valid (ctl_valid)
  );

  // while microcode is loaded or scanned, every strobe on the board is off
  assign ctl = ctl_valid ? ctl_raw : '0;

  // ---------------------------------------------------------- function unit
  assign mul_l = ctl[20:19];
  assign mul_u = {~ctl[22], ctl[21]};
  assign alu_l = ctl[24:23];
  assign alu_u = {~ctl[26], ctl[25]};
  assign wtc_f = ctl[30:27];
  assign wtc_a = a_bus;
  assign wtc_b = b_bus;

  // ----------------------------------------------------------- table ROM
  fpp_table_rom u_table_rom (
    .clk      (clk),
    .rst_n    (rst_n),
    .b_i      (b_bus),
    .ld_ms    (ctl[36]),
    .ld_ls    (ctl[37]),
    .func     (ctl[41:38]),
    .drive_ms (ctl[42]),
    .drive_ls (ctl[43]),
    .c_o      (tbl_c),
    .c_oe     (tbl_c_oe)
  );

  // ------------------------------------------- bus interface and memory
  fpp3_dual_sram u_sram (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_seg   (ctl[70]),
    .seg_src  (ctl[72:71]),
    .mad_seg  (mad_i[7:0]),
    .off_a    (ctl[56:51]),
    .off_b    (ctl[62:57]),
    .off_w    (ctl[68:63]),
    .we       (ctl[69]),
    .c_i      (c_bus),
    .a_o      (a_bus),
    .b_o      (sram_b),
    .seg      (seg)
  );

  always_comb begin
    unique case (ctl[74:73])
      2'd0: c_bus = wtc_c;
      2'd1: c_bus = tbl_c_oe ? tbl_c : '0;
      2'd2: c_bus = mad_i[15:0];
      2'd3: c_bus = a_bus;
    endcase
  end

  assign b_bus  = ctl[75] ? c_bus : sram_b;
  assign mad_o  = c_bus;
  assign mad_oe = ctl[76];

endmodule
