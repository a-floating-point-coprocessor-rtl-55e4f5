// fpp3_dual_sram: the on-board operand memory of the FPP3 proposal, two
// identical 16K x 16 static RAMs used as one memory with two read ports.
//
// Every write goes to both copies, so they always hold the same contents and
// the micro engine can read two different operands in one cycle: copy A
// drives the A bus and copy B the B bus. Write data comes from the C bus,
// which carries both results of the arithmetic chips and data from the PNC.
// An address is the 8-bit segment number concatenated with a 6-bit offset
// from the microcode (256 segments of 64 words; segment 0 holds constants).
// The segment register is loaded from a multiplexer that selects constant 0,
// the MAD bus or the C bus, so both the PNC and the micro engine can select a
// segment. Reads are asynchronous, like the static RAMs; writes happen at the
// clock edge.
// From the document: two 16K x 16 copies written together, A/B bus read
// ports, C bus write data, {8-bit segment, 6-bit offset} addressing, the
// three segment sources. Own choices: the control signal names and encoding,
// read-before-write when a port reads the word being written, and only the
// 256 x 64 partition (the 64 x 256 alternative is not built).
module fpp3_dual_sram #(
  parameter int unsigned SEG_W  = 8,    // segment number bits
  parameter int unsigned OFF_W  = 6,    // offset bits from the microcode
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // segment register
  input  logic              ld_seg,
  input  logic [1:0]        seg_src,    // 0: constant 0, 1: MAD bus, 2: C bus
  input  logic [SEG_W-1:0]  mad_seg,
  // ports
  input  logic [OFF_W-1:0]  off_a,
  input  logic [OFF_W-1:0]  off_b,
  input  logic [OFF_W-1:0]  off_w,
  input  logic              we,
  input  logic [DATA_W-1:0] c_i,
  output logic [DATA_W-1:0] a_o,
  output logic [DATA_W-1:0] b_o,
  output logic [SEG_W-1:0]  seg
);

  localparam int unsigned WORDS = 1 << (SEG_W + OFF_W);

  logic [DATA_W-1:0] ram_a [WORDS];
  logic [DATA_W-1:0] ram_b [WORDS];

  logic [SEG_W-1:0] seg_next;

  always_comb begin
    unique case (seg_src)
      2'd1:    seg_next = mad_seg;
      2'd2:    seg_next = c_i[SEG_W-1:0];
      default: seg_next = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      seg <= '0;
    else if (ld_seg) seg <= seg_next;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      ram_a[{seg, off_w}] <= c_i;
      ram_b[{seg, off_w}] <= c_i;
    end
  end

  assign a_o = ram_a[{seg, off_a}];
  assign b_o = ram_b[{seg, off_b}];

endmodule
