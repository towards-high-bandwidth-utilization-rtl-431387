// spmv_pkg: types and constants shared by the SpMV accelerator.
//
// The accelerator reads a 512-bit off-chip stream. One COO non-zero is 128
// bits: a 64-bit IEEE-754 double value, a 32-bit column index and a 32-bit
// row index, so one stream word carries four non-zeros (one per PE) or eight
// vector elements. The field order inside a word and the command header
// layout below are this design's own choice; the 64/32/32-bit split and the
// four-per-word packing follow the published design.
package spmv_pkg;

  localparam int unsigned MEM_W        = 512;        // off-chip data width
  localparam int unsigned DW           = 64;         // double precision
  localparam int unsigned IW           = 32;         // row / column index width
  localparam int unsigned LANES        = 4;          // PEs, matrix FIFOs, adder-tree inputs
  localparam int unsigned VEC_PER_WORD = MEM_W / DW; // 8 vector elements per word

  typedef logic [DW-1:0] fp64_t;

  // One COO non-zero as packed in a stream word (element e at bits 128e+127:128e).
  typedef struct packed {
    logic [IW-1:0] row;
    logic [IW-1:0] col;
    fp64_t         val;
  } coo_t;

  // Padding element: column index all ones. It produces no product.
  localparam logic [IW-1:0] PAD_COL = '1;

  // A product (or partial sum) travelling to the accumulators.
  typedef struct packed {
    logic          valid;
    logic [IW-1:0] row;
    fp64_t         val;
  } prod_t;

  // Command opcodes in bits [511:504] of a header word.
  typedef enum logic [7:0] {
    OP_NOP = 8'h00,  // ignored
    OP_LDV = 8'h01,  // load vector segment: [31:0] number of words that follow
    OP_LDM = 8'h02,  // load one batch:  [31:0] words, [63:32] first row, [64] first block
    OP_WB  = 8'h03   // write results back: [31:0] words, [63:32] first row
  } op_e;

  localparam int unsigned OP_LSB = MEM_W - 8;

  // Accumulator register banks (three, rotated batch by batch).
  localparam int unsigned NBANK  = 3;
  localparam int unsigned BANK_W = 2;

  // Side-band tag of one beat (four non-zeros issued in the same cycle).
  typedef struct packed {
    logic              beat;  // a beat is present
    logic              last;  // last beat of its batch
    logic [BANK_W-1:0] bank;  // accumulator bank of its batch
  } tag_t;
  localparam int unsigned TAG_W = $bits(tag_t);

endpackage
