// spmv_top: sparse matrix-vector multiplier y = A*x with partial vector
// duplication, for a 512-bit off-chip memory interface.
//
// The matrix is preprocessed into blocks of BLOCK_W columns, and each block
// into batches of BATCH_H rows; non-zeros are in COO form, four per stream
// word. For each block the decoder loads the block's vector segment into the
// read-conflict-free vector buffer, then streams the block's batches into the
// matrix FIFOs. Each cycle the issue logic pops one beat (four non-zeros), as
// long as the accumulator bank of its batch has been loaded, and sends the
// four column indices to the vector buffer. Two cycles later the four PEs get
// their vector elements and multiply; the writing-conflict-free adder tree
// merges products of equal rows; the accumulators add the four conflict-free
// results into the bank of the batch. Finished batches are stored in the psum
// buffer, and the next block's batches start from those stored sums. A read-out
// command streams the final y.
//
// Interface: in_valid/in_ready/in_data is the stream read from off-chip
// memory (format in decoder.sv); out_valid/out_data carries result words of
// eight doubles (no back-pressure); idle is high when all work has drained;
// stall and merge flag, cycle by cycle, a beat held back because its
// partial sums are not loaded yet and a write conflict resolved by the tree.
// Pipeline from a popped beat to its accumulation: 2 (vector buffer) +
// MUL_LAT (PE) + 2*ADD_LAT+2 (adder tree) cycles = 30 by default.
//
// The block structure (decoder, vector buffer with two sub-buffers of four
// BRAMs, four matrix FIFOs, four PEs, adder tree with crossbar, accumulators
// with rotating register sets, psum buffer) and the defaults BLOCK_W = 2^14,
// BATCH_H = 64 follow the published design. The stream format, the FIFO
// depth, the multiplier latency and the psum buffer size are this design's.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int unsigned BLOCK_W    = 16384,
  parameter int unsigned BATCH_H    = 64,
  parameter int unsigned ROWS       = 393216,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned MUL_LAT    = 6,
  parameter int unsigned ADD_LAT    = 10,
  localparam int unsigned CW        = $clog2(BLOCK_W),
  localparam int unsigned WAW       = CW - 3,
  localparam int unsigned PAW       = $clog2(ROWS / VEC_PER_WORD),
  localparam int unsigned VB_LAT    = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [MEM_W-1:0] in_data,
  output logic             out_valid,
  output logic [MEM_W-1:0] out_data,
  output logic             idle,
  output logic             stall,     // a beat waits for its accumulator bank to be loaded
  output logic             merge      // products of one row met in the adder tree this cycle
);

  // ---------------- decoder ----------------
  logic                 vb_load_en;
  logic [WAW-1:0]       vb_load_addr;
  logic [MEM_W-1:0]     vb_load_data;
  logic                 mb_push, mb_full, mb_pop, mb_empty;
  coo_t [LANES-1:0]     mb_din, mb_dout;
  tag_t                 mb_tag, mb_dout_tag;
  logic                 open_valid, open_zero, all_free, wb_start, wb_busy;
  logic [BANK_W-1:0]    open_bank;
  logic [IW-1:0]        open_base, wb_words;
  logic [NBANK-1:0]     bank_free, bank_ready;
  logic [PAW-1:0]       wb_addr;
  logic                 pipe_idle, at_header;

  assign pipe_idle = mb_empty;

  decoder #(.BLOCK_W(BLOCK_W), .ROWS(ROWS)) u_decoder (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .vb_load_en, .vb_load_addr, .vb_load_data, .pipe_idle,
    .mb_push, .mb_din, .mb_tag, .mb_full,
    .open_valid, .open_bank, .open_base, .open_zero, .bank_free, .all_free,
    .wb_start, .wb_addr, .wb_words, .wb_busy, .at_header
  );

  // ---------------- matrix buffer ----------------
  matrix_buffer #(.DEPTH(FIFO_DEPTH), .TW(TAG_W)) u_mbuf (
    .clk, .rst_n,
    .push(mb_push), .din(mb_din), .din_tag(mb_tag), .full(mb_full),
    .pop(mb_pop), .dout(mb_dout), .dout_tag(mb_dout_tag), .empty(mb_empty)
  );

  // ---------------- issue: one beat per cycle while its bank is ready ------
  logic                 issue_stall;   // a beat waits for its bank (LDP not done)
  assign mb_pop      = !mb_empty && bank_ready[mb_dout_tag.bank];
  assign issue_stall = !mb_empty && !bank_ready[mb_dout_tag.bank];

  logic [LANES-1:0][CW-1:0] rd_col;
  fp64_t [LANES-1:0]        rd_x;
  for (genvar q = 0; q < LANES; q++) begin : g_col
    assign rd_col[q] = mb_dout[q].col[CW-1:0];
  end

  vector_buffer #(.BLOCK_W(BLOCK_W)) u_vbuf (
    .clk,
    .load_en(vb_load_en), .load_addr(vb_load_addr), .load_data(vb_load_data),
    .rd_col, .rd_data(rd_x)
  );

  // element value, row and valid wait for the vector element
  tag_t  tag_issue, tag_pe;
  logic [LANES-1:0] lane_valid;
  for (genvar q = 0; q < LANES; q++) begin : g_valid
    assign lane_valid[q] = mb_pop && (mb_dout[q].col != PAD_COL);
  end
  always_comb begin
    tag_issue      = mb_dout_tag;
    tag_issue.beat = mb_pop;
    tag_issue.last = mb_pop && mb_dout_tag.last;
  end

  prod_t [LANES-1:0] prod;
  for (genvar q = 0; q < LANES; q++) begin : g_pe
    logic [IW:0] vr_d;
    fp64_t       val_d;
    pipe_delay #(.W(IW+1), .LAT(VB_LAT)) u_dvr (
      .clk, .rst_n, .d({lane_valid[q], mb_dout[q].row}), .q(vr_d)
    );
    pipe_delay #(.W(DW), .LAT(VB_LAT)) u_dval (
      .clk, .rst_n, .d(mb_dout[q].val), .q(val_d)
    );
    pe #(.MUL_LAT(MUL_LAT)) u_pe (
      .clk, .rst_n,
      .in_valid(vr_d[IW]), .in_row(vr_d[IW-1:0]), .in_val(val_d), .in_x(rd_x[q]),
      .out(prod[q])
    );
  end
  pipe_delay #(.W(TAG_W), .LAT(VB_LAT + MUL_LAT)) u_dtag (
    .clk, .rst_n, .d(tag_issue), .q(tag_pe)
  );

  // ---------------- writing-conflict-free adder tree ----------------
  prod_t [LANES-1:0] cf;
  tag_t              tag_cf;
  logic              conflict;
  adder_tree #(.ADD_LAT(ADD_LAT), .TW(TAG_W)) u_tree (
    .clk, .rst_n, .in(prod), .in_tag(tag_pe), .out(cf), .out_tag(tag_cf), .conflict
  );

  // ---------------- accumulators and psum buffer ----------------
  logic             ps_we, ps_re;
  logic [PAW-1:0]   ps_waddr, ps_raddr;
  logic [MEM_W-1:0] ps_wdata, ps_rdata;

  accumulator #(.BATCH_H(BATCH_H), .ROWS(ROWS)) u_acc (
    .clk, .rst_n,
    .open_valid, .open_bank, .open_base, .open_zero,
    .bank_free, .bank_ready, .all_free,
    .in(cf), .in_tag(tag_cf),
    .ps_we, .ps_waddr, .ps_wdata, .ps_re, .ps_raddr, .ps_rdata,
    .wb_start, .wb_addr, .wb_words, .wb_busy,
    .out_valid, .out_data
  );

  psum_buffer #(.ROWS(ROWS)) u_psum (
    .clk,
    .we(ps_we), .waddr(ps_waddr), .wdata(ps_wdata),
    .re(ps_re), .raddr(ps_raddr), .rdata(ps_rdata)
  );

  assign idle  = at_header && mb_empty && all_free;
  assign stall = issue_stall;
  assign merge = conflict;

endmodule
