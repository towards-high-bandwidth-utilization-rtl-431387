// accumulator: batch accumulators with load (LDP) and store (STP) of partial
// sums, and the read-out of results.
//
// A batch covers BATCH_H consecutive rows. Its partial sums live in one of
// NBANK = 3 register banks of BATCH_H doubles; the banks rotate, so one bank
// can be loaded (LDP) for the next batch and another stored (STP) for the
// previous batch while the current batch accumulates, as in the published
// execution timeline. Four adders, one per adder-tree output, add the four
// conflict-free products of a beat into the registers of their rows in the
// same cycle (the tree guarantees the rows differ). These adders are
// combinational (LAT 0) so a row can be updated in consecutive cycles; that
// is this design's choice, the document shows only an adder feeding a
// register that feeds back.
//
// Bank life cycle: FREE -> (open) LOAD_WAIT -> LOADING -> READY -> (last beat
// applied) DONE -> STORING -> FREE. An open with zero_init clears the bank in
// one cycle (first block of the matrix); otherwise the bank is loaded from the
// psum buffer, BATCH_H/8 words, one per cycle, as soon as no older bank with
// the same first row still has to be stored. Banks are loaded and stored in the
// order they were opened. The issue logic may send beats of a batch only
// while its bank is READY (bank_ready).
//
// Read-out: wb_start with a word address and a word count streams that many
// 512-bit words (8 rows each) from the psum buffer on out_valid/out_data, one
// per cycle, one cycle after each read. wb_busy is high meanwhile; the caller
// starts it only when all banks are FREE.
module accumulator
  import spmv_pkg::*;
#(
  parameter int unsigned BATCH_H = 64,
  parameter int unsigned ROWS    = 393216,
  localparam int unsigned LW     = $clog2(BATCH_H),
  localparam int unsigned WPB    = BATCH_H / VEC_PER_WORD,     // psum words per batch
  localparam int unsigned WCW    = (WPB > 1) ? $clog2(WPB) : 1,
  localparam int unsigned PAW    = $clog2(ROWS / VEC_PER_WORD)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // open a bank for a new batch
  input  logic                  open_valid,
  input  logic [BANK_W-1:0]     open_bank,
  input  logic [IW-1:0]         open_base,
  input  logic                  open_zero,
  output logic [NBANK-1:0]      bank_free,
  output logic [NBANK-1:0]      bank_ready,
  output logic                  all_free,
  // conflict-free products from the adder tree
  input  prod_t [LANES-1:0]     in,
  input  tag_t                  in_tag,
  // psum buffer
  output logic                  ps_we,
  output logic [PAW-1:0]        ps_waddr,
  output logic [MEM_W-1:0]      ps_wdata,
  output logic                  ps_re,
  output logic [PAW-1:0]        ps_raddr,
  input  logic [MEM_W-1:0]      ps_rdata,
  // result read-out
  input  logic                  wb_start,
  input  logic [PAW-1:0]        wb_addr,
  input  logic [IW-1:0]         wb_words,
  output logic                  wb_busy,
  output logic                  out_valid,
  output logic [MEM_W-1:0]      out_data
);

  typedef enum logic [2:0] {FREE, LOAD_WAIT, LOADING, READY, DONE, STORING} bstate_e;

  bstate_e         st   [NBANK];
  logic [IW-1:0]   base [NBANK];
  logic            zero [NBANK];
  fp64_t           acc  [NBANK][BATCH_H];

  logic [BANK_W-1:0] ld_ptr, st_ptr;
  logic [WCW-1:0]    ld_cnt, st_cnt;
  logic              ld_rd_q;          // read issued last cycle for the load
  logic [WCW-1:0]    ld_rd_idx_q;
  logic              ld_hazard;
  logic              ld_rd;            // the load engine reads the psum buffer

  logic              wb_rd_q;
  logic [PAW-1:0]    wb_ptr;
  logic [IW-1:0]     wb_left;

  for (genvar k = 0; k < NBANK; k++) begin : g_flags
    assign bank_free[k]  = (st[k] == FREE);
    assign bank_ready[k] = (st[k] == READY);
  end
  assign all_free = &bank_free;
  assign wb_busy  = (wb_left != '0) || wb_rd_q;

  // a bank still holding sums of the same rows must be stored before loading
  always_comb begin
    ld_hazard = 1'b0;
    for (int k = 0; k < NBANK; k++)
      if (k != int'(ld_ptr) && base[k] == base[ld_ptr] &&
          (st[k] == READY || st[k] == DONE || st[k] == STORING))
        ld_hazard = 1'b1;
  end

  // four adders, one per lane
  fp64_t sum [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_add
    fp64_add #(.LAT(0)) u_add (
      .clk(clk), .rst_n(rst_n),
      .a(acc[in_tag.bank][in[l].row[LW-1:0]]), .b(in[l].val), .y(sum[l])
    );
  end

  // psum buffer port control
  always_comb begin
    ld_rd    = (st[ld_ptr] == LOADING && ld_cnt != '0) ||
               (st[ld_ptr] == LOAD_WAIT && !zero[ld_ptr] && !ld_hazard);
    ps_re    = ld_rd || (wb_left != '0);
    ps_raddr = ld_rd ? PAW'(base[ld_ptr] / VEC_PER_WORD) + PAW'(ld_cnt) : wb_ptr;
    ps_we    = (st[st_ptr] == STORING);
    ps_waddr = PAW'(base[st_ptr] / VEC_PER_WORD) + PAW'(st_cnt);
    for (int e = 0; e < VEC_PER_WORD; e++)
      ps_wdata[e*DW +: DW] = acc[st_ptr][int'(st_cnt) * VEC_PER_WORD + e];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NBANK; k++) begin
        st[k] <= FREE; base[k] <= '0; zero[k] <= 1'b0;
      end
      ld_ptr <= '0; st_ptr <= '0; ld_cnt <= '0; st_cnt <= '0;
      ld_rd_q <= 1'b0; ld_rd_idx_q <= '0;
      wb_rd_q <= 1'b0; wb_ptr <= '0; wb_left <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      // ---- open ----
      if (open_valid) begin
        st[open_bank]   <= LOAD_WAIT;
        base[open_bank] <= open_base;
        zero[open_bank] <= open_zero;
      end

      // ---- LDP ----
      ld_rd_q <= 1'b0;
      if (st[ld_ptr] == LOAD_WAIT && zero[ld_ptr]) begin
        for (int r = 0; r < BATCH_H; r++) acc[ld_ptr][r] <= '0;
        st[ld_ptr] <= READY;
        ld_ptr     <= (ld_ptr == BANK_W'(NBANK - 1)) ? '0 : ld_ptr + 1'b1;
      end else if (ld_rd) begin
        st[ld_ptr]  <= LOADING;
        ld_rd_q     <= 1'b1;
        ld_rd_idx_q <= ld_cnt;
        ld_cnt      <= (ld_cnt == WCW'(WPB - 1)) ? '0 : ld_cnt + 1'b1;
      end
      if (ld_rd_q) begin
        for (int e = 0; e < VEC_PER_WORD; e++)
          acc[ld_ptr][int'(ld_rd_idx_q) * VEC_PER_WORD + e] <= ps_rdata[e*DW +: DW];
        if (ld_rd_idx_q == WCW'(WPB - 1)) begin
          st[ld_ptr] <= READY;
          ld_ptr     <= (ld_ptr == BANK_W'(NBANK - 1)) ? '0 : ld_ptr + 1'b1;
        end
      end

      // ---- ACC ----
      for (int l = 0; l < LANES; l++)
        if (in[l].valid)
          acc[in_tag.bank][in[l].row[LW-1:0]] <= sum[l];
      if (in_tag.beat && in_tag.last)
        st[in_tag.bank] <= DONE;

      // ---- STP ----
      if (st[st_ptr] == DONE) begin
        st[st_ptr] <= STORING;
        st_cnt     <= '0;
      end else if (st[st_ptr] == STORING) begin
        if (st_cnt == WCW'(WPB - 1)) begin
          st[st_ptr] <= FREE;
          st_cnt     <= '0;
          st_ptr     <= (st_ptr == BANK_W'(NBANK - 1)) ? '0 : st_ptr + 1'b1;
        end else begin
          st_cnt <= st_cnt + 1'b1;
        end
      end

      // ---- read-out ----
      wb_rd_q <= 1'b0;
      if (wb_start) begin
        wb_ptr  <= wb_addr;
        wb_left <= wb_words;
      end else if (wb_left != '0 && !ld_rd) begin
        wb_rd_q <= 1'b1;
        wb_ptr  <= wb_ptr + 1'b1;
        wb_left <= wb_left - 1'b1;
      end
      out_valid <= wb_rd_q;
      if (wb_rd_q) out_data <= ps_rdata;
    end
  end

  // rules of the bank protocol
  assert property (@(posedge clk) disable iff (!rst_n) open_valid |-> st[open_bank] == FREE)
    else $error("accumulator: bank opened while in use");
  for (genvar l = 0; l < LANES; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
        in[l].valid |-> (st[in_tag.bank] == READY &&
                         (in[l].row >> LW) == (base[in_tag.bank] >> LW)))
      else $error("accumulator: product for a bank that is not accumulating or outside its batch");
    for (genvar m = l + 1; m < LANES; m++) begin : g_pair
      assert property (@(posedge clk) disable iff (!rst_n)
          !(in[l].valid && in[m].valid && in[l].row == in[m].row))
        else $error("accumulator: write conflict between lanes");
    end
  end

endmodule
