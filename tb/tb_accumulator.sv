// tb_accumulator: drives the accumulators directly, with a psum buffer
// attached. Two "blocks" of four batches each use the three rotating banks:
// the first block's batches start from zero, the second block's batches load
// the stored partial sums (LDP) and add to them; finished batches are stored
// (STP). Random conflict-free beats arrive, sometimes several rows updated in
// consecutive cycles. A read-out then streams all rows, which are compared
// with a model. Also checked: a bank is ready only after its load, its state
// returns to free after the store, and the read-out delivers one word per
// cycle.
module tb_accumulator;
  import spmv_pkg::*;
  localparam int unsigned BATCH_H = 16;
  localparam int unsigned ROWS    = 128;
  localparam int unsigned NBAT    = 4;
  localparam int unsigned PAW     = $clog2(ROWS / 8);

  logic clk = 0, rst_n = 0;
  logic open_valid = 0, open_zero = 0, all_free, wb_start = 0, wb_busy, out_valid;
  logic [BANK_W-1:0] open_bank = '0;
  logic [IW-1:0] open_base = '0, wb_words = '0;
  logic [NBANK-1:0] bank_free, bank_ready;
  prod_t [LANES-1:0] in;
  tag_t in_tag;
  logic ps_we, ps_re;
  logic [PAW-1:0] ps_waddr, ps_raddr, wb_addr = '0;
  logic [MEM_W-1:0] ps_wdata, ps_rdata, out_data;
  int checks = 0, failures = 0;
  real model [NBAT * BATCH_H];

  accumulator #(.BATCH_H(BATCH_H), .ROWS(ROWS)) dut (.*);
  psum_buffer #(.ROWS(ROWS)) u_ps (.clk, .we(ps_we), .waddr(ps_waddr), .wdata(ps_wdata),
                                   .re(ps_re), .raddr(ps_raddr), .rdata(ps_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic open(input int bank, input int batch, input bit zero);
    while (!bank_free[bank]) @(negedge clk);
    open_valid = 1; open_bank = BANK_W'(bank); open_base = 32'(batch * BATCH_H); open_zero = zero;
    @(negedge clk);
    open_valid = 0;
  endtask

  task automatic feed(input int bank, input int batch, input int beats);
    int waited = 0;
    while (!bank_ready[bank]) begin @(negedge clk); waited++; end
    if (!open_zero) begin
      checks++;
      if (waited < BATCH_H / 8) begin failures++; $display("FAIL bank ready before its load"); end
    end
    for (int b = 0; b < beats; b++) begin
      int rows [LANES];
      for (int l = 0; l < LANES; l++) begin
        bit dup;
        do begin
          rows[l] = batch * BATCH_H + int'($urandom_range(BATCH_H - 1));
          dup = 0;
          for (int m = 0; m < l; m++) if (rows[m] == rows[l]) dup = 1;
        end while (dup);
        in[l].valid = ($urandom_range(4) != 0);
        in[l].row   = 32'(rows[l]);
        in[l].val   = $realtobits(real'(int'($urandom_range(64)) - 32) / 2.0);
        if (in[l].valid) model[rows[l]] += $bitstoreal(in[l].val);
      end
      in_tag.beat = 1; in_tag.last = (b == beats - 1); in_tag.bank = BANK_W'(bank);
      @(negedge clk);
    end
    in = '0; in_tag = '0;
  endtask

  initial begin
    int bank = 0, nout = 0, first_out = -1, last_out = -1, cyc = 0;
    in = '0; in_tag = '0;
    for (int r = 0; r < NBAT * BATCH_H; r++) model[r] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 2; blk++)
      for (int t = 0; t < NBAT; t++) begin
        open(bank, t, blk == 0);
        feed(bank, t, 5 + int'($urandom_range(20)));
        bank = (bank + 1) % NBANK;
      end
    while (!all_free) @(negedge clk);
    checks++;
    if (bank_free != '1) begin failures++; $display("FAIL banks not free"); end
    wb_start = 1; wb_addr = '0; wb_words = 32'(NBAT * BATCH_H / 8);
    @(negedge clk);
    wb_start = 0;
    while (nout < NBAT * BATCH_H / 8) begin
      @(posedge clk); #1; cyc++;
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        for (int e = 0; e < 8; e++) begin
          checks++;
          if ($bitstoreal(out_data[e*64 +: 64]) != model[nout*8 + e]) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d: %f expected %f", nout*8 + e,
                                        $bitstoreal(out_data[e*64 +: 64]), model[nout*8 + e]);
          end
        end
        nout++;
      end
    end
    checks++;
    if (last_out - first_out != NBAT * BATCH_H / 8 - 1) begin
      failures++; $display("FAIL read-out not one word per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
