// tb_spmv_full: one complete sparse matrix-vector product on the accelerator
// at its default sizes (blocks of 16384 columns, batches of 64 rows, the full
// psum buffer). The testbench acts as host preprocessing and off-chip memory:
// it draws a random 300 x 20000 matrix (two blocks, five batches) and a
// vector, packs the command stream, streams it in with random gaps, reads
// back y and compares it with its own reference product. Values are small
// integers and quarters, so all sums are exact.
module tb_spmv_full;
  import spmv_pkg::*;

  // the design's default sizes (they must match spmv_top's defaults)
  localparam int unsigned BLOCK_W = 16384;
  localparam int unsigned BATCH_H = 64;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, idle, stall, merge;
  logic [MEM_W-1:0] in_data, out_data;

  spmv_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_data, .idle, .stall, .merge
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_merge = 0, n_stall = 0, n_ldp = 0, n_stp = 0, n_zero_init = 0, n_ldv_wait = 0,
      n_hazard = 0, n_fifo_full = 0, n_pad = 0, n_readout = 0;
  always @(posedge clk) if (rst_n) begin
    if (merge) n_merge++;
    if (stall) n_stall++;
    if (dut.u_acc.ld_rd) n_ldp++;
    if (dut.u_acc.ps_we) n_stp++;
    if (dut.open_valid && dut.open_zero) n_zero_init++;
    if (int'(dut.u_decoder.state) == 1 /* LDV_WAIT */ && !dut.pipe_idle) n_ldv_wait++;
    if (dut.u_acc.ld_hazard && int'(dut.u_acc.st[dut.u_acc.ld_ptr]) == 1 /* LOAD_WAIT */) n_hazard++;
    if (dut.mb_full && in_valid && int'(dut.u_decoder.state) == 4 /* LDM */) n_fifo_full++;
    for (int q = 0; q < LANES; q++) if (dut.mb_pop && dut.mb_dout[q].col == PAD_COL) n_pad++;
    if (out_valid) n_readout++;
  end

  // ---------------- stream and reference ----------------
  logic [MEM_W-1:0] stream[$];
  real  xv[];
  real  yref[];
  int   nnz_total;

  function automatic logic [MEM_W-1:0] header(op_e op, int n, int row, bit fb);
    logic [MEM_W-1:0] w = '0;
    w[OP_LSB +: 8] = op;
    w[31:0]  = 32'(n);
    w[63:32] = 32'(row);
    w[64]    = fb;
    return w;
  endfunction

  function automatic real rnd_val();
    int k;
    do k = int'($urandom_range(16)) - 8; while (k == 0);
    return real'(k) / (($urandom_range(1) == 1) ? 4.0 : 1.0);
  endfunction

  // Build the stream for an R x C matrix with the given density (per mille).
  task automatic build(input int R, input int C, input int permil);
    real a[][];
    int nblk, nbat, rpad;
    a = new[R];
    for (int r = 0; r < R; r++) begin
      a[r] = new[C];
      for (int c = 0; c < C; c++)
        a[r][c] = ($urandom_range(999) < permil) ? rnd_val() : 0.0;
    end
    xv = new[C];
    for (int c = 0; c < C; c++) xv[c] = rnd_val();
    yref = new[R];
    nnz_total = 0;
    for (int r = 0; r < R; r++) begin
      yref[r] = 0.0;
      for (int c = 0; c < C; c++) if (a[r][c] != 0.0) begin
        yref[r] += a[r][c] * xv[c];
        nnz_total++;
      end
    end
    nblk = (C + BLOCK_W - 1) / BLOCK_W;
    nbat = (R + BATCH_H - 1) / BATCH_H;
    stream.delete();
    for (int b = 0; b < nblk; b++) begin
      int c0 = b * BLOCK_W;
      int c1 = (c0 + BLOCK_W < C) ? c0 + BLOCK_W : C;
      int nw = (c1 - c0 + 7) / 8;
      stream.push_back(header(OP_LDV, nw, 0, 0));
      for (int w = 0; w < nw; w++) begin
        logic [MEM_W-1:0] word = '0;
        for (int e = 0; e < 8; e++)
          if (c0 + 8*w + e < c1) word[e*64 +: 64] = $realtobits(xv[c0 + 8*w + e]);
        stream.push_back(word);
      end
      for (int t = 0; t < nbat; t++) begin
        coo_t el[$];
        for (int r = t * BATCH_H; r < (t + 1) * BATCH_H && r < R; r++)
          for (int c = c0; c < c1; c++)
            if (a[r][c] != 0.0) begin
              coo_t e;
              e.row = 32'(r); e.col = 32'(c); e.val = $realtobits(a[r][c]);
              el.push_back(e);
            end
        if (el.size() == 0 && b > 0) continue;  // nothing to add to stored sums
        begin
          int nw2 = (el.size() + 3) / 4;
          if (nw2 == 0) nw2 = 1;
          stream.push_back(header(OP_LDM, nw2, t * BATCH_H, b == 0));
          for (int w = 0; w < nw2; w++) begin
            logic [MEM_W-1:0] word = '0;
            for (int e = 0; e < 4; e++) begin
              coo_t ce;
              if (4*w + e < el.size()) ce = el[4*w + e];
              else begin ce.row = 32'(t * BATCH_H); ce.col = PAD_COL; ce.val = '0; end
              word[e*128 +: 128] = ce;
            end
            stream.push_back(word);
          end
        end
      end
    end
    rpad = (R + 7) / 8;
    stream.push_back(header(OP_WB, rpad, 0, 0));
  endtask

  task automatic run(input string name, input int R, input int C, input int permil, input int gap_pct);
    real got[$];
    longint t0, t1;
    int words;
    build(R, C, permil);
    words = stream.size();
    t0 = cycle;
    fork
      begin : drive
        while (stream.size() > 0) begin
          @(negedge clk);
          if ($urandom_range(99) < gap_pct) begin
            in_valid = 1'b0;
          end else begin
            in_valid = 1'b1;
            in_data  = stream[0];
          end
          @(posedge clk);
          if (in_valid && in_ready) void'(stream.pop_front());
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin : collect
        while (got.size() < ((R + 7) / 8) * 8) begin
          @(posedge clk);
          if (out_valid)
            for (int e = 0; e < 8; e++) got.push_back($bitstoreal(out_data[e*64 +: 64]));
        end
      end
    join
    t1 = cycle;
    for (int r = 0; r < R; r++) begin
      checks++;
      if (got[r] != yref[r]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: y[%0d] = %f expected %f", name, r, got[r], yref[r]);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL %s: not idle at the end", name); end
    $display("%s: %0dx%0d, %0d non-zeros, %0d stream words, %0d cycles, BU = %f GFLOP/GB",
             name, R, C, nnz_total, words, t1 - t0, 2.0 * nnz_total / (64.0 * real'(t1 - t0)));
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // 300 rows (five batches, the last one partial) by 20000 columns (two
    // blocks, the second partial), about 0.2% dense, streamed with gaps
    run("full size", 300, 20000, 2, 5);
    check_seen("adder-tree merge", n_merge);
    check_seen("LDP from psum buffer", n_ldp);
    check_seen("STP to psum buffer", n_stp);
    check_seen("result read-out", n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(input string what, input int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask
endmodule
