// tb_spmv_workloads: runs complete products at the default sizes on random
// sparse matrices with the dimensions and non-zero counts of six of the
// benchmark matrices used to evaluate this kind of accelerator (lns_3937,
// dw8192, t2d_q9, epb1, memplus, raefsky1). The positions of the non-zeros
// are random, not the real sparsity patterns, so the bandwidth utilisation
// printed here shows the design's behaviour, not the published figures.
// Each result is checked exactly against a reference product (small integer
// and quarter values keep every sum exact), and the measured bandwidth
// utilisation BU = 2*nnz / (64 * cycles) must not exceed its 0.125 peak.
module tb_spmv_workloads;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MEM_W-1:0] stream[$];
  real yref[];

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

  // n x n matrix with nnz non-zeros at random positions, packed as a stream
  task automatic build(input int n, input int nnz);
    real    a[longint];        // key row * n + col, iterated in row-major order
    real    xv[];
    coo_t   lists[][$];
    longint key;
    int nblk = (n + BLOCK_W - 1) / BLOCK_W;
    int nbat = (n + BATCH_H - 1) / BATCH_H;
    while (a.num() < nnz) begin
      key = longint'($urandom_range(n - 1)) * n + longint'($urandom_range(n - 1));
      a[key] = rnd_val();
    end
    xv = new[n];
    foreach (xv[c]) xv[c] = rnd_val();
    yref = new[n];
    foreach (yref[r]) yref[r] = 0.0;
    lists = new[nblk * nbat];
    if (a.first(key)) do begin
      int r = int'(key / n), c = int'(key % n);
      coo_t e;
      e.row = 32'(r); e.col = 32'(c); e.val = $realtobits(a[key]);
      yref[r] += a[key] * xv[c];
      lists[(c / BLOCK_W) * nbat + r / BATCH_H].push_back(e);
    end while (a.next(key));
    stream.delete();
    for (int b = 0; b < nblk; b++) begin
      int c0 = b * BLOCK_W;
      int c1 = (c0 + BLOCK_W < n) ? c0 + BLOCK_W : n;
      int nw = (c1 - c0 + 7) / 8;
      stream.push_back(header(OP_LDV, nw, 0, 0));
      for (int w = 0; w < nw; w++) begin
        logic [MEM_W-1:0] word = '0;
        for (int e = 0; e < 8; e++)
          if (c0 + 8*w + e < c1) word[e*64 +: 64] = $realtobits(xv[c0 + 8*w + e]);
        stream.push_back(word);
      end
      for (int t = 0; t < nbat; t++) begin
        int sz = lists[b * nbat + t].size();
        int nw2 = (sz + 3) / 4;
        if (sz == 0 && b > 0) continue;
        if (nw2 == 0) nw2 = 1;
        stream.push_back(header(OP_LDM, nw2, t * BATCH_H, b == 0));
        for (int w = 0; w < nw2; w++) begin
          logic [MEM_W-1:0] word = '0;
          for (int e = 0; e < 4; e++) begin
            coo_t ce;
            if (4*w + e < sz) ce = lists[b * nbat + t][4*w + e];
            else begin ce.row = 32'(t * BATCH_H); ce.col = PAD_COL; ce.val = '0; end
            word[e*128 +: 128] = ce;
          end
          stream.push_back(word);
        end
      end
    end
    stream.push_back(header(OP_WB, (n + 7) / 8, 0, 0));
  endtask

  task automatic run(input string name, input int n, input int nnz);
    real got[$];
    longint t0, t1;
    int words, n_stall = 0, n_merge = 0;
    real bu;
    build(n, nnz);
    words = stream.size();
    t0 = cycle;
    fork
      begin : drive
        while (stream.size() > 0) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_data  = stream[0];
          @(posedge clk);
          if (stall) n_stall++;
          if (merge) n_merge++;
          if (in_ready) void'(stream.pop_front());
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin : collect
        while (got.size() < ((n + 7) / 8) * 8) begin
          @(posedge clk);
          if (out_valid)
            for (int e = 0; e < 8; e++) got.push_back($bitstoreal(out_data[e*64 +: 64]));
        end
      end
    join
    t1 = cycle;
    for (int r = 0; r < n; r++) begin
      checks++;
      if (got[r] != yref[r]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: y[%0d] = %f expected %f", name, r, got[r], yref[r]);
      end
    end
    bu = 2.0 * nnz / (64.0 * real'(t1 - t0));
    checks++;
    if (bu > 0.125) begin failures++; $display("FAIL %s: BU above its peak", name); end
    $display("%-9s %6d x %-6d %7d nnz  %7d words  %7d cycles  stalls %6d  merges %6d  BU %.4f",
             name, n, n, nnz, words, t1 - t0, n_stall, n_merge, bu);
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run("lns_3937", 3937, 25407);
    run("dw8192", 8192, 41746);
    run("t2d_q9", 9801, 87025);
    run("epb1", 14734, 95053);
    run("memplus", 17758, 99147);
    run("raefsky1", 3242, 293409);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
