// spmv_bh_runner: testbench helper. Holds one accelerator built with batch
// height BATCH_H and runs, on its own clock, complete products for random
// matrices with the sizes and non-zero counts of the six smaller benchmark
// matrices, checking every result exactly. When done it reports the average
// bandwidth utilisation and its check counts.
module spmv_bh_runner #(
  parameter int unsigned BATCH_H = 64
) (
  output logic done,
  output real  avg_bu,
  output int   n_checks,
  output int   n_failures
);
  import spmv_pkg::*;

  localparam int unsigned BLOCK_W = 16384;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, idle, stall, merge;
  logic [MEM_W-1:0] in_data, out_data;

  spmv_top #(.BATCH_H(BATCH_H)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_data, .idle, .stall, .merge
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real bu_sum = 0.0;
  longint cycle = 0;
  always @(posedge clk) cycle++;


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
    bu_sum += bu;
    $display("batch height %3d  %-9s %7d cycles  BU %.4f", BATCH_H, name, t1 - t0, bu);
  endtask

  initial begin
    done = 1'b0; avg_bu = 0.0; n_checks = 0; n_failures = 0;
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
    avg_bu     = bu_sum / 6.0;
    n_checks   = checks;
    n_failures = failures;
    done       = 1'b1;
  end
endmodule
