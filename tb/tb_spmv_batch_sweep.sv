// tb_spmv_batch_sweep: batch-height sweep. Four accelerators with batch
// heights 32, 64, 128 and 256 run the same six benchmark-sized random
// workloads side by side; each result is checked exactly. The average
// bandwidth utilisation must rise from batch height 32 to 256, since taller
// batches pad fewer words and load and store partial sums less often.
module tb_spmv_batch_sweep;
  localparam int unsigned NH = 4;
  logic done [NH];
  real  bu [NH];
  int   ck [NH], fl [NH];
  int   checks = 0, failures = 0;

  spmv_bh_runner #(.BATCH_H(32))  u_h32  (.done(done[0]), .avg_bu(bu[0]), .n_checks(ck[0]), .n_failures(fl[0]));
  spmv_bh_runner #(.BATCH_H(64))  u_h64  (.done(done[1]), .avg_bu(bu[1]), .n_checks(ck[1]), .n_failures(fl[1]));
  spmv_bh_runner #(.BATCH_H(128)) u_h128 (.done(done[2]), .avg_bu(bu[2]), .n_checks(ck[2]), .n_failures(fl[2]));
  spmv_bh_runner #(.BATCH_H(256)) u_h256 (.done(done[3]), .avg_bu(bu[3]), .n_checks(ck[3]), .n_failures(fl[3]));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int h = 0; h < NH; h++) begin
      checks += ck[h];
      failures += fl[h];
      $display("batch height %3d: average BU %.4f GFLOP/GB", 32 << h, bu[h]);
    end
    checks++;
    if (!(bu[3] > bu[0])) begin
      failures++;
      $display("FAIL: average BU does not rise with batch height");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
