// tb_pe: streams random matrix values and vector elements into a PE every
// cycle and checks that each product, its row and its valid bit appear exactly
// MUL_LAT cycles after it was presented (visible in the cycle after the
// MUL_LAT-th clock edge), and that a padding element gives an invalid zero.
module tb_pe;
  import spmv_pkg::*;
  localparam int unsigned MUL_LAT = 6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [IW-1:0] in_row = '0;
  fp64_t in_val = '0, in_x = '0;
  prod_t out;
  prod_t expq[$];
  int checks = 0, failures = 0;

  pe #(.MUL_LAT(MUL_LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prod_t e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < MUL_LAT - 1; i++) begin e = '0; expq.push_back(e); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) != 0);
      in_row   = $urandom();
      in_val   = $realtobits((real'($urandom_range(2000)) - 1000.0) / 8.0 + 0.5);
      in_x     = $realtobits((real'($urandom_range(2000)) - 1000.0) / 3.0 + 0.25);
      e.valid = in_valid;
      e.row   = in_valid ? in_row : '0;
      e.val   = in_valid ? $realtobits($bitstoreal(in_val) * $bitstoreal(in_x)) : '0;
      expq.push_back(e);
      @(posedge clk); #1;
      e = expq.pop_front();
      checks++;
      if (out.valid !== e.valid || (e.valid && (out.row !== e.row || out.val !== e.val)) ||
          (!e.valid && out.val !== '0)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %b %h %h expected %b %h %h",
                                    i, out.valid, out.row, out.val, e.valid, e.row, e.val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
