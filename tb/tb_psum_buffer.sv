// tb_psum_buffer: writes random 512-bit words at random addresses, reads them
// back (one-cycle latency) while other writes go on, and compares with a model.
module tb_psum_buffer;
  import spmv_pkg::*;
  localparam int unsigned ROWS = 4096;
  localparam int unsigned AW = $clog2(ROWS / 8);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [MEM_W-1:0] wdata = '0, rdata;
  logic [MEM_W-1:0] model [ROWS / 8];
  logic written [ROWS / 8];
  int checks = 0, failures = 0;

  psum_buffer #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] ra;
    logic [MEM_W-1:0] expv;
    logic expect_ok;
    for (int i = 0; i < ROWS / 8; i++) written[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = $urandom_range(1);
      waddr = AW'($urandom());
      for (int k = 0; k < 16; k++) wdata[k*32 +: 32] = $urandom();
      ra = AW'($urandom());
      re = written[ra] && (!we || waddr != ra);
      raddr = ra;
      expv = model[ra];
      expect_ok = re;
      @(posedge clk);
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
      #1;
      if (expect_ok) begin
        checks++;
        if (rdata !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: %h", ra, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
