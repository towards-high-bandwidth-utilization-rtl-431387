// tb_vector_buffer: loads a full vector segment through the eight write ports
// (both sub-buffers at once), then has the four PEs read random columns every
// cycle, including all four hitting the same BRAM or the same column, and
// checks each element arrives exactly two cycles after its request.
module tb_vector_buffer;
  import spmv_pkg::*;
  localparam int unsigned BLOCK_W = 16384;
  localparam int unsigned CW = $clog2(BLOCK_W);

  logic clk = 0;
  logic load_en = 0;
  logic [CW-4:0] load_addr = '0;
  logic [MEM_W-1:0] load_data = '0;
  logic [LANES-1:0][CW-1:0] rd_col = '0;
  fp64_t [LANES-1:0] rd_data;
  int checks = 0, failures = 0;
  logic [63:0] ref_mem [BLOCK_W];

  vector_buffer #(.BLOCK_W(BLOCK_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LANES-1:0][CW-1:0] hist [3];

  initial begin
    for (int j = 0; j < BLOCK_W; j++) ref_mem[j] = {$urandom(), 32'(j)};
    // load mode: one word of eight elements per cycle
    for (int w = 0; w < BLOCK_W / 8; w++) begin
      @(negedge clk);
      load_en = 1; load_addr = (CW-3)'(w);
      for (int e = 0; e < 8; e++) load_data[e*64 +: 64] = ref_mem[8*w + e];
    end
    @(negedge clk);
    load_en = 0;
    // read mode
    for (int i = 0; i < 3000; i++) begin
      for (int q = 0; q < LANES; q++) begin
        case (i % 4)
          0: rd_col[q] = CW'($urandom_range(BLOCK_W - 1));
          1: rd_col[q] = CW'({$urandom_range(BLOCK_W / 8 - 1), 3'b0}) | CW'($urandom_range(1)); // all in BRAM 0
          2: rd_col[q] = CW'(i * 5);                                                            // same column
          default: rd_col[q] = CW'($urandom_range(BLOCK_W - 1) & ~32'd6);
        endcase
      end
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = rd_col;
      @(posedge clk); #1;
      if (i >= 1)
        for (int q = 0; q < LANES; q++) begin
          checks++;
          if (rd_data[q] !== ref_mem[hist[1][q]]) begin
            failures++;
            if (failures < 10) $display("FAIL PE%0d col %0d: %h expected %h", q, hist[1][q], rd_data[q], ref_mem[hist[1][q]]);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
