// tb_matrix_buffer: pushes and pops beats of four COO elements and a tag at
// random, honouring full and empty, and checks every popped beat against a
// queue model, the lanes staying together and the flags at the depth limits.
module tb_matrix_buffer;
  import spmv_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned TW = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  coo_t [LANES-1:0] din, dout;
  logic [TW-1:0] din_tag, dout_tag;
  int checks = 0, failures = 0;
  logic [$bits(coo_t)*LANES+TW-1:0] q[$];

  matrix_buffer #(.DEPTH(DEPTH), .TW(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; din_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (full !== (q.size() == DEPTH) || empty !== (q.size() == 0)) begin
        failures++; $display("FAIL flags at %0d entries: full %b empty %b", q.size(), full, empty);
      end
      if (!empty) begin
        checks++;
        if ({dout, dout_tag} !== q[0]) begin
          failures++; if (failures < 10) $display("FAIL head mismatch");
        end
      end
      push = !full && ($urandom_range(99) < ((i / 500) % 2 ? 70 : 35));
      pop  = !empty && ($urandom_range(99) < ((i / 500) % 2 ? 35 : 70));
      for (int l = 0; l < LANES; l++) din[l] = {$urandom(), $urandom(), $urandom(), $urandom()};
      din_tag = TW'($urandom());
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back({din, din_tag});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
