// tb_fp64_mul: checks the double-precision multiplier against the simulator's
// own IEEE-754 arithmetic on random normal operands, special values (zero,
// infinity, NaN) and checks that the pipelined form delivers its result
// exactly LAT cycles later.
module tb_fp64_mul;
  localparam int unsigned LAT = 6;
  logic clk = 0, rst_n = 0;
  logic [63:0] a, b, y0, yl;
  int checks = 0, failures = 0;

  fp64_mul #(.LAT(0))   u_comb (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(y0));
  fp64_mul #(.LAT(LAT)) u_pipe (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(yl));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_fp(input int emin, input int emax);
    logic [63:0] v;
    int e;
    e = emin + int'($urandom_range(emax - emin));
    v = {$urandom(), $urandom()};
    v[62:52] = 11'(e);
    return v;
  endfunction

  task automatic check(input logic [63:0] x, input logic [63:0] z, input logic [63:0] exp_v);
    a = x; b = z;
    #1;
    checks++;
    if (y0 !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h expected %h", x, z, y0, exp_v);
    end
  endtask

  initial begin
    logic [63:0] x, z, hold;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp(600, 1400);
      z = rnd_fp(600, 1400);
      if (i % 3 == 0) z[51:20] = '0;  // shorter significands: exact and tie cases
      check(x, z, $realtobits($bitstoreal(x) * $bitstoreal(z)));
    end
    // exact halfway products: an odd significand times 1.5 or 1.25
    for (int i = 0; i < 4000; i++) begin
      x = rnd_fp(900, 1100);
      x[0] = 1'b1;
      z = (i % 2) ? 64'h3FF8_0000_0000_0000 : 64'h3FF4_0000_0000_0000;
      check(x, z, $realtobits($bitstoreal(x) * $bitstoreal(z)));
    end
    check(64'h4000_0000_0000_0000, 64'h0000_0000_0000_0000, 64'h0000_0000_0000_0000);
    check(64'hC000_0000_0000_0000, 64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'hC000_0000_0000_0000, 64'hFFF0_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'h0000_0000_0000_0000, 64'h7FF8_0000_0000_0000);
    check(64'h7FE0_0000_0000_0000, 64'h4010_0000_0000_0000, 64'h7FF0_0000_0000_0000);
    @(negedge clk);
    a = 64'h4008_0000_0000_0000; b = 64'h4014_0000_0000_0000; // 3 * 5
    @(negedge clk);
    a = 0; b = 0;
    for (int c = 1; c <= LAT + 2; c++) begin
      hold = yl;
      checks++;
      if ((c == LAT) != (hold == 64'h402E_0000_0000_0000)) begin
        failures++; $display("FAIL latency: %h at cycle %0d", hold, c);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
