// tb_fp64_add: checks the double-precision adder against the simulator's own
// IEEE-754 arithmetic on random operands (same and opposite signs, close and
// far exponents, exact cancellation, zeros, infinities) and checks that the
// pipelined form delivers its result exactly LAT cycles later.
module tb_fp64_add;
  localparam int unsigned LAT = 10;
  logic clk = 0, rst_n = 0;
  logic [63:0] a, b, y0, yl;
  int checks = 0, failures = 0;

  fp64_add #(.LAT(0))   u_comb (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(y0));
  fp64_add #(.LAT(LAT)) u_pipe (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(yl));

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

  task automatic check(input logic [63:0] x, input logic [63:0] z);
    logic [63:0] exp_v;
    a = x; b = z;
    #1;
    exp_v = $realtobits($bitstoreal(x) + $bitstoreal(z));
    checks++;
    if (y0 !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h expected %h", x, z, y0, exp_v);
    end
  endtask

  initial begin
    logic [63:0] x, z, hold;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp(900, 1100);
      case (i % 4)
        0: z = rnd_fp(900, 1100);
        1: begin z = rnd_fp(int'(x[62:52]) - 2, int'(x[62:52]) + 2); end
        2: begin z = x; z[63] = ~x[63]; z[20:0] = 21'($urandom()); end
        default: begin z = rnd_fp(int'(x[62:52]) - 60, int'(x[62:52])); end
      endcase
      check(x, z);
    end
    check(64'h3FF0_0000_0000_0000, 64'hBFF0_0000_0000_0000); // 1 + -1 = +0
    check(64'h4000_0000_0000_0000, 64'h0000_0000_0000_0000); // 2 + 0
    check(64'h0000_0000_0000_0000, 64'hC008_0000_0000_0000); // 0 + -3
    check(64'h7FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000); // inf + 1
    check(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000); // 1 + 2^-53: tie to even
    check(64'h3FF0_0000_0000_0001, 64'h3CA0_0000_0000_0000); // tie rounds up to even
    // latency of the pipelined form
    @(negedge clk);
    a = 64'h4008_0000_0000_0000; b = 64'h4014_0000_0000_0000; // 3 + 5
    @(negedge clk);
    a = 0; b = 0;
    for (int c = 1; c <= LAT + 2; c++) begin
      hold = yl;
      if (c == LAT) begin
        checks++;
        if (hold !== 64'h4020_0000_0000_0000) begin
          failures++; $display("FAIL latency: %h at cycle %0d", hold, c);
        end
      end else begin
        checks++;
        if (hold == 64'h4020_0000_0000_0000) begin
          failures++; $display("FAIL result early/late at cycle %0d", c);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
