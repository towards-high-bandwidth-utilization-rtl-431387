// tb_adder_tree: streams four products per cycle with rows drawn from a small
// set (so pairs, two pairs, triples and all-four groups of equal rows occur),
// and checks, LATENCY = 22 cycles later, that valid outputs have distinct
// rows, that each group's sum appears in the slot of its lowest lane and
// that the other lanes are invalid zeros. Values are small integers, so the
// sums are exact whatever the order of addition. The tag must follow with the
// same latency.
module tb_adder_tree;
  import spmv_pkg::*;
  localparam int unsigned ADD_LAT = 10;
  localparam int unsigned LATENCY = 2 * ADD_LAT + 2;
  localparam int unsigned TW = 4;

  logic clk = 0, rst_n = 0, conflict;
  prod_t [LANES-1:0] in, out;
  logic [TW-1:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int n_pair = 0, n_two_pairs = 0, n_triple = 0, n_quad = 0;

  typedef struct { prod_t [LANES-1:0] o; logic [TW-1:0] t; } exp_t;
  exp_t expq[$];

  adder_tree #(.ADD_LAT(ADD_LAT), .TW(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model(prod_t [LANES-1:0] p, logic [TW-1:0] t);
    exp_t e;
    bit done [LANES];
    int groups = 0, biggest = 0;
    e.t = t;
    for (int i = 0; i < LANES; i++) done[i] = 0;
    for (int i = 0; i < LANES; i++) begin
      e.o[i] = '0;
      e.o[i].row = p[i].row;
    end
    for (int i = 0; i < LANES; i++) begin
      if (!p[i].valid || done[i]) continue;
      begin
        real s = 0.0;
        int n = 0;
        for (int j = i; j < LANES; j++)
          if (p[j].valid && p[j].row == p[i].row) begin
            s += $bitstoreal(p[j].val); done[j] = 1; n++;
          end
        e.o[i].valid = 1;
        e.o[i].val = (n == 1) ? p[i].val : $realtobits(s);
        if (n > 1) groups++;
        if (n > biggest) biggest = n;
      end
    end
    if (groups == 2) n_two_pairs++;
    else if (biggest == 2) n_pair++;
    else if (biggest == 3) n_triple++;
    else if (biggest == 4) n_quad++;
    return e;
  endfunction

  initial begin
    exp_t e;
    in = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LATENCY - 1; i++) begin e.o = '0; e.t = '0; expq.push_back(e); end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        in[l].valid = ($urandom_range(7) != 0);
        in[l].row   = 32'(100 + $urandom_range((i % 3 == 0) ? 1 : 5));
        in[l].val   = $realtobits(real'(int'($urandom_range(200)) - 100));
      end
      in_tag = TW'($urandom());
      expq.push_back(model(in, in_tag));
      @(posedge clk); #1;
      e = expq.pop_front();
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out[l].valid !== e.o[l].valid || (e.o[l].valid && out[l].row !== e.o[l].row) ||
            (e.o[l].valid ? out[l].val !== e.o[l].val : out[l].val !== '0)) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d lane %0d: %b %0d %f expected %b %0d %f", i, l,
              out[l].valid, out[l].row, $bitstoreal(out[l].val),
              e.o[l].valid, e.o[l].row, $bitstoreal(e.o[l].val));
        end
        for (int m = l + 1; m < LANES; m++) begin
          checks++;
          if (out[l].valid && out[m].valid && out[l].row == out[m].row) begin
            failures++; $display("FAIL: write conflict left in lanes %0d and %0d", l, m);
          end
        end
      end
      checks++;
      if (out_tag !== e.t) begin failures++; $display("FAIL tag at step %0d", i); end
    end
    $display("groups seen: pair %0d, two pairs %0d, triple %0d, four %0d", n_pair, n_two_pairs, n_triple, n_quad);
    checks++;
    if (n_pair == 0 || n_two_pairs == 0 || n_triple == 0 || n_quad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
