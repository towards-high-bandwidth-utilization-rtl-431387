// adder_tree: writing-conflict-free adder tree.
//
// Takes the four products a cycle brings from the PEs, each with its row
// index, and delivers four outputs whose valid rows are all different, so
// the accumulators can apply all four in one cycle without a write conflict.
// Products that share a row are summed; the sum takes the output slot of the
// lowest lane of the group and the other lanes of the group deliver an
// invalid zero.
//
// Structure (after the published figure): four input multiplexers M0..M3,
// set by control c0, pick two products (or zero) for adder1 and two for
// adder2; adder3 adds the two results; a crossbar, set by control c1, gives
// each output slot either its own delayed product, zero, a1, a2 or a3.
// Timing: products at cycle t, multiplexer register at t+1, adder1/adder2
// results at t+1+ADD_LAT (t+11), adder3 result at t+1+2*ADD_LAT (t+21),
// crossbar register at t+2+2*ADD_LAT (t+22), so LATENCY = 22 with the
// default 10-cycle adders; these cycle marks are printed in the figure.
//
// Control (this design's own, the document does not say how c0/c1 are
// formed): groups of lanes with equal rows are found at the input. A single
// group of 2..4 lanes is fed to M0..M3 in lane order (missing inputs zero)
// and its sum is taken from a3, as the figure's example does for a pair. Two
// groups of two go to adder1 and adder2 and are taken from a1 and a2. Lanes
// in no group pass straight through. The tag input (batch bank and last-beat
// flag) is delayed by LATENCY alongside.
module adder_tree
  import spmv_pkg::*;
#(
  parameter int unsigned ADD_LAT = 10,
  parameter int unsigned TW      = 4,
  localparam int unsigned LATENCY = 2 * ADD_LAT + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  prod_t [LANES-1:0]    in,
  input  logic [TW-1:0]     in_tag,
  output prod_t [LANES-1:0]    out,
  output logic [TW-1:0]     out_tag,
  output logic                 conflict   // input cycle holds a row shared by two lanes
);

  typedef enum logic [2:0] {SEL_ZERO, SEL_P, SEL_A1, SEL_A2, SEL_A3} sel_e;

  // ---------------- stage 0: conflict detection, c0 and c1 ----------------
  logic [LANES-1:0][2:0] c0;     // per multiplexer: 0..3 = lane, 4 = zero
  sel_e [LANES-1:0]      c1;

  always_comb begin
    logic [LANES-1:0][LANES-1:0] same;
    logic [LANES-1:0]            leader;
    int                          size [LANES];
    int                          ngroups, slot;
    slot = 0;

    for (int i = 0; i < LANES; i++)
      for (int j = 0; j < LANES; j++)
        same[i][j] = in[i].valid && in[j].valid && (in[i].row == in[j].row);

    for (int i = 0; i < LANES; i++) begin
      leader[i] = in[i].valid;
      size[i]   = 0;
      for (int j = 0; j < LANES; j++) begin
        if (j < i && same[i][j]) leader[i] = 1'b0;
        if (same[i][j]) size[i]++;
      end
    end

    for (int k = 0; k < LANES; k++) c0[k] = 3'd4;
    for (int i = 0; i < LANES; i++) c1[i] = in[i].valid ? SEL_P : SEL_ZERO;

    ngroups = 0;
    for (int i = 0; i < LANES; i++) begin
      if (leader[i] && size[i] >= 2) begin
        slot = (ngroups == 0) ? 0 : 2;
        for (int j = 0; j < LANES; j++) begin
          if (same[i][j]) begin
            c0[slot] = 3'(j);
            slot++;
            c1[j] = SEL_ZERO;
          end
        end
        c1[i] = (ngroups == 0) ? SEL_A3 : SEL_A2;
        ngroups++;
      end
    end
    // two groups: the first one is read from adder1, not adder3
    if (ngroups == 2)
      for (int i = 0; i < LANES; i++)
        if (c1[i] == SEL_A3) c1[i] = SEL_A1;
  end

  assign conflict = (c0[0] != 3'd4);

  // ---------------- stage 1: multiplexers M0..M3 (registered) -------------
  fp64_t [LANES-1:0] m_q;
  always_ff @(posedge clk) begin
    if (!rst_n) m_q <= '0;
    else
      for (int k = 0; k < LANES; k++)
        m_q[k] <= (c0[k] == 3'd4) ? '0 : in[c0[k][1:0]].val;
  end

  // ---------------- adders ----------------
  fp64_t a1, a2, a3, a1_d, a2_d;
  fp64_add #(.LAT(ADD_LAT)) u_adder1 (.clk(clk), .rst_n(rst_n), .a(m_q[0]), .b(m_q[1]), .y(a1));
  fp64_add #(.LAT(ADD_LAT)) u_adder2 (.clk(clk), .rst_n(rst_n), .a(m_q[2]), .b(m_q[3]), .y(a2));
  fp64_add #(.LAT(ADD_LAT)) u_adder3 (.clk(clk), .rst_n(rst_n), .a(a1), .b(a2), .y(a3));
  pipe_delay #(.W(DW), .LAT(ADD_LAT)) u_a1d (.clk(clk), .rst_n(rst_n), .d(a1), .q(a1_d));
  pipe_delay #(.W(DW), .LAT(ADD_LAT)) u_a2d (.clk(clk), .rst_n(rst_n), .d(a2), .q(a2_d));

  // ---------------- bypass of products, controls and tag ----------------
  localparam int unsigned BYP_W = $bits(prod_t) * LANES + 3 * LANES + TW;
  logic [BYP_W-1:0] byp_d, byp_q;
  prod_t [LANES-1:0] p_d;
  sel_e  [LANES-1:0] c1_d;
  logic [TW-1:0]  tag_d;

  assign byp_d = {in, c1, in_tag};
  pipe_delay #(.W(BYP_W), .LAT(LATENCY - 1)) u_byp (
    .clk(clk), .rst_n(rst_n), .d(byp_d), .q(byp_q)
  );
  assign {p_d, c1_d, tag_d} = byp_q;

  // ---------------- crossbar switch (registered) ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out     <= '0;
      out_tag <= '0;
    end else begin
      out_tag <= tag_d;
      for (int i = 0; i < LANES; i++) begin
        out[i].row   <= p_d[i].row;
        out[i].valid <= (c1_d[i] != SEL_ZERO);
        unique case (c1_d[i])
          SEL_P:   out[i].val <= p_d[i].val;
          SEL_A1:  out[i].val <= a1_d;
          SEL_A2:  out[i].val <= a2_d;
          SEL_A3:  out[i].val <= a3;
          default: out[i].val <= '0;
        endcase
      end
    end
  end

endmodule
