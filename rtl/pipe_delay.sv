// pipe_delay: a W-bit signal delayed by LAT clock cycles (LAT = 0 is a wire).
// Used to give the floating-point cores and side-band signals (valid bits,
// row indices, batch tags) a fixed pipeline latency. Every stage is cleared
// by the active-low synchronous reset.
module pipe_delay #(
  parameter int unsigned W   = 1,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [LAT];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < LAT; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[LAT-1];
  end
endmodule
