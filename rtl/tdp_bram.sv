// tdp_bram: true dual-port block RAM, DEPTH x W, one clock.
// Each port either writes (we high) or reads in a cycle; a read returns the
// word at addr on the next clock edge (one cycle latency), as an FPGA block
// RAM does. Writes to the same address from both ports in one cycle leave
// port B's data (the vector buffer never does this).
module tdp_bram #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
  end
endmodule
