// psum_buffer: on-chip partial-sum memory (URAM in an FPGA build).
//
// Holds one double per matrix row, organised as words of ROWS_PER_WORD = 8
// rows (512 bits), so a batch of 64 rows is loaded or stored in 8 cycles.
// One write port (STP, storing a finished batch) and one read port (LDP,
// loading a batch before it starts, and reading results out) with a one-cycle
// read latency. The published design names the buffer and its role; the
// width, the depth and the port arrangement are this design's choices. The
// default depth of 393216 rows is what the 96 UltraRAMs of the evaluation
// device hold as 64-bit words.
module psum_buffer
  import spmv_pkg::*;
#(
  parameter int unsigned ROWS  = 393216,
  localparam int unsigned RPW  = VEC_PER_WORD,
  localparam int unsigned WORDS = ROWS / RPW,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [MEM_W-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [MEM_W-1:0] rdata
);
  logic [MEM_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
