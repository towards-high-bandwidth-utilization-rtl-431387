// vector_buffer: read-conflict-free vector buffer with partial duplication.
//
// Holds one segment of the input vector (BLOCK_W doubles, one matrix block
// wide) twice: in sub-buffer 0, read by PE0 and PE1, and in sub-buffer 1,
// read by PE2 and PE3. Each sub-buffer is NBRAM true dual-port BRAMs and two
// NBRAM-to-1 multiplexers, one per PE. PE q uses port (q mod 2) of every BRAM
// of sub-buffer (q div 2), so the four PEs can read any four columns in the
// same cycle without a port conflict.
//
// The ports are time-multiplexed. While load_en is high they are write ports:
// a 512-bit word of eight elements (word index load_addr) is written to both
// sub-buffers at once, element e = 2*b + p going to BRAM b through port p.
// Hence column j lives in BRAM j[2:1] at address {j >> 3, j[0]}. While
// load_en is low the ports are read ports: rd_col[q] is looked up and
// rd_data[q] is valid RD_LAT = 2 cycles later (one BRAM cycle plus the
// registered multiplexer).
//
// The two sub-buffers of four BRAMs, the two 4-to-1 multiplexers per
// sub-buffer and the read/write time division follow the published design; the
// interleaving of columns over BRAMs and the two-cycle latency are this
// design's own choices.
module vector_buffer
  import spmv_pkg::*;
#(
  parameter int unsigned BLOCK_W = 16384,          // vector elements per segment
  localparam int unsigned NBRAM  = 4,              // BRAMs per sub-buffer
  localparam int unsigned NSUB   = LANES / 2,      // sub-buffers
  localparam int unsigned CW     = $clog2(BLOCK_W),
  localparam int unsigned DEPTH  = BLOCK_W / NBRAM,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned WAW    = CW - 3          // word address width
) (
  input  logic                  clk,
  // load (write) mode
  input  logic                  load_en,
  input  logic [WAW-1:0]        load_addr,
  input  logic [MEM_W-1:0]      load_data,
  // read mode, one port per PE
  input  logic [LANES-1:0][CW-1:0] rd_col,
  output fp64_t [LANES-1:0]        rd_data
);

  logic [DW-1:0] q [NSUB][NBRAM][2];
  logic [1:0]    sel_q [LANES];

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    for (genvar b = 0; b < NBRAM; b++) begin : g_bram
      logic [AW-1:0] addr [2];
      for (genvar p = 0; p < 2; p++) begin : g_port
        // PE (2s + p) reads through port p
        assign addr[p] = load_en ? {load_addr, 1'(p)}
                                 : {rd_col[2*s+p][CW-1:3], rd_col[2*s+p][0]};
      end
      tdp_bram #(.W(DW), .DEPTH(DEPTH)) u_bram (
        .clk    (clk),
        .we_a   (load_en),
        .addr_a (addr[0]),
        .wdata_a(load_data[(2*b)*DW +: DW]),
        .rdata_a(q[s][b][0]),
        .we_b   (load_en),
        .addr_b (addr[1]),
        .wdata_b(load_data[(2*b+1)*DW +: DW]),
        .rdata_b(q[s][b][1])
      );
    end
  end

  // BRAM select registered alongside the BRAM read, then a registered mux
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      sel_q[l]   <= rd_col[l][2:1];
      rd_data[l] <= q[l/2][sel_q[l]][l%2];
    end
  end

endmodule
