// decoder: turns the 512-bit off-chip read stream into work for the buffers.
//
// The stream is a sequence of commands, each a header word (opcode in bits
// 511:504) followed by its data words:
//   OP_LDV n         : n words of eight vector elements, written to the
//                      vector buffer at word addresses 0..n-1 (LDV).
//   OP_LDM n,row,fb  : one batch of n words of four COO non-zeros, pushed into
//                      the matrix FIFOs (LDM). row is the batch's first row,
//                      fb = 1 marks the first block, whose partial sums start
//                      at zero instead of being loaded from the psum buffer.
//   OP_WB  n,row     : stream n words of results (8 rows each, from row)
//                      out of the psum buffer.
// The header layout is this design's own; the published design says only
// that the decoder loads data and sends it to the vector buffer, the
// accumulators or the matrix buffer.
//
// Batches are given accumulator banks 0,1,2,0,... in stream order. Before a
// batch, the decoder waits until its bank is free and then opens it (the
// accumulator loads its partial sums meanwhile). The vector buffer ports are
// shared between writing and reading, so before a vector segment is loaded the
// decoder waits until every non-zero already buffered has read its vector
// element (pipe_idle). Before a read-out it waits until all batches are stored.
// in_ready is low whenever the decoder waits: the stream stalls. The data
// outputs (vb_load_data, mb_din) are the stream word itself, by wire; only
// the enables, addresses and tags are generated here.
module decoder
  import spmv_pkg::*;
#(
  parameter int unsigned BLOCK_W = 16384,
  parameter int unsigned ROWS    = 393216,
  localparam int unsigned WAW    = $clog2(BLOCK_W) - 3,
  localparam int unsigned PAW    = $clog2(ROWS / VEC_PER_WORD)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // off-chip read stream
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [MEM_W-1:0]      in_data,
  // vector buffer (load mode)
  output logic                  vb_load_en,
  output logic [WAW-1:0]        vb_load_addr,
  output logic [MEM_W-1:0]      vb_load_data,
  input  logic                  pipe_idle,
  // matrix buffer
  output logic                  mb_push,
  output coo_t [LANES-1:0]      mb_din,
  output tag_t                  mb_tag,
  input  logic                  mb_full,
  // accumulators
  output logic                  open_valid,
  output logic [BANK_W-1:0]     open_bank,
  output logic [IW-1:0]         open_base,
  output logic                  open_zero,
  input  logic [NBANK-1:0]      bank_free,
  input  logic                  all_free,
  output logic                  wb_start,
  output logic [PAW-1:0]        wb_addr,
  output logic [IW-1:0]         wb_words,
  input  logic                  wb_busy,
  output logic                  at_header   // waiting for the next command
);

  typedef enum logic [2:0] {HDR, LDV_WAIT, LDV, LDM_WAIT, LDM, WB_WAIT, WB_GAP, WB_RUN} dstate_e;

  dstate_e        state;
  logic [IW-1:0]  cnt;
  logic [WAW-1:0] vaddr;
  logic [BANK_W-1:0] bank;
  logic [IW-1:0]  hdr_row;
  logic           hdr_fb;
  op_e            op;

  assign op        = op_e'(in_data[OP_LSB +: 8]);
  assign at_header = (state == HDR);

  always_comb begin
    in_ready = 1'b0;
    unique case (state)
      HDR:     in_ready = 1'b1;
      LDV:     in_ready = 1'b1;
      LDM:     in_ready = !mb_full;
      default: in_ready = 1'b0;
    endcase
  end

  // data paths: straight from the stream word
  assign vb_load_en   = (state == LDV) && in_valid;
  assign vb_load_addr = vaddr;
  assign vb_load_data = in_data;

  always_comb begin
    mb_push = (state == LDM) && in_valid && !mb_full;
    for (int e = 0; e < LANES; e++) mb_din[e] = in_data[e*$bits(coo_t) +: $bits(coo_t)];
    mb_tag.beat = 1'b1;
    mb_tag.last = (cnt == 1);
    mb_tag.bank = bank;
  end

  assign open_valid = (state == LDM_WAIT) && bank_free[bank];
  assign open_bank  = bank;
  assign open_base  = hdr_row;
  assign open_zero  = hdr_fb;

  assign wb_start = (state == WB_WAIT) && pipe_idle && all_free;
  assign wb_addr  = PAW'(hdr_row / VEC_PER_WORD);
  assign wb_words = cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= HDR; cnt <= '0; vaddr <= '0; bank <= '0; hdr_row <= '0; hdr_fb <= 1'b0;
    end else begin
      unique case (state)
        HDR: if (in_valid) begin
          cnt     <= in_data[31:0];
          hdr_row <= in_data[63:32];
          hdr_fb  <= in_data[64];
          if (in_data[31:0] != '0) begin
            unique case (op)
              OP_LDV:  state <= LDV_WAIT;
              OP_LDM:  state <= LDM_WAIT;
              OP_WB:   state <= WB_WAIT;
              default: state <= HDR;
            endcase
          end
        end
        LDV_WAIT: if (pipe_idle) begin
          state <= LDV;
          vaddr <= '0;
        end
        LDV: if (in_valid) begin
          vaddr <= vaddr + 1'b1;
          cnt   <= cnt - 1'b1;
          if (cnt == 1) state <= HDR;
        end
        LDM_WAIT: if (bank_free[bank]) state <= LDM;
        LDM: if (mb_push) begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) begin
            state <= HDR;
            bank  <= (bank == BANK_W'(NBANK - 1)) ? '0 : bank + 1'b1;
          end
        end
        WB_WAIT: if (wb_start) state <= WB_GAP;
        WB_GAP:  state <= WB_RUN;
        WB_RUN:  if (!wb_busy) state <= HDR;
        default: state <= HDR;
      endcase
    end
  end

endmodule
