// matrix_buffer: four FIFOs of COO non-zeros, FIFO q feeding PE q.
//
// The decoder pushes one 512-bit matrix word per cycle: its four non-zeros
// go to FIFO0..FIFO3 in the same cycle, together with a beat tag (the
// accumulator bank of the batch and a flag marking the last word of the
// batch), which is kept in a fifth, narrow FIFO. The issue logic pops all
// five together, so the four lanes stay in lock-step and the tag always
// belongs to the four elements at the heads. The four FIFOs come from the
// published design; the tag FIFO and the depth are this design's choices.
module matrix_buffer
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned TW = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  coo_t [LANES-1:0]         din,
  input  logic [TW-1:0]         din_tag,
  output logic                     full,
  input  logic                     pop,
  output coo_t [LANES-1:0]         dout,
  output logic [TW-1:0]         dout_tag,
  output logic                     empty
);
  logic [LANES:0] f_full, f_empty;

  for (genvar q = 0; q < LANES; q++) begin : g_fifo
    sync_fifo #(.W($bits(coo_t)), .DEPTH(DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .push(push), .din(din[q]),
      .pop(pop), .dout(dout[q]),
      .full(f_full[q]), .empty(f_empty[q])
    );
  end
  sync_fifo #(.W(TW), .DEPTH(DEPTH)) u_tag (
    .clk(clk), .rst_n(rst_n),
    .push(push), .din(din_tag),
    .pop(pop), .dout(dout_tag),
    .full(f_full[LANES]), .empty(f_empty[LANES])
  );

  assign full  = f_full[0];
  assign empty = f_empty[0];

  assert property (@(posedge clk) disable iff (!rst_n) f_empty == {(LANES+1){f_empty[0]}})
    else $error("matrix_buffer: lanes out of step");
  assert property (@(posedge clk) disable iff (!rst_n) f_full == {(LANES+1){f_full[0]}})
    else $error("matrix_buffer: lanes out of step");
endmodule
