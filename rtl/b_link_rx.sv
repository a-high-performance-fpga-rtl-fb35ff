// b_link_rx: FPGA1 side of the B link. Words arriving on link_valid/link_data
// go into a DEPTH-word FIFO (DEPTH must equal the sender's CREDITS) and are
// handed to FPGA1's master on out_valid/out_data/out_ready. Every word the
// master takes frees a buffer entry and returns one credit to b_link_tx on
// the registered link_credit pulse. Credit-based flow control is this
// design's choice for the synchronisation the source calls for.
module b_link_rx
  import fp64_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  link_valid,
  input  fp64_t link_data,
  output logic  link_credit,
  output logic  out_valid,
  output fp64_t out_data,
  input  logic  out_ready
);
  logic empty, full, pop;
  logic [$clog2(DEPTH+1)-1:0] count;

  assign out_valid = !empty;
  assign pop       = out_valid && out_ready;

  sync_fifo #(.W(64), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (link_valid), .din (link_data),
    .pop, .dout (out_data),
    .empty, .full, .count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link_credit <= 1'b0;
    else        link_credit <= pop;
  end

  a_link_room: assert property (@(posedge clk) disable iff (!rst_n) !(link_valid && full));
endmodule
