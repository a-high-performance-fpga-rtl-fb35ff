// b_link_tx: FPGA2 side of the direct FPGA2 -> FPGA1 interconnection that
// carries matrix B. FPGA2 reads B once from its SODIMM bank; every word is
// given both to FPGA2's own master (loc_*) and to FPGA1 over the 64-bit link
// (link_valid/link_data). A word is retired from the input only when both
// consumers have taken it, so the two FPGAs stay synchronised on the same B
// stream while each may stall independently.
//
// Synchronisation on the link is credit based (own choice; the source only
// says the link needs a synchronisation mechanism): the sender starts with
// CREDITS credits, one per word of the receiver's buffer, spends one per
// word sent and gets one back for every link_credit pulse from b_link_rx.
// Link outputs are registered. The local data output is the input word
// itself, since the local master takes it directly from the input.
module b_link_tx
  import fp64_pkg::*;
#(
  parameter int unsigned CREDITS = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // B stream from the SODIMM reader
  input  logic  in_valid,
  input  fp64_t in_data,
  output logic  in_ready,
  // to FPGA2's master
  output logic  loc_valid,
  output fp64_t loc_data,
  input  logic  loc_ready,
  // to FPGA1
  output logic  link_valid,
  output fp64_t link_data,
  input  logic  link_credit
);
  localparam int unsigned CW = $clog2(CREDITS+1);
  logic [CW-1:0] credits;
  logic taken_loc, taken_link, send, loc_fire, loc_done, link_done;

  assign loc_valid = in_valid && !taken_loc;
  assign loc_data  = in_data;
  assign loc_fire  = loc_valid && loc_ready;
  assign send      = in_valid && !taken_link && (credits != 0);
  assign loc_done  = taken_loc || loc_fire;
  assign link_done = taken_link || send;
  assign in_ready  = loc_done && link_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken_loc  <= 1'b0;
      taken_link <= 1'b0;
      credits    <= CW'(CREDITS);
      link_valid <= 1'b0;
      link_data  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        taken_loc  <= 1'b0;
        taken_link <= 1'b0;
      end else begin
        taken_loc  <= loc_done;
        taken_link <= link_done;
      end
      credits    <= credits - CW'(send) + CW'(link_credit);
      link_valid <= send;
      if (send) link_data <= in_data;
    end
  end

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits <= CW'(CREDITS));
endmodule
