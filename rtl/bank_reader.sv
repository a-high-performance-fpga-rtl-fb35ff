// bank_reader: sequential burst reader for one memory bank behind a memory
// controller. After start it requests count words from base, base+1, ...
// (req_valid/req_ready, one address per accepted request) and expects the
// controller to return the data in order (resp_valid/resp_data, no
// back-pressure). Responses are buffered in a DEPTH-word FIFO; a request is
// only issued while the FIFO has room for every word in flight, so no
// response is ever lost. The words leave on out_valid/out_data/out_ready.
// The request/response interface of the memory controller is this design's
// own choice; the source uses vendor DDR2 SDRAM controllers.
module bank_reader
  import dgemm_pkg::*;
#(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  waddr_t        base,
  input  logic [31:0]   count,
  output logic          req_valid,
  output waddr_t        req_addr,
  input  logic          req_ready,
  input  logic          resp_valid,
  input  logic [DW-1:0] resp_data,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  input  logic          out_ready
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [31:0]   left;
  logic [CW-1:0] inflight, fill;
  logic          empty, full, req_fire, pop;

  assign req_valid = (left != 0) && (32'(inflight) + 32'(fill) < DEPTH);
  assign req_fire  = req_valid && req_ready;
  assign out_valid = !empty;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left     <= '0;
      req_addr <= '0;
      inflight <= '0;
    end else begin
      if (start) begin
        left     <= count;
        req_addr <= base;
      end else if (req_fire) begin
        left     <= left - 1;
        req_addr <= req_addr + 1'b1;
      end
      inflight <= inflight + CW'(req_fire) - CW'(resp_valid);
    end
  end

  sync_fifo #(.W(DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (resp_valid), .din (resp_data),
    .pop  (pop), .dout (out_data),
    .empty, .full, .count (fill)
  );

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                    resp_valid |-> inflight != 0);
endmodule
