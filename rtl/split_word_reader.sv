// split_word_reader: reads a stream of 64-bit operands that the host has
// split into two 32-bit halves, stored at the same address in two physically
// separate 32-bit memory banks (bank 0 low half, bank 1 high half). Each bank
// has its own bank_reader, so the two banks run independently with their own
// latency and gaps; a 64-bit word is delivered when both halves are
// present. Source: the board gives each FPGA two 32-bit DDR2 banks and the
// host software splits the 64-bit words so that both banks are read in burst
// mode. Which bank holds which half is this design's choice.
module split_word_reader
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  waddr_t           base,
  input  logic [31:0]      count,
  // two 32-bit banks: index 0 low half, 1 high half
  output logic [1:0]       req_valid,
  output waddr_t [1:0]     req_addr,
  input  logic [1:0]       req_ready,
  input  logic [1:0]       resp_valid,
  input  logic [1:0][31:0] resp_data,
  output logic             out_valid,
  output fp64_t            out_data,
  input  logic             out_ready
);
  logic [1:0]       h_valid;
  logic [1:0][31:0] h_data;

  for (genvar i = 0; i < 2; i++) begin : g_bank
    bank_reader #(.DW(32), .DEPTH(DEPTH)) u_rd (
      .clk, .rst_n, .start, .base, .count,
      .req_valid (req_valid[i]), .req_addr (req_addr[i]), .req_ready (req_ready[i]),
      .resp_valid(resp_valid[i]), .resp_data(resp_data[i]),
      .out_valid (h_valid[i]), .out_data (h_data[i]),
      .out_ready (out_ready && h_valid[1-i])
    );
  end

  assign out_valid = &h_valid;
  assign out_data  = {h_data[1], h_data[0]};
endmodule
