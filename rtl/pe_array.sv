// pe_array: the linear pipeline of NUM_PE processing elements. Only PE 0 is
// connected to the master: the operand slot enters PE 0 and moves one PE per
// clock towards PE NUM_PE-1; results move the other way and leave at PE 0.
// The last PE's operand output is left open and its result input is idle.
// Latency: an operand slot reaches PE p after p cycles; a result needs one
// cycle per PE it crosses, plus any waiting for the chain.
module pe_array
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned NUM_PE  = NUM_PE_DEF,
  parameter int unsigned SJ      = SJ_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  slot_t   slot_in,
  output logic    res_valid,
  output result_t res,
  input  logic    res_ready
);
  slot_t   slot   [NUM_PE+1];
  logic    rvalid [NUM_PE+1];
  result_t rdata  [NUM_PE+1];
  logic    rready [NUM_PE+1];

  assign slot[0]        = slot_in;
  assign rvalid[NUM_PE] = 1'b0;
  assign rdata[NUM_PE]  = '0;
  assign res_valid      = rvalid[0];
  assign res            = rdata[0];
  assign rready[0]      = res_ready;

  for (genvar p = 0; p < int'(NUM_PE); p++) begin : g_pe
    pe #(.POS(p), .SJ(SJ), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_pe (
      .clk, .rst_n,
      .slot_in       (slot[p]),
      .slot_out      (slot[p+1]),
      .res_in_valid  (rvalid[p+1]),
      .res_in        (rdata[p+1]),
      .res_in_ready  (rready[p+1]),
      .res_out_valid (rvalid[p]),
      .res_out       (rdata[p]),
      .res_out_ready (rready[p])
    );
  end
endmodule
