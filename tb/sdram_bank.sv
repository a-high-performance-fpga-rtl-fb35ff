// sdram_bank: behavioural model of one board memory bank as seen through
// its memory controller, for testbenches only. Reads: a request is accepted
// on req_valid && req_ready; the word comes back in order LAT cycles later on
// resp_valid/resp_data. Writes: wr_valid && wr_ready stores wr_data. To mimic
// an SDRAM that delivers data on only part of the cycles (refresh, page
// changes), req_ready and wr_ready are high on a random YIELD percent of the
// cycles. The array mem is public so a testbench can load and inspect it.
module sdram_bank
  import dgemm_pkg::*;
#(
  parameter int unsigned DW    = 32,
  parameter int unsigned WORDS = 1024,
  parameter int unsigned LAT   = 6,
  parameter int unsigned YIELD = 75
) (
  input  logic          clk,
  input  logic          req_valid,
  input  waddr_t        req_addr,
  output logic          req_ready,
  output logic          resp_valid,
  output logic [DW-1:0] resp_data,
  input  logic          wr_valid,
  input  waddr_t        wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          wr_ready
);
  logic [DW-1:0] mem [WORDS];
  logic          v_pipe [LAT];
  logic [DW-1:0] d_pipe [LAT];
  int unsigned   n_gaps = 0;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    for (int i = 0; i < int'(LAT); i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
    req_ready = 1'b0;
    wr_ready  = 1'b0;
  end

  always @(posedge clk) begin
    v_pipe[0] <= req_valid && req_ready;
    d_pipe[0] <= mem[req_addr % WORDS];
    for (int i = 1; i < int'(LAT); i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    if (wr_valid && wr_ready) mem[wr_addr % WORDS] <= wr_data;
    if (req_valid && !req_ready) n_gaps <= n_gaps + 1;
    req_ready <= ($urandom_range(99) < YIELD);
    wr_ready  <= ($urandom_range(99) < YIELD);
  end

  assign resp_valid = v_pipe[LAT-1];
  assign resp_data  = d_pipe[LAT-1];
endmodule
