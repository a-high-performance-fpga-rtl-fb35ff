// dgemm_board: the dual-FPGA accelerator board. The product C = A x B is
// split by rows: FPGA 1 computes the upper half of C from the upper half of
// A held in its two 32-bit DDR2 banks, FPGA 2 the lower half from the lower
// half of A in its own two banks. Both need all of B, which is stored once
// in the 64-bit SODIMM bank of FPGA 2; FPGA 2 forwards every B word to
// FPGA 1 over the direct 64-bit FPGA-to-FPGA link with credit-based
// synchronisation. The two link registers (one per direction) model the
// board traces. The memory chips, their controllers and the PCI bridge are
// outside this module: their sides of the interfaces are the ports below,
// with one host register bus per FPGA. Prefix f1_ / f2_ names the FPGA.
module dgemm_board
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned NUM_PE  = NUM_PE_DEF,
  parameter int unsigned SJ      = SJ_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // FPGA 1
  input  logic             f1_reg_wr,
  input  logic             f1_reg_rd,
  input  logic [3:0]       f1_reg_addr,
  input  logic [31:0]      f1_reg_wdata,
  output logic [31:0]      f1_reg_rdata,
  output logic [1:0]       f1_a_req_valid,
  output waddr_t [1:0]     f1_a_req_addr,
  input  logic [1:0]       f1_a_req_ready,
  input  logic [1:0]       f1_a_resp_valid,
  input  logic [1:0][31:0] f1_a_resp_data,
  output logic [1:0]       f1_c_wr_valid,
  output waddr_t [1:0]     f1_c_wr_addr,
  output logic [1:0][31:0] f1_c_wr_data,
  input  logic [1:0]       f1_c_wr_ready,
  output logic             f1_busy,
  output logic             f1_done,
  // FPGA 2
  input  logic             f2_reg_wr,
  input  logic             f2_reg_rd,
  input  logic [3:0]       f2_reg_addr,
  input  logic [31:0]      f2_reg_wdata,
  output logic [31:0]      f2_reg_rdata,
  output logic [1:0]       f2_a_req_valid,
  output waddr_t [1:0]     f2_a_req_addr,
  input  logic [1:0]       f2_a_req_ready,
  input  logic [1:0]       f2_a_resp_valid,
  input  logic [1:0][31:0] f2_a_resp_data,
  output logic [1:0]       f2_c_wr_valid,
  output waddr_t [1:0]     f2_c_wr_addr,
  output logic [1:0][31:0] f2_c_wr_data,
  input  logic [1:0]       f2_c_wr_ready,
  output logic             f2_b_req_valid,
  output waddr_t           f2_b_req_addr,
  input  logic             f2_b_req_ready,
  input  logic             f2_b_resp_valid,
  input  fp64_t            f2_b_resp_data,
  output logic             f2_busy,
  output logic             f2_done
);
  // link wires and board-trace registers
  logic  tx_valid, tx_credit, rx_credit, l_valid_q, l_credit_q;
  fp64_t tx_data, l_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_valid_q  <= 1'b0;
      l_data_q   <= '0;
      l_credit_q <= 1'b0;
    end else begin
      l_valid_q  <= tx_valid;
      l_data_q   <= tx_data;
      l_credit_q <= rx_credit;
    end
  end
  assign tx_credit = l_credit_q;

  // unused ports of each FPGA
  logic  f1_b_req_valid_nc, f1_link_tx_valid_nc, f2_link_rx_credit_nc;
  waddr_t f1_b_req_addr_nc;
  fp64_t f1_link_tx_data_nc;

  dgemm_fpga #(.FPGA_ID(1), .NUM_PE(NUM_PE), .SJ(SJ), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_fpga1 (
    .clk, .rst_n,
    .reg_wr (f1_reg_wr), .reg_rd (f1_reg_rd), .reg_addr (f1_reg_addr),
    .reg_wdata (f1_reg_wdata), .reg_rdata (f1_reg_rdata),
    .a_req_valid (f1_a_req_valid), .a_req_addr (f1_a_req_addr), .a_req_ready (f1_a_req_ready),
    .a_resp_valid (f1_a_resp_valid), .a_resp_data (f1_a_resp_data),
    .c_wr_valid (f1_c_wr_valid), .c_wr_addr (f1_c_wr_addr), .c_wr_data (f1_c_wr_data),
    .c_wr_ready (f1_c_wr_ready),
    .b_req_valid (f1_b_req_valid_nc), .b_req_addr (f1_b_req_addr_nc), .b_req_ready (1'b0),
    .b_resp_valid (1'b0), .b_resp_data ('0),
    .link_tx_valid (f1_link_tx_valid_nc), .link_tx_data (f1_link_tx_data_nc), .link_tx_credit (1'b0),
    .link_rx_valid (l_valid_q), .link_rx_data (l_data_q), .link_rx_credit (rx_credit),
    .busy (f1_busy), .done (f1_done)
  );

  dgemm_fpga #(.FPGA_ID(2), .NUM_PE(NUM_PE), .SJ(SJ), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_fpga2 (
    .clk, .rst_n,
    .reg_wr (f2_reg_wr), .reg_rd (f2_reg_rd), .reg_addr (f2_reg_addr),
    .reg_wdata (f2_reg_wdata), .reg_rdata (f2_reg_rdata),
    .a_req_valid (f2_a_req_valid), .a_req_addr (f2_a_req_addr), .a_req_ready (f2_a_req_ready),
    .a_resp_valid (f2_a_resp_valid), .a_resp_data (f2_a_resp_data),
    .c_wr_valid (f2_c_wr_valid), .c_wr_addr (f2_c_wr_addr), .c_wr_data (f2_c_wr_data),
    .c_wr_ready (f2_c_wr_ready),
    .b_req_valid (f2_b_req_valid), .b_req_addr (f2_b_req_addr), .b_req_ready (f2_b_req_ready),
    .b_resp_valid (f2_b_resp_valid), .b_resp_data (f2_b_resp_data),
    .link_tx_valid (tx_valid), .link_tx_data (tx_data), .link_tx_credit (tx_credit),
    .link_rx_valid (1'b0), .link_rx_data ('0), .link_rx_credit (f2_link_rx_credit_nc),
    .busy (f2_busy), .done (f2_done)
  );
endmodule
