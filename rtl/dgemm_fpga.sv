// dgemm_fpga: the complete design of one FPGA of the board: control
// registers, the master, the linear chain of NUM_PE processing elements, the
// reader that joins A from the two 32-bit DDR2 banks and the writer that
// stores C back into them.
//
// FPGA_ID selects where matrix B comes from. FPGA 2 (FPGA_ID = 2) reads B
// from its 64-bit SODIMM bank and shares every word with FPGA 1 over the
// link (b_link_tx); FPGA 1 (FPGA_ID = 1) receives B from that link
// (b_link_rx). Ports of the side not used by an FPGA are idle: on FPGA 1
// the SODIMM request and link transmit outputs are driven to zero.
//
// Operation: the host writes N, NUM_BLOCKS and the three base addresses,
// then sets CTRL.start. The start pulse launches the A reader
// (NUM_BLOCKS*N*NUM_PE words), the B reader on FPGA 2
// (NUM_BLOCKS*N*SJ words) and the master. STATUS.done is set after the last
// of NUM_BLOCKS*NUM_PE*SJ results has been written.
module dgemm_fpga
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned FPGA_ID = 1,
  parameter int unsigned NUM_PE  = NUM_PE_DEF,
  parameter int unsigned SJ      = SJ_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF,
  parameter int unsigned RD_FIFO = 16,
  parameter int unsigned LINK_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // host register bus
  input  logic             reg_wr,
  input  logic             reg_rd,
  input  logic [3:0]       reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  // two 32-bit DDR2 banks: reads (A) ...
  output logic [1:0]       a_req_valid,
  output waddr_t [1:0]     a_req_addr,
  input  logic [1:0]       a_req_ready,
  input  logic [1:0]       a_resp_valid,
  input  logic [1:0][31:0] a_resp_data,
  // ... and writes (C)
  output logic [1:0]       c_wr_valid,
  output waddr_t [1:0]     c_wr_addr,
  output logic [1:0][31:0] c_wr_data,
  input  logic [1:0]       c_wr_ready,
  // 64-bit SODIMM bank holding B (FPGA 2 only)
  output logic             b_req_valid,
  output waddr_t           b_req_addr,
  input  logic             b_req_ready,
  input  logic             b_resp_valid,
  input  fp64_t            b_resp_data,
  // B link, FPGA 2 -> FPGA 1
  output logic             link_tx_valid,
  output fp64_t            link_tx_data,
  input  logic             link_tx_credit,
  input  logic             link_rx_valid,
  input  fp64_t            link_rx_data,
  output logic             link_rx_credit,
  // status
  output logic             busy,
  output logic             done
);
  dgemm_cfg_t cfg;
  logic       start;
  logic       a_valid, a_ready, b_valid, b_ready;
  fp64_t      a_data, b_data;
  slot_t      slot;
  logic       res_valid, res_ready;
  result_t    res;
  logic       c_valid, c_ready, c_idle;
  waddr_t     c_addr;
  fp64_t      c_data;
  logic [31:0] cnt_slots, cnt_bubbles, cnt_res_stalls;

  ctrl_regs u_regs (
    .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .cfg, .start, .busy, .done, .cnt_slots, .cnt_bubbles, .cnt_res_stalls
  );

  split_word_reader #(.DEPTH(RD_FIFO)) u_a_rd (
    .clk, .rst_n, .start,
    .base  (cfg.a_base),
    .count (cfg.num_blocks * cfg.n * NUM_PE),
    .req_valid (a_req_valid), .req_addr (a_req_addr), .req_ready (a_req_ready),
    .resp_valid(a_resp_valid), .resp_data(a_resp_data),
    .out_valid (a_valid), .out_data (a_data), .out_ready (a_ready)
  );

  if (FPGA_ID == 2) begin : g_b_source
    logic  sb_valid, sb_ready;
    fp64_t sb_data;
    bank_reader #(.DW(64), .DEPTH(RD_FIFO)) u_b_rd (
      .clk, .rst_n, .start,
      .base  (cfg.b_base),
      .count (cfg.num_blocks * cfg.n * SJ),
      .req_valid (b_req_valid), .req_addr (b_req_addr), .req_ready (b_req_ready),
      .resp_valid(b_resp_valid), .resp_data(b_resp_data),
      .out_valid (sb_valid), .out_data (sb_data), .out_ready (sb_ready)
    );
    b_link_tx #(.CREDITS(LINK_DEPTH)) u_link_tx (
      .clk, .rst_n,
      .in_valid (sb_valid), .in_data (sb_data), .in_ready (sb_ready),
      .loc_valid (b_valid), .loc_data (b_data), .loc_ready (b_ready),
      .link_valid (link_tx_valid), .link_data (link_tx_data), .link_credit (link_tx_credit)
    );
    assign link_rx_credit = 1'b0;
  end else begin : g_b_link
    b_link_rx #(.DEPTH(LINK_DEPTH)) u_link_rx (
      .clk, .rst_n,
      .link_valid (link_rx_valid), .link_data (link_rx_data), .link_credit (link_rx_credit),
      .out_valid (b_valid), .out_data (b_data), .out_ready (b_ready)
    );
    assign b_req_valid   = 1'b0;
    assign b_req_addr    = '0;
    assign link_tx_valid = 1'b0;
    assign link_tx_data  = '0;
  end

  master #(.NUM_PE(NUM_PE), .SJ(SJ)) u_master (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .a_valid, .a_data, .a_ready,
    .b_valid, .b_data, .b_ready,
    .slot,
    .res_valid, .res, .res_ready,
    .c_valid, .c_addr, .c_data, .c_ready, .c_idle,
    .cnt_slots, .cnt_bubbles, .cnt_res_stalls
  );

  pe_array #(.NUM_PE(NUM_PE), .SJ(SJ), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_pes (
    .clk, .rst_n, .slot_in (slot), .res_valid, .res, .res_ready
  );

  split_word_writer u_c_wr (
    .clk, .rst_n,
    .in_valid (c_valid), .in_addr (c_addr), .in_data (c_data), .in_ready (c_ready),
    .idle (c_idle),
    .wr_valid (c_wr_valid), .wr_addr (c_wr_addr), .wr_data (c_wr_data), .wr_ready (c_wr_ready)
  );
endmodule
