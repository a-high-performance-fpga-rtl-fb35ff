// ctrl_regs: registers through which the host software runs the FPGA. The
// host reaches them over a simple 32-bit register bus (reg_wr / reg_rd with
// a word address; read data is valid the cycle after reg_rd). Map:
//   0 CTRL        write 1 to bit 0: start (one-cycle pulse to the master)
//   1 STATUS      bit 0 busy, bit 1 done (sticky, write 1 to clear)
//   2 N           inner dimension of the product
//   3 NUM_BLOCKS  number of NUM_PE x SJ blocks of C to compute
//   4 A_BASE  5 B_BASE  6 C_BASE   64-bit word addresses in board memory
//   7 CYCLES      clock cycles of the last run (read only)
//   8 SLOTS  9 BUBBLES  10 RES_STALLS   event counters of the master (read only)
// Source: the software manages the FPGA through registers that both the
// software and the FPGA can access. The map and bus are this design's own.
module ctrl_regs
  import dgemm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output dgemm_cfg_t  cfg,
  output logic        start,
  input  logic        busy,
  input  logic        done,
  input  logic [31:0] cnt_slots,
  input  logic [31:0] cnt_bubbles,
  input  logic [31:0] cnt_res_stalls
);
  logic        done_flag;
  logic [31:0] cycles;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
      cycles    <= '0;
      reg_rdata <= '0;
    end else begin
      start <= reg_wr && (reg_addr == 4'd0) && reg_wdata[0] && !busy;
      if (start)     cycles <= '0;
      else if (busy) cycles <= cycles + 1;
      if (done) done_flag <= 1'b1;
      else if (reg_wr && reg_addr == 4'd1 && reg_wdata[1]) done_flag <= 1'b0;
      if (reg_wr) begin
        case (reg_addr)
          4'd2: cfg.n          <= reg_wdata;
          4'd3: cfg.num_blocks <= reg_wdata;
          4'd4: cfg.a_base     <= waddr_t'(reg_wdata);
          4'd5: cfg.b_base     <= waddr_t'(reg_wdata);
          4'd6: cfg.c_base     <= waddr_t'(reg_wdata);
          default: ;
        endcase
      end
      if (reg_rd) begin
        case (reg_addr)
          4'd1:    reg_rdata <= {30'd0, done_flag, busy};
          4'd2:    reg_rdata <= cfg.n;
          4'd3:    reg_rdata <= cfg.num_blocks;
          4'd4:    reg_rdata <= 32'(cfg.a_base);
          4'd5:    reg_rdata <= 32'(cfg.b_base);
          4'd6:    reg_rdata <= 32'(cfg.c_base);
          4'd7:    reg_rdata <= cycles;
          4'd8:    reg_rdata <= cnt_slots;
          4'd9:    reg_rdata <= cnt_bubbles;
          4'd10:   reg_rdata <= cnt_res_stalls;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
