// master: the module that manages computation and data transfers in one
// FPGA. After start it sends the operand stream of num_blocks C blocks into
// PE 0, one slot per clock, and writes every result coming back to memory.
//
// Stream format. The host stores A and B already rearranged in stream order,
// so both are read sequentially. For each block the A stream holds N columns
// of NUM_PE elements (A[0..NUM_PE-1][k] of the block's rows) and the B stream
// holds N rows of SJ elements (B[k][0..SJ-1] of the block's columns). The
// master emits rounds of SJ slots. Round g carries B row k = (g-1) mod N of
// block (g-1)/N in all SJ slots (g >= 1) and, in its first NUM_PE slots,
// A column g mod N of block g/N, which the PEs hold until round g+1. Rounds
// run back to back across blocks, so one run of num_blocks blocks takes
// num_blocks*N + 1 rounds. k_first/k_last mark the first and last B row of
// a block.
//
// Stalls. A slot is sent only when every operand it needs is available:
// otherwise a bubble (empty slot) enters the chain. This absorbs the gaps
// of the SDRAM data and of the inter-FPGA link. Before the last round of a
// block starts, all results of the previous block must have come back, so
// that a PE never holds more than SJ results (result stall).
//
// Results carry row and column; they are written to c_base +
// block*NUM_PE*SJ + row*SJ + col (block-major layout that the host
// rearranges). done pulses once the last result has been written.
//
// The A and B data fields of the slot are the input data wired straight
// through (the master only tags and gates them), and the high bits of the
// row and column tags stay zero at the default NUM_PE and SJ because the tag
// widths leave room for larger sizes.
module master
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned NUM_PE = NUM_PE_DEF,
  parameter int unsigned SJ     = SJ_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  dgemm_cfg_t cfg,
  output logic       busy,
  output logic       done,
  // operand streams
  input  logic       a_valid,
  input  fp64_t      a_data,
  output logic       a_ready,
  input  logic       b_valid,
  input  fp64_t      b_data,
  output logic       b_ready,
  // PE chain
  output slot_t      slot,
  input  logic       res_valid,
  input  result_t    res,
  output logic       res_ready,
  // result writes
  output logic       c_valid,
  output waddr_t     c_addr,
  output fp64_t      c_data,
  input  logic       c_ready,
  input  logic       c_idle,
  // event counters (since start)
  output logic [31:0] cnt_slots,
  output logic [31:0] cnt_bubbles,
  output logic [31:0] cnt_res_stalls
);
  localparam int unsigned BLK = NUM_PE * SJ;
  localparam int unsigned JW  = $clog2(SJ);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [31:0] rounds_total, g, kb, rcount, rblk, outstanding;
  logic [JW-1:0] j;
  logic need_a, need_b, k_first, k_last, res_stall, fire, last_slot;
  logic res_fire, add_blk;

  assign k_first   = (kb == 0);
  assign k_last    = (kb == cfg.n - 1);
  assign need_b    = (g != 0);
  assign need_a    = (g < rounds_total - 1) && (32'(j) < NUM_PE);
  assign res_stall = need_b && k_last && (j == '0) && (outstanding != 0);
  assign fire      = (state == S_RUN) && !res_stall &&
                     (!need_a || a_valid) && (!need_b || b_valid);
  assign a_ready   = fire && need_a;
  assign b_ready   = fire && need_b;
  assign last_slot = (j == JW'(SJ - 1));
  assign add_blk   = fire && need_b && k_last && (j == '0);
  assign busy      = (state != S_IDLE);

  always_comb begin
    slot         = '0;
    slot.a_valid = fire && need_a;
    slot.a_row   = ROW_W'(j);
    slot.a       = a_data;
    slot.b_valid = fire && need_b;
    slot.b_col   = COL_W'(j);
    slot.k_first = k_first;
    slot.k_last  = k_last;
    slot.b       = b_data;
  end

  // --------------------------- operand sequencing ---------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      g            <= '0;
      j            <= '0;
      kb           <= '0;
      rounds_total <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start && cfg.n != 0 && cfg.num_blocks != 0) begin
          state        <= S_RUN;
          g            <= '0;
          j            <= '0;
          kb           <= '0;
          rounds_total <= cfg.n * cfg.num_blocks + 1;
        end
        S_RUN: if (fire) begin
          if (last_slot) begin
            j <= '0;
            g <= g + 1;
            if (need_b) kb <= k_last ? '0 : kb + 1;
            if (g == rounds_total - 1) state <= S_DRAIN;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_DRAIN: if (outstanding == 0 && !c_valid && c_idle) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------ result path -------------------------------
  assign res_ready = !c_valid || c_ready;
  assign res_fire  = res_valid && res_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid     <= 1'b0;
      c_addr      <= '0;
      c_data      <= '0;
      rcount      <= '0;
      rblk        <= '0;
      outstanding <= '0;
    end else begin
      if (start && state == S_IDLE) begin
        rcount <= '0;
        rblk   <= '0;
      end
      outstanding <= outstanding + (add_blk ? BLK : 0) - (res_fire ? 1 : 0);
      if (res_ready) c_valid <= res_valid;
      if (res_fire) begin
        c_addr <= cfg.c_base + waddr_t'(rblk * BLK) + waddr_t'(res.row * SJ) + waddr_t'(res.col);
        c_data <= res.data;
        if (rcount == BLK - 1) begin
          rcount <= '0;
          rblk   <= rblk + 1;
        end else begin
          rcount <= rcount + 1;
        end
      end
    end
  end

  // ------------------------------ counters ----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_slots      <= '0;
      cnt_bubbles    <= '0;
      cnt_res_stalls <= '0;
    end else if (start && state == S_IDLE) begin
      cnt_slots      <= '0;
      cnt_bubbles    <= '0;
      cnt_res_stalls <= '0;
    end else if (state == S_RUN) begin
      if (fire)           cnt_slots      <= cnt_slots + 1;
      else if (res_stall) cnt_res_stalls <= cnt_res_stalls + 1;
      else                cnt_bubbles    <= cnt_bubbles + 1;
    end
  end

  a_c_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             c_valid && !c_ready |=> c_valid && $stable(c_addr) && $stable(c_data));
  a_no_extra_result: assert property (@(posedge clk) disable iff (!rst_n)
                                      res_valid |-> outstanding != 0);
endmodule
