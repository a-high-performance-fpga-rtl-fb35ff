// pe: processing element of the linear PE pipeline. PE number POS computes
// row POS of the current NUM_PE x SJ block of C.
//
// Operand path (left to right): every cycle the slot arriving from the
// previous PE (or the master) is registered and passed on unchanged, so all
// elements of A and B visit every PE, one PE per clock. The PE keeps the A
// elements tagged with its own row: they are caught in a_next during one
// round and moved to a_cur when the next round begins (slot with b_col = 0),
// so that A[POS][k+1] can arrive while A[POS][k] is still in use. Every slot
// with a B element B[k][j] starts one MAC operation
//   C[POS][j] = (k_first ? 0 : C[POS][j]) + A[POS][k] * B[k][j]
// with the partial sums held in a SJ-entry memory indexed by j. The same
// entry is read again only SJ slots later, after its previous sum has left
// the 14-stage MAC, so no forwarding is needed (SJ > ADD_LAT is required).
//
// Result path (right to left): when the k_last term of a sum leaves the
// adder, the final C value is pushed into a SJ-deep result buffer. A single
// result register per PE forms a chain towards the master; it takes a word
// from the downstream PE first and otherwise from its own buffer. res_*
// ports use valid/ready.
//
// Source: the pipelined PE chain, one A and one B element per cycle entering
// the first PE, elements selected by position, block product and re-use of
// A. The slot format, double-buffered A register, partial-sum memory and the
// result chain are this design's own choices.
module pe
  import fp64_pkg::*;
  import dgemm_pkg::*;
#(
  parameter int unsigned POS     = 0,
  parameter int unsigned SJ      = SJ_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  // operand chain
  input  slot_t   slot_in,
  output slot_t   slot_out,
  // result chain: from the next PE ...
  input  logic    res_in_valid,
  input  result_t res_in,
  output logic    res_in_ready,
  // ... towards the previous PE / the master
  output logic    res_out_valid,
  output result_t res_out,
  input  logic    res_out_ready
);
  localparam int unsigned TAG_W = COL_W + 2;
  localparam int unsigned CW    = $clog2(SJ);

  // ---------------- operand chain and A registers -------------------------
  fp64_t a_next, a_cur, a_use;
  logic  take_a, new_round;

  assign take_a    = slot_in.a_valid && (slot_in.a_row == ROW_W'(POS));
  assign new_round = slot_in.b_valid && (slot_in.b_col == '0);
  assign a_use     = new_round ? a_next : a_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_out <= '0;
      a_next   <= '0;
      a_cur    <= '0;
    end else begin
      slot_out <= slot_in;
      if (take_a)    a_next <= slot_in.a;
      if (new_round) a_cur  <= a_next;
    end
  end

  // ---------------- MAC with partial-sum memory ---------------------------
  logic             prod_valid, out_valid;
  logic [TAG_W-1:0] prod_tag, out_tag;
  fp64_t            acc_rd, out_sum;
  fp64_t            psum [SJ];
  logic [COL_W-1:0] prod_col, out_col;
  logic             prod_first, out_last;

  assign prod_col   = prod_tag[TAG_W-1:2];
  assign prod_first = prod_tag[1];
  assign out_col    = out_tag[TAG_W-1:2];
  assign out_last   = out_tag[0];
  assign acc_rd     = prod_first ? FP64_ZERO : psum[prod_col[CW-1:0]];

  fp64_mac #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .TAG_W(TAG_W)) u_mac (
    .clk, .rst_n,
    .in_valid (slot_in.b_valid),
    .in_a     (a_use),
    .in_b     (slot_in.b),
    .in_tag   ({slot_in.b_col, slot_in.k_first, slot_in.k_last}),
    .prod_valid, .prod_tag,
    .acc_in   (acc_rd),
    .out_valid, .out_sum, .out_tag
  );

  always_ff @(posedge clk) begin
    if (out_valid) psum[out_col[CW-1:0]] <= out_sum;
  end

  // ---------------- result buffer and result chain ------------------------
  result_t fifo_dout;
  logic    fifo_empty, fifo_full, fifo_pop, out_free;
  logic [$clog2(SJ+1)-1:0] fifo_count;

  sync_fifo #(.W($bits(result_t)), .DEPTH(SJ)) u_res_fifo (
    .clk, .rst_n,
    .push  (out_valid && out_last),
    .din   ({ROW_W'(POS), out_col, out_sum}),
    .pop   (fifo_pop),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  assign out_free     = !res_out_valid || res_out_ready;
  assign res_in_ready = out_free;
  assign fifo_pop     = out_free && !res_in_valid && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_out_valid <= 1'b0;
      res_out       <= '0;
    end else if (out_free) begin
      if (res_in_valid) begin
        res_out_valid <= 1'b1;
        res_out       <= res_in;
      end else if (!fifo_empty) begin
        res_out_valid <= 1'b1;
        res_out       <= fifo_dout;
      end else begin
        res_out_valid <= 1'b0;
      end
    end
  end

  // The master never lets a PE hold more than one block of results.
  a_res_room: assert property (@(posedge clk) disable iff (!rst_n)
                               !(out_valid && out_last && fifo_full));
  // A result offered on the chain stays until taken.
  a_res_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               res_out_valid && !res_out_ready |=> res_out_valid && $stable(res_out));

  initial begin
    assert (SJ > ADD_LAT) else $error("pe: SJ must exceed the adder latency");
    assert (SJ >= 2 && (1 << CW) >= SJ) else $error("pe: bad SJ");
  end
endmodule
