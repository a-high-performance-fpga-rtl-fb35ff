// master_tb: the master driving a small PE chain (3 PEs, Sj = 10) from A and
// B streams with random gaps, writing C through a port with random
// back-pressure. N = 2 is chosen below the PE count so that a block's
// results cannot drain before the next block's last round: the result stall
// must occur. Checks every C word at its block-major address against a
// double-precision reference, the number of slots sent ((blocks*N+1)*Sj),
// that the A and B streams are consumed exactly, the done pulse and busy.
module master_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  localparam int P = 3, SJ = 10, N = 2, NB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  dgemm_cfg_t cfg;
  logic a_valid, a_ready, b_valid, b_ready, res_valid, res_ready, c_valid, c_ready, c_idle;
  fp64_t a_data, b_data, c_data;
  slot_t slot;
  result_t res;
  waddr_t c_addr;
  logic [31:0] cnt_slots, cnt_bubbles, cnt_res_stalls;
  fp64_t A [NB][P][N], B [NB][N][SJ], Cmem [NB*P*SJ];
  int na = 0, nb = 0, checks = 0, failures = 0, nwr = 0, ndone = 0;

  master #(.NUM_PE(P), .SJ(SJ)) dut (.*);
  pe_array #(.NUM_PE(P), .SJ(SJ), .MUL_LAT(6), .ADD_LAT(8)) u_pes (
    .clk, .rst_n, .slot_in (slot), .res_valid, .res, .res_ready);

  function automatic fp64_t rnd_fp();
    int e;
    e = 1023 + int'($urandom_range(6)) - 3;
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_c(int b, int r, int c);
    real s;
    s = 0.0;
    for (int k = 0; k < N; k++) s = s + $bitstoreal(A[b][r][k]) * $bitstoreal(B[b][k][c]);
    return $realtobits(s);
  endfunction

  // A stream: block, k, row; B stream: block, k, col (host rearranged order)
  assign a_data = (na < NB * N * P) ? A[na / (N * P)][na % P][(na / P) % N] : '0;
  assign b_data = (nb < NB * N * SJ) ? B[nb / (N * SJ)][(nb / SJ) % N][nb % SJ] : '0;
  assign c_idle = 1'b1;

  always @(posedge clk) begin
    a_valid <= (na < NB * N * P) && ($urandom_range(4) != 0);
    b_valid <= (nb < NB * N * SJ) && ($urandom_range(4) != 0);
    c_ready <= ($urandom_range(2) != 0);
    if (a_valid && a_ready) na <= na + 1;
    if (b_valid && b_ready) nb <= nb + 1;
    if (done) ndone++;
    if (rst_n && c_valid && c_ready) begin
      checks++;
      if (int'(c_addr) < 100 || int'(c_addr) >= 100 + NB * P * SJ) failures++;
      else Cmem[int'(c_addr) - 100] = c_data;
      nwr++;
    end
  end

  initial begin
    int t0;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N; k++) begin
        for (int r = 0; r < P; r++) A[b][r][k] = rnd_fp();
        for (int c = 0; c < SJ; c++) B[b][k][c] = rnd_fp();
      end
    for (int i = 0; i < NB * P * SJ; i++) Cmem[i] = '0;
    start = 0;
    cfg = '{n: 32'(N), num_blocks: 32'(NB), a_base: '0, b_base: '0, c_base: waddr_t'(100)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    t0 = 0;
    while (!done && t0 < 10000) begin @(posedge clk); t0++; end
    repeat (5) @(posedge clk);
    for (int b = 0; b < NB; b++) for (int r = 0; r < P; r++) for (int c = 0; c < SJ; c++) begin
      checks++;
      if (Cmem[b * P * SJ + r * SJ + c] !== ref_c(b, r, c)) begin
        failures++;
        if (failures < 6) $display("blk %0d C[%0d][%0d] got %h exp %h", b, r, c, Cmem[b*P*SJ + r*SJ + c], ref_c(b, r, c));
      end
    end
    checks += 6;
    if (nwr != NB * P * SJ) begin failures++; $display("writes %0d", nwr); end
    if (cnt_slots != (NB * N + 1) * SJ) begin failures++; $display("slots %0d", cnt_slots); end
    if (na != NB * N * P || nb != NB * N * SJ) begin failures++; $display("na %0d nb %0d", na, nb); end
    if (ndone != 1) failures++;
    if (busy) failures++;
    if (cnt_res_stalls == 0) begin failures++; $display("no result stall"); end
    $display("slots %0d bubbles %0d result stalls %0d", cnt_slots, cnt_bubbles, cnt_res_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
