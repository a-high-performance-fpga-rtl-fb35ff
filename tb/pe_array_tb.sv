// pe_array_tb: drives the PE chain directly with the operand stream format
// of the master (rounds of SJ slots; A column for the next round in the first
// NUM_PE slots; B row with first/last flags) for several C blocks, with
// random bubbles in the stream and random back-pressure on the result
// output. Every result is checked bit for bit against the dot product
// computed in double precision in the same order (sum starts at zero,
// k = 0..N-1), and each (row, col) must come back exactly once per block.
// The cycle count of the stream is checked against (blocks*N+1)*SJ slots
// plus the bubbles inserted.
module pe_array_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  localparam int P = 3, SJ = 10, N = 5, NB = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  slot_t slot_in;
  logic res_valid, res_ready;
  result_t res;
  fp64_t A [NB][P][N], B [NB][N][SJ];
  int seen [NB][P][SJ];
  int checks = 0, failures = 0, nres = 0, cyc = 0, bubbles = 0;

  pe_array #(.NUM_PE(P), .SJ(SJ), .MUL_LAT(6), .ADD_LAT(8)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp64_t rnd_fp();
    int e;
    e = 1023 + int'($urandom_range(8)) - 4;
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_c(int b, int r, int c);
    real s;
    s = 0.0;
    for (int k = 0; k < N; k++) s = s + $bitstoreal(A[b][r][k]) * $bitstoreal(B[b][k][c]);
    return $realtobits(s);
  endfunction

  always @(posedge clk) res_ready <= ($urandom_range(4) != 0);

  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    int b;
    b = nres / (P * SJ);
    checks++;
    if (res.data !== ref_c(b, int'(res.row), int'(res.col))) begin
      failures++;
      if (failures < 6) $display("blk %0d C[%0d][%0d] got %h exp %h", b, res.row, res.col, res.data, ref_c(b, int'(res.row), int'(res.col)));
    end
    seen[b][res.row][res.col]++;
    nres++;
  end

  initial begin
    int g, kb, t0, slots;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N; k++) begin
        for (int r = 0; r < P; r++) A[b][r][k] = rnd_fp();
        for (int c = 0; c < SJ; c++) B[b][k][c] = rnd_fp();
      end
    for (int b = 0; b < NB; b++) for (int r = 0; r < P; r++) for (int c = 0; c < SJ; c++) seen[b][r][c] = 0;
    slot_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    t0 = cyc; slots = 0;
    for (g = 0; g <= NB * N; g++) begin
      kb = (g == 0) ? 0 : (g - 1) % N;
      // the last round of a block waits until the previous block is out
      if (g != 0 && kb == N - 1) while (nres < ((g - 1) / N) * P * SJ) begin
        slot_in <= '0; bubbles++; @(posedge clk);
      end
      for (int j = 0; j < SJ; j++) begin
        if ($urandom_range(5) == 0) begin
          slot_in <= '0; bubbles++; @(posedge clk);
        end
        slot_in.a_valid <= (g < NB * N) && (j < P);
        slot_in.a_row   <= ROW_W'(j);
        slot_in.a       <= (g < NB * N && j < P) ? A[g / N][j][g % N] : '0;
        slot_in.b_valid <= (g != 0);
        slot_in.b_col   <= COL_W'(j);
        slot_in.k_first <= (kb == 0);
        slot_in.k_last  <= (kb == N - 1);
        slot_in.b       <= (g != 0) ? B[(g - 1) / N][kb][j] : '0;
        slots++;
        @(posedge clk);
      end
    end
    slot_in <= '0;
    checks++;
    if (cyc - t0 != slots + bubbles) failures++;
    while (nres < NB * P * SJ) @(posedge clk);
    repeat (50) @(posedge clk);
    for (int b = 0; b < NB; b++) for (int r = 0; r < P; r++) for (int c = 0; c < SJ; c++) begin
      checks++;
      if (seen[b][r][c] != 1) failures++;
    end
    checks++;
    if (nres != NB * P * SJ) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
