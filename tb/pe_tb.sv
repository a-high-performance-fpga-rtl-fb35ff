// pe_tb: one processing element at position POS = 1 in a stream meant for
// three PEs. Checks (1) that every slot is forwarded unchanged one cycle
// later, (2) that the PE keeps only the A elements of its own row and
// produces row 1 of each C block bit-exact (double-precision reference),
// (3) that results arriving from the downstream PE pass through, ahead of
// the PE's own results, with random back-pressure.
module pe_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  localparam int P = 3, POS = 1, SJ = 12, N = 4, NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  slot_t slot_in, slot_out, slot_prev;
  logic res_in_valid, res_in_ready, res_out_valid, res_out_ready;
  result_t res_in, res_out;
  fp64_t A [NB][P][N], B [NB][N][SJ];
  int checks = 0, failures = 0, nown = 0, npass = 0, sent_pass = 0;

  pe #(.POS(POS), .SJ(SJ), .MUL_LAT(6), .ADD_LAT(8)) dut (.*);

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

  // forwarding check
  always @(posedge clk) begin
    slot_prev <= slot_in;
    if (rst_n) begin
      checks++;
      if (slot_out !== slot_prev) failures++;
    end
  end

  // downstream results: tagged row 7, data = sequence number
  always @(posedge clk) begin
    res_out_ready <= ($urandom_range(3) != 0);
    if (!rst_n) sent_pass <= 0;
    else if (res_in_valid && res_in_ready) sent_pass <= sent_pass + 1;
  end
  assign res_in_valid = rst_n && (sent_pass < 20);
  assign res_in       = '{row: 8'd7, col: 8'd0, data: 64'(sent_pass)};

  always @(posedge clk) if (rst_n && res_out_valid && res_out_ready) begin
    checks++;
    if (res_out.row == 8'd7) begin
      if (res_out.data !== 64'(npass)) failures++;
      npass++;
    end else begin
      int b;
      b = nown / SJ;
      if (res_out.row != 8'(POS) || res_out.data !== ref_c(b, POS, int'(res_out.col))) begin
        failures++;
        if (failures < 6) $display("C[%0d][%0d] got %h exp %h", res_out.row, res_out.col, res_out.data, ref_c(b, POS, int'(res_out.col)));
      end
      nown++;
    end
  end

  initial begin
    int kb;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N; k++) begin
        for (int r = 0; r < P; r++) A[b][r][k] = rnd_fp();
        for (int c = 0; c < SJ; c++) B[b][k][c] = rnd_fp();
      end
    slot_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int g = 0; g <= NB * N; g++) begin
      kb = (g == 0) ? 0 : (g - 1) % N;
      if (g != 0 && kb == N - 1) while (nown < ((g - 1) / N) * SJ) begin
        slot_in <= '0; @(posedge clk);
      end
      for (int j = 0; j < SJ; j++) begin
        if ($urandom_range(4) == 0) begin slot_in <= '0; @(posedge clk); end
        slot_in.a_valid <= (g < NB * N) && (j < P);
        slot_in.a_row   <= ROW_W'(j);
        slot_in.a       <= (g < NB * N && j < P) ? A[g / N][j][g % N] : '0;
        slot_in.b_valid <= (g != 0);
        slot_in.b_col   <= COL_W'(j);
        slot_in.k_first <= (kb == 0);
        slot_in.k_last  <= (kb == N - 1);
        slot_in.b       <= (g != 0) ? B[(g - 1) / N][kb][j] : '0;
        @(posedge clk);
      end
    end
    slot_in <= '0;
    while (nown < NB * SJ || npass < 20) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (nown != NB * SJ || npass != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: own %0d pass %0d", nown, npass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
