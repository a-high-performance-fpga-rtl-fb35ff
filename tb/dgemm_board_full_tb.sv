// dgemm_board_full_tb: end-to-end test of the dual-FPGA board with every parameter at its
// default (14 PEs per FPGA, C blocks of 14 x 32, 14-stage MAC). Matrix sizes
// are kept small (C of 56 x 64, inner dimension 40) so that it runs quickly.
// The testbench plays the host: it builds random matrices A (M x N) and
// B (N x K), rearranges them into the stream order (upper half of A for
// FPGA 1, lower half for FPGA 2, each 64-bit word split over the FPGA's two
// 32-bit banks; B once, in FPGA 2's SODIMM bank), programs both FPGAs
// through their register buses, starts them, polls STATUS.done, and reads
// the C words back out of the four banks. Every element of C is compared bit
// for bit with the dot product computed in double precision in the same
// order. The memory models accept requests on a random 75 % of the cycles (45 % for
// FPGA 1, which makes FPGA 1 the slower consumer of the shared B stream).
// RUNS operations are made, the second with N = 1 so that results pile up
// and the master's result stall is exercised. Counted and required at least
// once: memory gaps, stream bubbles, result stalls, link credit exhaustion
// (FPGA 1 slower than FPGA 2), write back-pressure. The SLOTS register must
// equal (blocks*N + 1)*SJ, the stream rate of one A and one B element per
// slot.
module dgemm_board_full_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  localparam int P  = 14;
  localparam int SJ = 32;
  localparam int M  = 56;           // rows of A and C (both FPGAs)
  localparam int K  = 64;           // columns of B and C
  localparam int NMAX = 40;         // inner dimension of the first run
  localparam int MH = M / 2;         // rows per FPGA
  localparam int BR = (MH + P - 1) / P;    // block rows per FPGA
  localparam int BC = (K + SJ - 1) / SJ;   // block columns
  localparam int NB = BR * BC;
  localparam int WORDS = 16384;
  localparam int WORDS_B = 16384;      // SODIMM words
  localparam int C_BASE = 8192;
  localparam int RUNS = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // board ports
  logic f1_reg_wr, f1_reg_rd, f2_reg_wr, f2_reg_rd;
  logic [3:0] f1_reg_addr, f2_reg_addr;
  logic [31:0] f1_reg_wdata, f1_reg_rdata, f2_reg_wdata, f2_reg_rdata;
  logic [1:0] f1_a_req_valid, f1_a_req_ready, f1_a_resp_valid, f1_c_wr_valid, f1_c_wr_ready;
  logic [1:0] f2_a_req_valid, f2_a_req_ready, f2_a_resp_valid, f2_c_wr_valid, f2_c_wr_ready;
  waddr_t [1:0] f1_a_req_addr, f1_c_wr_addr, f2_a_req_addr, f2_c_wr_addr;
  logic [1:0][31:0] f1_a_resp_data, f1_c_wr_data, f2_a_resp_data, f2_c_wr_data;
  logic f2_b_req_valid, f2_b_req_ready, f2_b_resp_valid, f1_busy, f1_done, f2_busy, f2_done;
  waddr_t f2_b_req_addr;
  fp64_t f2_b_resp_data;

  dgemm_board dut (.*);

  // memory: bank index 0 low half, 1 high half
  for (genvar i = 0; i < 2; i++) begin : g_mem
    sdram_bank #(.DW(32), .WORDS(WORDS), .LAT(7 + i), .YIELD(45)) u_f1 (
      .clk, .req_valid(f1_a_req_valid[i]), .req_addr(f1_a_req_addr[i]), .req_ready(f1_a_req_ready[i]),
      .resp_valid(f1_a_resp_valid[i]), .resp_data(f1_a_resp_data[i]),
      .wr_valid(f1_c_wr_valid[i]), .wr_addr(f1_c_wr_addr[i]), .wr_data(f1_c_wr_data[i]),
      .wr_ready(f1_c_wr_ready[i]));
    sdram_bank #(.DW(32), .WORDS(WORDS), .LAT(6 + 2 * i), .YIELD(75)) u_f2 (
      .clk, .req_valid(f2_a_req_valid[i]), .req_addr(f2_a_req_addr[i]), .req_ready(f2_a_req_ready[i]),
      .resp_valid(f2_a_resp_valid[i]), .resp_data(f2_a_resp_data[i]),
      .wr_valid(f2_c_wr_valid[i]), .wr_addr(f2_c_wr_addr[i]), .wr_data(f2_c_wr_data[i]),
      .wr_ready(f2_c_wr_ready[i]));
  end
  sdram_bank #(.DW(64), .WORDS(WORDS_B), .LAT(8), .YIELD(75)) u_sodimm (
    .clk, .req_valid(f2_b_req_valid), .req_addr(f2_b_req_addr), .req_ready(f2_b_req_ready),
    .resp_valid(f2_b_resp_valid), .resp_data(f2_b_resp_data),
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());

  fp64_t A [M][NMAX], B [NMAX][K];
  int checks = 0, failures = 0, cyc = 0;
  int link_starved = 0, wr_stalls = 0, mem_gaps = 0, bubbles = 0, res_stalls = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_fpga2.g_b_source.u_link_tx.credits == 0 && dut.u_fpga2.g_b_source.u_link_tx.in_valid) link_starved++;
    if ((f1_c_wr_valid & ~f1_c_wr_ready) != 0 || (f2_c_wr_valid & ~f2_c_wr_ready) != 0) wr_stalls++;
  end

  function automatic fp64_t rnd_fp();
    int e;
    e = 1023 + int'($urandom_range(8)) - 4;
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_c(int r, int c, int n);
    real s;
    s = 0.0;
    for (int k = 0; k < n; k++) s = s + $bitstoreal(A[r][k]) * $bitstoreal(B[k][c]);
    return $realtobits(s);
  endfunction

  task automatic reg_write(input int f, input int a, input logic [31:0] d);
    @(posedge clk);
    if (f == 1) begin f1_reg_wr <= 1; f1_reg_addr <= 4'(a); f1_reg_wdata <= d; end
    else        begin f2_reg_wr <= 1; f2_reg_addr <= 4'(a); f2_reg_wdata <= d; end
    @(posedge clk);
    f1_reg_wr <= 0; f2_reg_wr <= 0;
  endtask

  task automatic reg_read(input int f, input int a, output logic [31:0] d);
    @(posedge clk);
    if (f == 1) begin f1_reg_rd <= 1; f1_reg_addr <= 4'(a); end
    else        begin f2_reg_rd <= 1; f2_reg_addr <= 4'(a); end
    @(posedge clk);
    f1_reg_rd <= 0; f2_reg_rd <= 0;
    @(posedge clk);
    d = (f == 1) ? f1_reg_rdata : f2_reg_rdata;
  endtask

  // host rearrangement of A (one FPGA) and B into stream order
  task automatic load(input int n);
    int w;
    fp64_t v;
    for (int f = 0; f < 2; f++) begin
      w = 0;
      for (int br = 0; br < BR; br++) for (int bc = 0; bc < BC; bc++)
        for (int k = 0; k < n; k++) for (int p = 0; p < P; p++) begin
          int r;
          r = br * P + p;
          v = (r < MH) ? A[f * MH + r][k] : '0;   // padding rows are zero
          if (f == 0) begin g_mem[0].u_f1.mem[w] = v[31:0]; g_mem[1].u_f1.mem[w] = v[63:32]; end
          else        begin g_mem[0].u_f2.mem[w] = v[31:0]; g_mem[1].u_f2.mem[w] = v[63:32]; end
          w++;
        end
    end
    w = 0;
    for (int br = 0; br < BR; br++) for (int bc = 0; bc < BC; bc++)
      for (int k = 0; k < n; k++) for (int j = 0; j < SJ; j++) begin
        int c;
        c = bc * SJ + j;
        u_sodimm.mem[w] = (c < K) ? B[k][c] : '0;
        w++;
      end
  endtask

  task automatic run(input int n);
    logic [31:0] d1, d2, s1, s2;
    int t0;
    for (int f = 1; f <= 2; f++) begin
      reg_write(f, 2, 32'(n));
      reg_write(f, 3, 32'(NB));
      reg_write(f, 4, 32'd0);
      reg_write(f, 5, 32'd0);
      reg_write(f, 6, 32'(C_BASE));
      reg_write(f, 1, 32'b10);
    end
    reg_write(1, 0, 32'd1);
    reg_write(2, 0, 32'd1);
    t0 = cyc;
    d1 = 0; d2 = 0;
    while (!(d1[1] && d2[1]) && cyc - t0 < 1000000) begin
      repeat (50) @(posedge clk);
      reg_read(1, 1, d1);
      reg_read(2, 1, d2);
    end
    checks++;
    if (!(d1[1] && d2[1])) begin failures++; $display("run n=%0d did not finish", n); end
    // results: C[f*MH + br*P + p][bc*SJ + j] at C_BASE + blk*P*SJ + p*SJ + j
    for (int f = 0; f < 2; f++)
      for (int br = 0; br < BR; br++) for (int bc = 0; bc < BC; bc++)
        for (int p = 0; p < P; p++) for (int j = 0; j < SJ; j++) begin
          int r, c, a;
          fp64_t got;
          r = br * P + p; c = bc * SJ + j;
          a = C_BASE + (br * BC + bc) * P * SJ + p * SJ + j;
          if (f == 0) got = {g_mem[1].u_f1.mem[a], g_mem[0].u_f1.mem[a]};
          else        got = {g_mem[1].u_f2.mem[a], g_mem[0].u_f2.mem[a]};
          if (r < MH && c < K) begin
            checks++;
            if (got !== ref_c(f * MH + r, c, n)) begin
              failures++;
              if (failures < 6) $display("n=%0d C[%0d][%0d] got %h exp %h", n, f * MH + r, c, got, ref_c(f * MH + r, c, n));
            end
          end
        end
    for (int f = 1; f <= 2; f++) begin
      reg_read(f, 8, s1);
      checks++;
      if (s1 != 32'((NB * n + 1) * SJ)) begin failures++; $display("FPGA%0d slots %0d", f, s1); end
      reg_read(f, 9, s2);
      bubbles += int'(s2);
      reg_read(f, 10, s2);
      res_stalls += int'(s2);
      reg_read(f, 7, s2);
      $display("FPGA%0d n=%0d: %0d cycles for %0d slots (%0d blocks of %0dx%0d)", f, n, s2, s1, NB, P, SJ);
    end
  endtask

  initial begin
    f1_reg_wr = 0; f1_reg_rd = 0; f1_reg_addr = '0; f1_reg_wdata = '0;
    f2_reg_wr = 0; f2_reg_rd = 0; f2_reg_addr = '0; f2_reg_wdata = '0;
    for (int r = 0; r < M; r++) for (int k = 0; k < NMAX; k++) A[r][k] = rnd_fp();
    for (int k = 0; k < NMAX; k++) for (int c = 0; c < K; c++) B[k][c] = rnd_fp();
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(NMAX);
    run(NMAX);
    if (1) begin
      load(1);
      run(1);
    end
    mem_gaps = int'(g_mem[0].u_f1.n_gaps + g_mem[1].u_f1.n_gaps + g_mem[0].u_f2.n_gaps
                    + g_mem[1].u_f2.n_gaps + u_sodimm.n_gaps);
    $display("mechanisms: memory gaps %0d, stream bubbles %0d, result stalls %0d, link credit stalls %0d, write stalls %0d",
             mem_gaps, bubbles, res_stalls, link_starved, wr_stalls);
    if (1) begin
    checks += 5;
    if (mem_gaps == 0)     begin failures++; $display("no memory gap"); end
    if (bubbles == 0)      begin failures++; $display("no stream bubble"); end
    if (res_stalls == 0)   begin failures++; $display("no result stall"); end
    if (link_starved == 0) begin failures++; $display("link credits never ran out"); end
    if (wr_stalls == 0)    begin failures++; $display("no write back-pressure"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
