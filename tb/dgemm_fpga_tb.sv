// dgemm_fpga_tb: one FPGA design on its own, configured as FPGA 2 (B read
// from its SODIMM bank and forwarded on the link), at reduced size (4 PEs,
// C blocks of 4 x 10). The testbench is the host and the far end of the link:
// it loads a rearranged A and B, programs the registers, starts the run and
// polls STATUS.done; it takes the forwarded B words with random stalls,
// returns one credit per word and checks the forwarded sequence. Every C
// word is checked against a double-precision reference, and the CYCLES and
// SLOTS registers against the expected slot count.
module dgemm_fpga_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  localparam int P = 4, SJ = 10, N = 7, NB = 3, WORDS = 2048, C_BASE = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_wr, reg_rd, busy, done;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [1:0] a_req_valid, a_req_ready, a_resp_valid, c_wr_valid, c_wr_ready;
  waddr_t [1:0] a_req_addr, c_wr_addr;
  logic [1:0][31:0] a_resp_data, c_wr_data;
  logic b_req_valid, b_req_ready, b_resp_valid;
  waddr_t b_req_addr;
  fp64_t b_resp_data;
  logic link_tx_valid, link_tx_credit, link_rx_valid, link_rx_credit;
  fp64_t link_tx_data, link_rx_data;

  dgemm_fpga #(.FPGA_ID(2), .NUM_PE(P), .SJ(SJ), .MUL_LAT(6), .ADD_LAT(8), .LINK_DEPTH(8)) dut (.*);

  for (genvar i = 0; i < 2; i++) begin : g_mem
    sdram_bank #(.DW(32), .WORDS(WORDS), .LAT(6 + i), .YIELD(75)) u_bank (
      .clk, .req_valid(a_req_valid[i]), .req_addr(a_req_addr[i]), .req_ready(a_req_ready[i]),
      .resp_valid(a_resp_valid[i]), .resp_data(a_resp_data[i]),
      .wr_valid(c_wr_valid[i]), .wr_addr(c_wr_addr[i]), .wr_data(c_wr_data[i]),
      .wr_ready(c_wr_ready[i]));
  end
  sdram_bank #(.DW(64), .WORDS(WORDS), .LAT(8), .YIELD(75)) u_sodimm (
    .clk, .req_valid(b_req_valid), .req_addr(b_req_addr), .req_ready(b_req_ready),
    .resp_valid(b_resp_valid), .resp_data(b_resp_data),
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());

  assign link_rx_valid = 1'b0;
  assign link_rx_data  = '0;

  fp64_t A [NB][P][N], B [NB][N][SJ];
  fp64_t far_q [$];
  int checks = 0, failures = 0, nfar = 0;

  // far end of the link: buffer of 8, drained with random stalls
  always @(posedge clk) begin
    link_tx_credit <= 1'b0;
    if (rst_n && link_tx_valid) far_q.push_back(link_tx_data);
    if (far_q.size() > 0 && $urandom_range(2) == 0) begin
      fp64_t w;
      w = far_q.pop_front();
      checks++;
      if (w !== u_sodimm.mem[nfar]) failures++;
      nfar++;
      link_tx_credit <= 1'b1;
    end
    if (far_q.size() > 8) failures++;
  end

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

  task automatic reg_write(input int a, input logic [31:0] d);
    @(posedge clk) begin reg_wr <= 1; reg_addr <= 4'(a); reg_wdata <= d; end
    @(posedge clk) reg_wr <= 0;
  endtask

  task automatic reg_read(input int a, output logic [31:0] d);
    @(posedge clk) begin reg_rd <= 1; reg_addr <= 4'(a); end
    @(posedge clk) reg_rd <= 0;
    @(posedge clk) d = reg_rdata;
  endtask

  initial begin
    int w;
    logic [31:0] st, slots;
    fp64_t v, got;
    reg_wr = 0; reg_rd = 0; reg_addr = '0; reg_wdata = '0;
    w = 0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < N; k++) begin
      for (int r = 0; r < P; r++) begin
        A[b][r][k] = rnd_fp();
        v = A[b][r][k];
        g_mem[0].u_bank.mem[w] = v[31:0];
        g_mem[1].u_bank.mem[w] = v[63:32];
        w++;
      end
    end
    w = 0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < N; k++) for (int c = 0; c < SJ; c++) begin
      B[b][k][c] = rnd_fp();
      u_sodimm.mem[w] = B[b][k][c];
      w++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    reg_write(2, N); reg_write(3, NB); reg_write(4, 0); reg_write(5, 0); reg_write(6, C_BASE);
    reg_write(0, 1);
    st = 0;
    while (!st[1]) begin
      repeat (20) @(posedge clk);
      reg_read(1, st);
    end
    for (int b = 0; b < NB; b++) for (int r = 0; r < P; r++) for (int c = 0; c < SJ; c++) begin
      int a;
      a = C_BASE + b * P * SJ + r * SJ + c;
      got = {g_mem[1].u_bank.mem[a], g_mem[0].u_bank.mem[a]};
      checks++;
      if (got !== ref_c(b, r, c)) begin
        failures++;
        if (failures < 6) $display("blk %0d C[%0d][%0d] got %h exp %h", b, r, c, got, ref_c(b, r, c));
      end
    end
    reg_read(8, slots);
    reg_read(7, st);
    $display("%0d cycles for %0d slots", st, slots);
    checks += 3;
    if (slots != (NB * N + 1) * SJ) failures++;
    if (st < slots) failures++;
    if (nfar != NB * N * SJ) begin failures++; $display("forwarded %0d", nfar); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
