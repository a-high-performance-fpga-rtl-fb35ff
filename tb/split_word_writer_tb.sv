// split_word_writer_tb: random 64-bit words at random addresses are written
// through the writer into two 32-bit bank models with random write gaps;
// afterwards both halves of every word are checked in the banks. Also checks
// that the writer reaches one word per cycle when both banks accept.
module split_word_writer_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, idle;
  waddr_t in_addr;
  fp64_t in_data;
  logic [1:0] wr_valid, wr_ready;
  waddr_t [1:0] wr_addr;
  logic [1:0][31:0] wr_data;
  fp64_t expect_w [256];
  int checks = 0, failures = 0;
  logic full_rate = 0;

  split_word_writer dut (.*);

  for (genvar i = 0; i < 2; i++) begin : g_bank
    logic [31:0] mem [256];
    always @(posedge clk) begin
      if (wr_valid[i] && wr_ready[i]) mem[wr_addr[i][7:0]] <= wr_data[i];
      wr_ready[i] <= full_rate || ($urandom_range(99) < 65);
    end
  end

  initial begin
    int cyc0, n;
    in_valid = 0; in_addr = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      expect_w[a] = {$urandom, $urandom};
      in_valid <= 1; in_addr <= waddr_t'(a); in_data <= expect_w[a];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    while (!idle) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      checks++;
      if ({g_bank[1].mem[a], g_bank[0].mem[a]} !== expect_w[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d: %h%h exp %h", a, g_bank[1].mem[a], g_bank[0].mem[a], expect_w[a]);
      end
    end
    // throughput with both banks always ready: 64 words in 64 cycles
    full_rate = 1;
    repeat (3) @(posedge clk);
    cyc0 = 0; n = 0;
    for (int a = 0; a < 64; a++) begin
      in_valid <= 1; in_addr <= waddr_t'(a); in_data <= {32'(a), 32'(~a)};
      @(posedge clk);
      cyc0++;
      if (in_ready) n++;
    end
    in_valid <= 0;
    checks++;
    if (n != 64) begin failures++; $display("full-rate accepted %0d of 64", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
