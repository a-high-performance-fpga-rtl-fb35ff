// split_word_reader_tb: two 32-bit bank models with different latencies and
// random gaps hold the low and high halves of a 64-bit sequence; the reader
// must deliver the joined words in order, with random back-pressure from the
// consumer. Checks every word and the total count, twice (restart).
module split_word_reader_tb;
  import fp64_pkg::*;
  import dgemm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  waddr_t base;
  logic [31:0] count;
  logic [1:0] req_valid, req_ready, resp_valid;
  waddr_t [1:0] req_addr;
  logic [1:0][31:0] resp_data;
  logic out_valid, out_ready;
  fp64_t out_data;
  int checks = 0, failures = 0, got = 0;

  split_word_reader #(.DEPTH(8)) dut (.*);

  sdram_bank #(.DW(32), .WORDS(512), .LAT(4), .YIELD(70)) u_lo (
    .clk, .req_valid(req_valid[0]), .req_addr(req_addr[0]), .req_ready(req_ready[0]),
    .resp_valid(resp_valid[0]), .resp_data(resp_data[0]),
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());
  sdram_bank #(.DW(32), .WORDS(512), .LAT(9), .YIELD(60)) u_hi (
    .clk, .req_valid(req_valid[1]), .req_addr(req_addr[1]), .req_ready(req_ready[1]),
    .resp_valid(resp_valid[1]), .resp_data(resp_data[1]),
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());

  function automatic fp64_t word(int i);
    return {32'h8000_0000 ^ 32'(i * 7919), 32'(i * 104729 + 3)};
  endfunction

  always @(posedge clk) out_ready <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data !== word(int'(base) + got)) begin
      failures++;
      if (failures < 5) $display("word %0d: got %h exp %h", got, out_data, word(int'(base) + got));
    end
    got++;
  end

  task automatic run(input int b, input int n);
    base = waddr_t'(b); count = 32'(n); got = 0;
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    while (got < n) @(posedge clk);
    repeat (30) @(posedge clk);
    checks++;
    if (got != n) failures++;
  endtask

  initial begin
    fp64_t w;
    for (int i = 0; i < 512; i++) begin
      w = word(i);
      u_lo.mem[i] = w[31:0];
      u_hi.mem[i] = w[63:32];
    end
    start = 0; base = '0; count = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 200);
    run(300, 150);
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
