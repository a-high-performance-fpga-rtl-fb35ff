// ctrl_regs_tb: writes and reads back every configuration register through
// the host register bus, checks the configuration outputs, the one-cycle
// start pulse (and that start is ignored while busy), the busy cycle
// counter, the sticky done flag and its write-1-to-clear, and the read-only
// event counters.
module ctrl_regs_tb;
  import dgemm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_wr, reg_rd, start, busy, done;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata, cnt_slots, cnt_bubbles, cnt_res_stalls;
  dgemm_cfg_t cfg;
  int checks = 0, failures = 0, nstart = 0;

  ctrl_regs dut (.*);

  always @(posedge clk) if (start) nstart++;

  task automatic wr(input int a, input logic [31:0] d);
    @(posedge clk) begin reg_wr <= 1; reg_addr <= 4'(a); reg_wdata <= d; end
    @(posedge clk) reg_wr <= 0;
  endtask

  task automatic rd_check(input int a, input logic [31:0] exp_d);
    @(posedge clk) begin reg_rd <= 1; reg_addr <= 4'(a); end
    @(posedge clk) reg_rd <= 0;
    #1;
    checks++;
    if (reg_rdata !== exp_d) begin
      failures++;
      $display("reg %0d: %h exp %h", a, reg_rdata, exp_d);
    end
  endtask

  initial begin
    reg_wr = 0; reg_rd = 0; reg_addr = '0; reg_wdata = '0; busy = 0; done = 0;
    cnt_slots = 32'd11; cnt_bubbles = 32'd22; cnt_res_stalls = 32'd33;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(2, 32'd1000); wr(3, 32'd36); wr(4, 32'h100); wr(5, 32'h200000); wr(6, 32'h300000);
    rd_check(2, 32'd1000); rd_check(3, 32'd36); rd_check(4, 32'h100);
    rd_check(5, 32'h200000); rd_check(6, 32'h300000);
    checks++;
    if (cfg.n != 1000 || cfg.num_blocks != 36 || cfg.a_base != 'h100 || cfg.b_base != 'h200000 || cfg.c_base != 'h300000) failures++;
    rd_check(8, 32'd11); rd_check(9, 32'd22); rd_check(10, 32'd33);
    // start pulse, then a busy period of 25 cycles
    wr(0, 32'd1);
    @(posedge clk);          // start is registered
    @(posedge clk);
    checks++;
    if (nstart != 1) begin failures++; $display("start pulses %0d", nstart); end
    busy <= 1;
    repeat (25) @(posedge clk);
    wr(0, 32'd1);            // ignored while busy
    checks++;
    if (nstart != 1) failures++;
    busy <= 0; done <= 1;
    @(posedge clk) done <= 0;
    rd_check(7, 32'd27);     // 25 + the two cycles of the ignored write
    rd_check(1, 32'b10);
    rd_check(1, 32'b10);     // sticky
    wr(1, 32'b10);
    rd_check(1, 32'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
