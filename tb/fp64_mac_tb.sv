// fp64_mac_tb: self-checking test of the 64-bit multiply-accumulate unit.
// Random normal operands (and a few special values) enter one per cycle; the
// accumulator operand is answered from a table indexed by the product tag.
// Every sum is compared bit for bit with acc + a*b computed in the
// simulator's double-precision arithmetic (two roundings, as in the unit),
// and the latency from input to output is checked to be the 14 stages.
module fp64_mac_tb;
  import fp64_pkg::*;
  localparam int MUL_LAT = 6, ADD_LAT = 8, NOPS = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, prod_valid, out_valid;
  fp64_t in_a, in_b, acc_in, out_sum;
  logic [15:0] in_tag, prod_tag, out_tag;
  fp64_t va [NOPS], vb [NOPS], vc [NOPS];
  int unsigned t_in [NOPS];
  int checks = 0, failures = 0, cyc = 0, nout = 0;

  fp64_mac #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .TAG_W(16)) dut (.*);

  assign acc_in = vc[prod_tag[11:0]];

  function automatic fp64_t rnd_fp(int span);
    int e;
    e = 1023 + int'($urandom_range(2*span)) - span;
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_mac(fp64_t a, fp64_t b, fp64_t c);
    real p;
    p = $bitstoreal(a) * $bitstoreal(b);
    return $realtobits($bitstoreal(c) + p);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < NOPS; i++) begin
      va[i] = rnd_fp(20);
      vb[i] = rnd_fp(20);
      // mostly comparable magnitudes so cancellation and rounding are exercised
      vc[i] = (i % 3 == 0) ? rnd_fp(40) : $realtobits(-$bitstoreal(va[i]) * $bitstoreal(vb[i]) * (1.0 + real'($urandom_range(100)) / 1.0e6));
    end
    // special cases
    va[0] = 64'h3FF0_0000_0000_0000; vb[0] = 64'h4000_0000_0000_0000; vc[0] = 64'h0;  // 1*2+0
    va[1] = 64'h0;                   vb[1] = rnd_fp(5);               vc[1] = rnd_fp(5);
    va[2] = 64'h3FF0_0000_0000_0000; vb[2] = 64'h3FF0_0000_0000_0000; vc[2] = 64'hBFF0_0000_0000_0000; // exact cancel
    va[3] = 64'h3FF0_0000_0000_0001; vb[3] = 64'h3FF0_0000_0000_0001; vc[3] = 64'h0;  // rounding of product
    va[4] = 64'h4340_0000_0000_0000; vb[4] = 64'h3FF0_0000_0000_0000; vc[4] = 64'h3FF0_0000_0000_0000; // 2^53 + 1: tie
    va[5] = 64'h4340_0000_0000_0000; vb[5] = 64'h3FF0_0000_0000_0000; vc[5] = 64'h4008_0000_0000_0000; // 2^53 + 3: tie up
  end

  // driver
  initial begin
    in_valid = 0; in_a = '0; in_b = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      if (i % 7 == 3) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; in_a <= va[i]; in_b <= vb[i]; in_tag <= 16'(i);
      t_in[i] = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  // checker
  fp64_t exp_s;
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_s = ref_mac(va[out_tag[11:0]], vb[out_tag[11:0]], vc[out_tag[11:0]]);
    checks++;
    if (out_sum !== exp_s) begin
      failures++;
      if (failures < 10) $display("MISMATCH op %0d: %h*%h+%h got %h exp %h", out_tag, va[out_tag[11:0]], vb[out_tag[11:0]], vc[out_tag[11:0]], out_sum, exp_s);
    end
    checks++;
    // inputs are driven after edge t_in and sampled at edge t_in+1; the
    // result is seen by this checker one edge after it appears
    if (cyc - int'(t_in[out_tag[11:0]]) != MUL_LAT + ADD_LAT + 1) begin
      failures++;
      if (failures < 10) $display("LATENCY op %0d: %0d cycles", out_tag, cyc - int'(t_in[out_tag[11:0]]));
    end
    checks++;
    if (int'(out_tag) != nout) failures++;
    nout++;
    if (nout == NOPS) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NOPS * 2 + 200) @(posedge clk);
    failures++;
    $display("watchdog: only %0d results", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
