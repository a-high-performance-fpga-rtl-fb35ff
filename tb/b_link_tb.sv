// b_link_tb: the FPGA2 sender (b_link_tx) and FPGA1 receiver (b_link_rx)
// joined by a link with a register in each direction, as on the board. A
// source offers a numbered B sequence with gaps; the local consumer (FPGA2's
// master) and the remote consumer (FPGA1's master) take words with
// independent random stalls, the remote one sometimes stalling long enough to
// use up all credits. Both must receive the full sequence in order, and the
// link must never overflow the receive buffer (assertion in b_link_rx).
module b_link_tb;
  import fp64_pkg::*;
  localparam int D = 4, NW = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, loc_valid, loc_ready, out_valid, out_ready;
  fp64_t in_data, loc_data, out_data;
  logic link_valid, link_credit, lv_q, lc_q;
  fp64_t link_data, ld_q;
  int checks = 0, failures = 0, sent = 0, nloc = 0, nrem = 0, credit_stalls = 0;

  b_link_tx #(.CREDITS(D)) u_tx (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .loc_valid, .loc_data, .loc_ready,
    .link_valid, .link_data, .link_credit (lc_q));
  b_link_rx #(.DEPTH(D)) u_rx (
    .clk, .rst_n, .link_valid (lv_q), .link_data (ld_q), .link_credit,
    .out_valid, .out_data, .out_ready);

  always @(posedge clk) begin
    lv_q <= rst_n && link_valid;
    ld_q <= link_data;
    lc_q <= rst_n && link_credit;
  end

  // source: a word stays offered until it is taken
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 0;
      sent     <= 0;
    end else begin
      if (in_valid && in_ready) sent <= sent + 1;
      if (!in_valid || in_ready)
        in_valid <= (sent + int'(in_valid && in_ready) < NW) && ($urandom_range(5) != 0);
    end
  end
  assign in_data = 64'(sent) ^ 64'hA5A5_0000_0000_0000;

  always @(posedge clk) begin
    loc_ready <= ($urandom_range(3) != 0);
    out_ready <= ((nrem / 50) % 2 == 0) ? ($urandom_range(3) != 0) : ($urandom_range(9) == 0);
    if (rst_n && in_valid && u_tx.credits == 0 && !u_tx.taken_link) credit_stalls++;
    if (rst_n && loc_valid && loc_ready) begin
      checks++;
      if (loc_data !== (64'(nloc) ^ 64'hA5A5_0000_0000_0000)) failures++;
      nloc++;
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== (64'(nrem) ^ 64'hA5A5_0000_0000_0000)) failures++;
      nrem++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nloc < NW || nrem < NW) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 3;
    if (nloc != NW || nrem != NW) failures++;
    if (credit_stalls == 0) begin failures++; $display("credits never ran out"); end
    if (u_tx.credits != D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: loc %0d rem %0d", nloc, nrem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
