// split_word_writer: writes 64-bit results as two 32-bit halves to the same
// address of two separate 32-bit banks (bank 0 low half, bank 1 high half),
// the inverse of split_word_reader. Each bank has one output register with a
// valid/ready write port; a new 64-bit word is accepted when both registers
// are free or being emptied, so the writer sustains one word per cycle when
// both banks accept. idle is high when nothing is waiting.
module split_word_writer
  import fp64_pkg::*;
  import dgemm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  waddr_t           in_addr,
  input  fp64_t            in_data,
  output logic             in_ready,
  output logic             idle,
  output logic [1:0]       wr_valid,
  output waddr_t [1:0]     wr_addr,
  output logic [1:0][31:0] wr_data,
  input  logic [1:0]       wr_ready
);
  logic [1:0] free;
  assign free     = ~wr_valid | wr_ready;
  assign in_ready = &free;
  assign idle     = ~|wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= '0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (in_valid && in_ready) begin
          wr_valid[i] <= 1'b1;
          wr_addr[i]  <= in_addr;
          wr_data[i]  <= in_data[32*i +: 32];
        end else if (wr_ready[i]) begin
          wr_valid[i] <= 1'b0;
        end
      end
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_chk
    a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                wr_valid[i] && !wr_ready[i] |=> wr_valid[i] && $stable(wr_data[i]));
  end
endmodule
