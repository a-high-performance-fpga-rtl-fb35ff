// fp64_mul: pipelined IEEE 754 binary64 multiplier, LAT clock cycles from
// in_valid to out_valid, one new operand pair per cycle. The product is
// computed by fp64_pkg::fp64_mul_f (round to nearest even, flush-to-zero for
// subnormals) in the first stage; the remaining LAT-1 register stages carry
// the result so that synthesis can retime the significand multiplier (nine
// 18x18 DSP multipliers on the original device) across them. A tag of TAG_W
// bits travels alongside. Stage split is a design choice; the source gives
// only the 14-stage total of the MAC.
module fp64_mul
  import fp64_pkg::*;
#(
  parameter int unsigned LAT   = 6,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp64_t            in_a,
  input  fp64_t            in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp64_t            out_p,
  output logic [TAG_W-1:0] out_tag
);
  logic             v_q   [LAT];
  fp64_t            p_q   [LAT];
  logic [TAG_W-1:0] tag_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < int'(LAT); i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    p_q[0]   <= fp64_mul_f(in_a, in_b);
    tag_q[0] <= in_tag;
    for (int i = 1; i < int'(LAT); i++) begin
      p_q[i]   <= p_q[i-1];
      tag_q[i] <= tag_q[i-1];
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_p     = p_q[LAT-1];
  assign out_tag   = tag_q[LAT-1];
endmodule
