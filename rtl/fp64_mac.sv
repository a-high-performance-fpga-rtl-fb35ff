// fp64_mac: 64-bit floating-point multiply-accumulate unit, the processing
// core of every PE. One operation per clock: sum = acc + a * b, in
// MUL_LAT + ADD_LAT = 14 pipeline stages (the stage count the source reports
// for its MAC; the 6 + 8 split is a design choice).
//
// The accumulator value is not stored here. MUL_LAT cycles after an operand
// pair enters, the unit presents the product's tag on prod_valid/prod_tag and
// the caller answers in the same cycle with acc_in, the running sum that the
// product must be added to (read combinationally from the caller's partial
// sum memory). ADD_LAT cycles later out_valid/out_sum/out_tag carry the new
// sum. Keeping the sums outside lets one MAC interleave many independent
// dot products, which hides the adder latency: a sum is read again only
// after it has been written back.
module fp64_mac
  import fp64_pkg::*;
#(
  parameter int unsigned MUL_LAT = 6,
  parameter int unsigned ADD_LAT = 8,
  parameter int unsigned TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp64_t            in_a,
  input  fp64_t            in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             prod_valid,
  output logic [TAG_W-1:0] prod_tag,
  input  fp64_t            acc_in,
  output logic             out_valid,
  output fp64_t            out_sum,
  output logic [TAG_W-1:0] out_tag
);
  fp64_t prod;

  fp64_mul #(.LAT(MUL_LAT), .TAG_W(TAG_W)) u_mul (
    .clk, .rst_n,
    .in_valid, .in_a, .in_b, .in_tag,
    .out_valid(prod_valid), .out_p(prod), .out_tag(prod_tag)
  );

  fp64_add #(.LAT(ADD_LAT), .TAG_W(TAG_W)) u_add (
    .clk, .rst_n,
    .in_valid(prod_valid), .in_a(acc_in), .in_b(prod), .in_tag(prod_tag),
    .out_valid, .out_s(out_sum), .out_tag
  );
endmodule
