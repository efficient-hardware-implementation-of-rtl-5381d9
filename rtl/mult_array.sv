// Unsigned array multiplier: p = a * b.
//
// Built the way the reference 3x3 multiplier schematic is wired, generalised
// to any operand widths. Row j forms the bit products a[i]*b[j]. Row 0's
// lowest bit is p[0]; its other bits, with a zero on top, go to the b input
// of the first ripple-carry adder, whose a input is row 1. From then on each
// adder adds the next row to the carry and upper sum bits of the adder before
// it; the lowest sum bit of each adder is the next product bit, and the last
// adder's carry and sum bits are the top product bits. With A_W = B_W = 3
// this is exactly two 3-bit adders giving P5..P2, with P1 = S0 of the first
// adder and P0 = A0*B0.
//
// Ports: a (A_W bits), b (B_W bits) -> p (A_W+B_W bits). Combinational.
module mult_array #(
  parameter int unsigned A_W = 3,
  parameter int unsigned B_W = 3
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  // acc[j] = {carry, sum} after adding rows 0..j (shifted down j places)
  logic [A_W:0]   acc [B_W];
  logic [A_W-1:0] pp  [B_W];

  for (genvar j = 0; j < B_W; j++) begin : g_row
    assign pp[j] = a & {A_W{b[j]}};
    if (j == 0) begin : g_first
      assign acc[0] = {1'b0, pp[0]};
    end else begin : g_add
      rca #(.W(A_W)) u_add (
        .a   (pp[j]),
        .b   (acc[j-1][A_W:1]),
        .cin (1'b0),
        .s   (acc[j][A_W-1:0]),
        .cout(acc[j][A_W])
      );
      assign p[j-1] = acc[j-1][0];
    end
  end

  assign p[A_W+B_W-1:B_W-1] = acc[B_W-1];

endmodule
