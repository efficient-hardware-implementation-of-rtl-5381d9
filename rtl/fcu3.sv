// fcu3 -- 3-parallel fast convolution unit (3-tap fast FIR filter).
//
// Computes y(n) = h0*x(n) + h1*x(n-1) + h2*x(n-2) on a sample stream that
// arrives three samples per clock: x[0], x[1], x[2] are x(3m), x(3m+1),
// x(3m+2) and y[0..2] are y(3m)..y(3m+2) of the same block m. A direct filter
// needs nine multiplications per block; the fast FIR algorithm (FFA) needs six:
//   p0 = h0*x0               p3 = (h0+h1)*(x0+x1)
//   p1 = h1*x1               p4 = (h1+h2)*(x1+x2)
//   p2 = h2*x2               p5 = (h0+h1+h2)*(x0+x1+x2)
//   y0 = p0 - D(p2) + D(p4 - p1)
//   y1 = (p3 - p1) - (p0 - D(p2))
//   y2 = p5 - (p3 - p1) - (p4 - p1)
// where D() is the value of the previous block (a delay of one clock, i.e.
// three samples). The equations, the six multiplier inputs and the two delay
// registers follow the reference FCU structure; the multipliers are array
// multipliers of the reference's kind, sized to their operands.
//
// All arithmetic is modulo 2^(2*DW+4), the width of the widest product. Intermediate terms such as p0 - D(p2)
// can be negative, but every output is a non-negative sum of products that
// fits in FCU_W bits, so the low bits of the modular result are exact.
//
// Interface: h[0..2] are the filter taps (held steady while streaming), x is
// the input block, en marks a valid block. The outputs are combinational
// from x and h. The two delay registers load on a clock edge with en high
// and hold otherwise, so a gap in the stream (en low) is harmless. A reset
// (rst_n low, synchronous) clears them, i.e. the samples before the first
// block are taken as zero. Reset and en are this design's choice.
module fcu3
  import cnn_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [DW-1:0]       h [3],
  input  logic [DW-1:0]       x [3],
  output logic [2*DW+1:0]     y [3]
);

  localparam int unsigned PW = 2 * (DW + 2);   // internal width
  typedef logic [PW-1:0] acc_t;

  // pre-additions
  logic [DW:0]   xs01, xs12, hs01, hs12;
  logic [DW+1:0] xs012, hs012;

  assign xs01  = {1'b0, x[0]} + {1'b0, x[1]};
  assign xs12  = {1'b0, x[1]} + {1'b0, x[2]};
  assign xs012 = {1'b0, xs01} + {2'b00, x[2]};
  assign hs01  = {1'b0, h[0]} + {1'b0, h[1]};
  assign hs12  = {1'b0, h[1]} + {1'b0, h[2]};
  assign hs012 = {1'b0, hs01} + {2'b00, h[2]};

  // the six sub-filter products
  logic [2*DW-1:0] m0, m1, m2;
  logic [2*DW+1:0] m3, m4;
  logic [2*DW+3:0] m5;

  mult_array #(.A_W(DW),   .B_W(DW))   u_m0 (.a(x[0]),  .b(h[0]),  .p(m0));
  mult_array #(.A_W(DW),   .B_W(DW))   u_m1 (.a(x[1]),  .b(h[1]),  .p(m1));
  mult_array #(.A_W(DW),   .B_W(DW))   u_m2 (.a(x[2]),  .b(h[2]),  .p(m2));
  mult_array #(.A_W(DW+1), .B_W(DW+1)) u_m3 (.a(xs01),  .b(hs01),  .p(m3));
  mult_array #(.A_W(DW+1), .B_W(DW+1)) u_m4 (.a(xs12),  .b(hs12),  .p(m4));
  mult_array #(.A_W(DW+2), .B_W(DW+2)) u_m5 (.a(xs012), .b(hs012), .p(m5));

  acc_t p0, p1, p2, p3, p4, p5;
  assign p0 = acc_t'(m0);
  assign p1 = acc_t'(m1);
  assign p2 = acc_t'(m2);
  assign p3 = acc_t'(m3);
  assign p4 = acc_t'(m4);
  assign p5 = m5;

  // post-additions and the two one-block delays
  acc_t t41, t31, t0d;      // p4-p1, p3-p1, p0-D(p2)
  acc_t d_p2, d_t41;        // delay registers

  assign t41 = p4 - p1;
  assign t31 = p3 - p1;
  assign t0d = p0 - d_p2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_p2  <= '0;
      d_t41 <= '0;
    end else if (en) begin
      d_p2  <= p2;
      d_t41 <= t41;
    end
  end

  // outputs: the low 2*DW+2 bits of the modular sums
  assign y[0] = (2*DW+2)'(t0d + d_t41);
  assign y[1] = (2*DW+2)'(t31 - t0d);
  assign y[2] = (2*DW+2)'(p5 - t31 - t41);

endmodule
