// Ripple-carry parallel adder: s = a + b + cin, with carry out.
//
// This is the adder row of the array multiplier (the "3 bit Adder" boxes of
// the multiplier schematic; the reference build used 4-bit parallel adder
// chips with their top input bits held at zero). The adder is a chain of
// full adders, the carry rippling from bit 0 upwards. Purely combinational.
//
// Ports: a, b (W bits), cin -> s (W bits), cout.
// The full-adder equations are the textbook ones; the reference gives the
// adder's function only, not its gates.
module rca #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];

endmodule
