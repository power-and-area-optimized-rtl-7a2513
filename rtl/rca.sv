// rca: WIDTH-bit ripple carry adder built from a chain of full adders.
// {cout, sum} = a + b + cin. Purely combinational; the carry ripples from
// bit 0 to bit WIDTH-1. In the carry select adder it forms the first group
// (with the real carry-in) and the cin = 0 half of every later group.
module rca #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
