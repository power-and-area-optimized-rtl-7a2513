// bec: WIDTH-bit Binary-to-Excess-1 converter, y = x + 1 (mod 2^WIDTH).
// It replaces the cin = 1 ripple carry adder of a carry select group: bit i
// flips when all lower bits are one, so it needs only an AND chain and XOR
// gates: y[0] = ~x[0], y[i] = x[i] ^ (x[0] & ... & x[i-1]).
// Purely combinational.
module bec #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  assign y[0] = ~x[0];

  // Bit i toggles when every bit below it is one.
  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign y[i] = x[i] ^ (&x[i-1:0]);
  end
endmodule
