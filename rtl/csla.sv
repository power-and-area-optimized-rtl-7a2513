// csla: WIDTH-bit carry select adder with Binary-to-Excess-1 converters.
// {cout, sum} = a + b + cin.
//
// The operand is cut into groups of 2, 2, 3, 4, 5, 6, ... bits (square-root
// grouping, the last group cut to fit WIDTH). The lowest group is a ripple
// carry adder fed with the real carry-in. Every higher group computes its
// sum once, with a ripple carry adder and carry-in 0, and derives the
// carry-in 1 result from it with a BEC (result + 1) instead of a second
// ripple carry adder. The carry out of the group below then selects one of
// the two results with a 2:1 multiplexer, so the carry only passes through
// one multiplexer per group. Purely combinational.
//
// Following the description: RCA for cin = 0, BEC for cin = 1, mux select
// on the incoming carry. The exact group sizes are this design's choice
// (the usual square-root split; 2-2-3-4-5 for 16 bits).
module csla #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Nominal size of group k: 2, 2, 3, 4, 5, ...
  function automatic int grp_nominal(int k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // First bit of group k.
  function automatic int grp_lo(int k);
    int lo = 0;
    for (int i = 0; i < k; i++) lo += grp_nominal(i);
    return lo;
  endfunction

  // Number of groups needed to cover WIDTH bits.
  function automatic int num_groups(int w);
    int n = 0;
    while (grp_lo(n) < w) n++;
    return n;
  endfunction

  localparam int NG = num_groups(WIDTH);

  logic [NG:0] gc;  // carry into each group, gc[NG] = final carry

  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int LO = grp_lo(k);
    localparam int SZ = (LO + grp_nominal(k) > WIDTH) ? WIDTH - LO : grp_nominal(k);

    if (k == 0) begin : g_first
      rca #(.WIDTH(SZ)) u_rca (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (gc[0]),
        .sum (sum[LO +: SZ]),
        .cout(gc[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] s0;
      logic          c0;
      logic [SZ:0]   r1;  // {carry, sum} for carry-in 1

      rca #(.WIDTH(SZ)) u_rca (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (1'b0),
        .sum (s0),
        .cout(c0)
      );

      bec #(.WIDTH(SZ + 1)) u_bec (
        .x({c0, s0}),
        .y(r1)
      );

      // Carry from the group below selects between the two results.
      assign sum[LO +: SZ] = gc[k] ? r1[SZ-1:0] : s0;
      assign gc[k+1]       = gc[k] ? r1[SZ]     : c0;
    end
  end

  assign cout = gc[NG];
endmodule
