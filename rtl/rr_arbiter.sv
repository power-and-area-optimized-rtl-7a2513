// rr_arbiter: round-robin arbiter of one output port.
//
// Grants one of N requesters (req_int from the FIFO heads) per cycle. The
// search starts at the pointer and wraps; after a grant that is taken
// (advance = 1) the pointer moves to the port just after the winner, so the
// winner has the lowest priority next time and every requester is served
// within N grants. With advance = 0 (the output cannot take a packet) no
// grant is given and the pointer stays.
//
// Timing: gnt is combinational from req, the pointer and advance; the
// pointer updates at the rising edge. Synchronous active-low reset points
// at requester 0. The description names round robin as the scheme; the
// pointer-after-winner rule is the usual one and this design's choice.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr, ptr_next;

  always_comb begin
    int   idx;
    logic found;
    idx      = 0;
    found    = 1'b0;
    gnt      = '0;
    ptr_next = ptr;
    if (advance) begin
      for (int k = 0; k < N; k++) begin
        idx = int'(ptr) + k;
        if (idx >= N) idx -= N;
        if (!found && req[idx]) begin
          gnt[idx] = 1'b1;
          found    = 1'b1;
          ptr_next = (idx == N - 1) ? '0 : PW'(idx + 1);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= ptr_next;
  end

  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(gnt) && ((gnt & ~req) == '0));
endmodule
