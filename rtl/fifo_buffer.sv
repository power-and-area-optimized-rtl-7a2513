// fifo_buffer: first-in first-out packet store of one router input port.
//
// A circular array of DEPTH flits with a write pointer, a read pointer and
// an occupancy count. The head flit is visible on rd_data whenever the
// FIFO is not empty (first-word fall-through), so the routing logic can
// inspect it before it is popped. Writing and reading in the same cycle is
// allowed, also when the FIFO is full (the pop frees the slot).
//
// Pointer and count updates go through the carry select adder (csla):
// pointer + 1, count + 1 and count - 1 (count plus all ones). That is where
// the input side uses the adder the design is named after.
//
// Timing: wr_en / rd_en act at the rising clock edge; empty, full, count
// and rd_data are registered-state outputs. Synchronous active-low reset
// empties the FIFO. DEPTH must be a power of two, at least 2.
// Storage as an array and the reset style are this design's choices; the
// description gives only the FIFO's role.
module fifo_buffer #(
  parameter int WIDTH = fra_pkg::FLIT_W,
  parameter int DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr, wr_ptr_inc, rd_ptr_inc;
  logic [CW-1:0]    count_delta, count_next;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign rd_data = mem[rd_ptr];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);

  // +1 for a push only, -1 (all ones) for a pop only, 0 otherwise.
  always_comb begin
    if (do_wr && !do_rd)      count_delta = CW'(1);
    else if (do_rd && !do_wr) count_delta = '1;
    else                      count_delta = '0;
  end

  csla #(.WIDTH(PW)) u_wr_inc (
    .a(wr_ptr), .b('0), .cin(1'b1), .sum(wr_ptr_inc), .cout()
  );
  csla #(.WIDTH(PW)) u_rd_inc (
    .a(rd_ptr), .b('0), .cin(1'b1), .sum(rd_ptr_inc), .cout()
  );
  csla #(.WIDTH(CW)) u_count (
    .a(count), .b(count_delta), .cin(1'b0), .sum(count_next), .cout()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr_inc;
      if (do_rd) rd_ptr <= rd_ptr_inc;
      count <= count_next;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // A write into a full FIFO with no pop is lost: the controller must not
  // issue one.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && full && !do_rd));

  initial begin
    assert (DEPTH >= 2 && (1 << PW) == DEPTH)
      else $error("fifo_buffer: DEPTH must be a power of two >= 2");
  end
endmodule
