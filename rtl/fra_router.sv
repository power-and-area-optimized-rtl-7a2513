// fra_router: five-port flexible router for a 2D-mesh network on chip.
//
// A conventional input-buffered router stalls a packet whose input FIFO is
// full. This router instead lets the input port's FIFO flexibility
// controller store the packet in a FIFO of another direction port that
// still has room, so the same total buffer space absorbs bursty traffic on
// one port. Each input port (E, W, N, S, L) has a controller, a FIFO and XY
// routing logic on the FIFO head; each output port has a round-robin
// arbiter, an output controller and a multiplexer. The five multiplexers
// form the crossbar: every FIFO head can reach every output.
//
// Sharing: the four mesh directions (fra_pkg::FLEX_PORTS) lend FIFO space to
// each other. The Local port keeps its own FIFO only, in line with the
// description listing the East controller's requests toward the W, N and S
// FIFOs only.
//
// Links: every upstream link is req_US / pkt_US in, gnt_US out; every
// downstream link is req_DS / pkt_DS out, gnt_DS in. A transfer happens at a
// rising edge where req and gnt are both high; a sender holds req and the
// packet until granted. Port index order is E, W, N, S, L. The Local
// link is where a network interface would attach.
//
// Timing: a packet accepted at edge t can be in the output register at edge
// t+1 and is offered downstream from then on (two edges input to output
// with no contention). One packet per output per cycle. Synchronous
// active-low reset. The carry select adder does the pointer, count and
// search-pointer arithmetic of the input ports.
//
// borrow_evt, one bit per input port, marks a packet being stored in
// another port's FIFO in this cycle; it is a status output for monitoring.
module fra_router
  import fra_pkg::*;
#(
  parameter int                 DEPTH = 4,
  parameter logic [COORD_W-1:0] MY_X  = COORD_W'(1),
  parameter logic [COORD_W-1:0] MY_Y  = COORD_W'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream links (index = port_e)
  input  logic [NPORTS-1:0] req_US,
  input  flit_t             pkt_US [NPORTS],
  output logic [NPORTS-1:0] gnt_US,
  // downstream links
  output logic [NPORTS-1:0] req_DS,
  output flit_t             pkt_DS [NPORTS],
  input  logic [NPORTS-1:0] gnt_DS,
  // status
  output logic [NPORTS-1:0] borrow_evt
);
  // [i][j]: controller i toward FIFO j
  logic [NPORTS-1:0] req_ffc_fifo [NPORTS];
  logic [NPORTS-1:0] gnt_ffc_fifo [NPORTS];
  // [j][i]: FIFO j toward controller i
  logic [NPORTS-1:0] req_to_fifo  [NPORTS];
  logic [NPORTS-1:0] gnt_from_fifo[NPORTS];
  // [i][o]: FIFO i head toward output o
  logic [NPORTS-1:0] req_int_in   [NPORTS];
  logic [NPORTS-1:0] gnt_int_in   [NPORTS];
  // [o][i]: output o toward FIFO i head
  logic [NPORTS-1:0] req_int_out  [NPORTS];
  logic [NPORTS-1:0] gnt_int_out  [NPORTS];
  logic [NPORTS-1:0] fifo_full;
  flit_t             heads [NPORTS];

  // Transpose the request/grant matrices between the two sides.
  for (genvar i = 0; i < NPORTS; i++) begin : g_xpose_i
    for (genvar j = 0; j < NPORTS; j++) begin : g_xpose_j
      assign req_to_fifo[j][i]  = req_ffc_fifo[i][j];
      assign gnt_ffc_fifo[i][j] = gnt_from_fifo[j][i];
      assign req_int_out[j][i]  = req_int_in[i][j];
      assign gnt_int_in[i][j]   = gnt_int_out[j][i];
    end
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    localparam logic [NPORTS-1:0] BMASK =
      FLEX_PORTS[i] ? (FLEX_PORTS & ~(NPORTS'(1) << i)) : '0;

    input_port #(
      .PORT_IDX   (i),
      .BORROW_MASK(BMASK),
      .DEPTH      (DEPTH),
      .MY_X       (MY_X),
      .MY_Y       (MY_Y)
    ) u_in (
      .clk          (clk),
      .rst_n        (rst_n),
      .req_US       (req_US[i]),
      .gnt_US       (gnt_US[i]),
      .fifo_full_all(fifo_full),
      .req_fifo_out (req_ffc_fifo[i]),
      .gnt_fifo_in  (gnt_ffc_fifo[i]),
      .borrow       (borrow_evt[i]),
      .wr_req_in    (req_to_fifo[i]),
      .wr_pkt_in    (pkt_US),
      .wr_gnt_out   (gnt_from_fifo[i]),
      .full         (fifo_full[i]),
      .req_int      (req_int_in[i]),
      .gnt_int      (gnt_int_in[i]),
      .head         (heads[i])
    );
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    output_port u_out (
      .clk    (clk),
      .rst_n  (rst_n),
      .req_int(req_int_out[o]),
      .gnt_int(gnt_int_out[o]),
      .heads  (heads),
      .req_DS (req_DS[o]),
      .pkt_DS (pkt_DS[o]),
      .gnt_DS (gnt_DS[o])
    );
  end
endmodule
