// input_port: one input port of the flexible router.
//
// Holds the port's FIFO flexibility controller (ffc), its FIFO buffer and
// the routing logic on the FIFO head, plus the FIFO's write selector that
// decides which controller may store into this FIFO in a cycle.
//
// Write selector: every controller of the router may request this FIFO
// (wr_req_in, one bit per port); only one write fits per cycle. The port's
// own controller wins, otherwise the lowest-numbered requesting port. The
// winner gets wr_gnt_out in the same cycle and its upstream packet
// (wr_pkt_in) is written at the next rising edge. The FIFO therefore may
// hold packets that arrived on other ports; they are routed by their own
// destination like any other packet.
//
// The controller's side faces the rest of the router through req_fifo_out /
// gnt_fifo_in (this port's packet into some FIFO) and through req_int /
// gnt_int (this FIFO's head toward an output port).
//
// Timing: a packet granted in cycle t is at the head from t+1 on and can be
// granted to an output in t+1 if the FIFO was empty. Synchronous active-low
// reset. Following the description: FFC + FIFO + routing logic per port and
// requests/grants between a controller and the other ports' FIFOs; the
// fixed own-first priority of the write selector is this design's choice.
module input_port
  import fra_pkg::*;
#(
  parameter int                PORT_IDX    = 0,
  parameter logic [NPORTS-1:0] BORROW_MASK = 5'b01110,
  parameter int                DEPTH       = 4,
  parameter logic [COORD_W-1:0] MY_X       = COORD_W'(1),
  parameter logic [COORD_W-1:0] MY_Y       = COORD_W'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream link of this port
  input  logic              req_US,
  output logic              gnt_US,
  // this controller toward all FIFOs
  input  logic [NPORTS-1:0] fifo_full_all,
  output logic [NPORTS-1:0] req_fifo_out,
  input  logic [NPORTS-1:0] gnt_fifo_in,
  output logic              borrow,
  // all controllers toward this FIFO
  input  logic [NPORTS-1:0] wr_req_in,
  input  flit_t             wr_pkt_in [NPORTS],
  output logic [NPORTS-1:0] wr_gnt_out,
  output logic              full,
  // this FIFO's head toward the output ports
  output logic [NPORTS-1:0] req_int,
  input  logic [NPORTS-1:0] gnt_int,
  output flit_t             head
);
  logic              empty, pop, wr_en;
  logic [NPORTS-1:0] route;
  flit_t             wr_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  ffc #(.PORT_IDX(PORT_IDX), .BORROW_MASK(BORROW_MASK)) u_ffc (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_US    (req_US),
    .gnt_US    (gnt_US),
    .fifo_full (fifo_full_all),
    .req_fifo  (req_fifo_out),
    .gnt_fifo  (gnt_fifo_in),
    .borrow    (borrow),
    .head_valid(!empty),
    .route     (route),
    .req_int   (req_int),
    .gnt_int   (gnt_int),
    .pop       (pop)
  );

  // Write selector: own controller first, then lowest port index.
  always_comb begin
    wr_gnt_out = '0;
    if (!full) begin
      if (wr_req_in[PORT_IDX]) begin
        wr_gnt_out[PORT_IDX] = 1'b1;
      end else begin
        for (int i = NPORTS - 1; i >= 0; i--) begin
          if (wr_req_in[i]) wr_gnt_out = NPORTS'(1) << i;
        end
      end
    end
  end

  assign wr_en = |wr_gnt_out;

  always_comb begin
    wr_data = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (wr_gnt_out[i]) wr_data = wr_pkt_in[i];
    end
  end

  fifo_buffer #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (wr_en),
    .wr_data(wr_data),
    .rd_en  (pop),
    .rd_data(head),
    .empty  (empty),
    .full   (full),
    .count  (count)
  );

  routing_logic #(.MY_X(MY_X), .MY_Y(MY_Y)) u_route (
    .head (head),
    .route(route)
  );

  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(wr_gnt_out));
endmodule
