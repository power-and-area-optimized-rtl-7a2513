// ffc: FIFO flexibility controller of one router input port.
//
// Upstream side: while the upstream router holds req_US with a packet, the
// controller asks for one FIFO slot. If the port's own FIFO has room it
// requests that one. If the own FIFO is full it does not wait: it requests
// one of the other sharable FIFOs that is not full (BORROW_MASK), picked by
// a rotating search pointer so borrowed traffic is spread over the other
// ports. When the chosen FIFO's write selector grants (gnt_fifo), gnt_US is
// raised in the same cycle and the packet is written at the next rising
// edge. The search pointer advances by one (through the carry select adder,
// wrapping at NPORTS) every time a borrow request is placed, granted or not.
//
// Output side: when the own FIFO holds a packet, req_int raises the one
// output selected by the routing logic; a matching gnt_int pops the FIFO.
//
// Interface: req_fifo is one-hot or zero; gnt_US, req_int and pop are
// combinational. The rotating pointer is the only state; synchronous
// active-low reset clears it.
// Following the description: own FIFO first, otherwise a request to another
// FIFO that is not full, grant back upstream once a slot is found, and
// req_int / gnt_int toward the output ports. Requesting one FIFO at a time
// and the rotating choice among them are this design's choices.
module ffc
  import fra_pkg::*;
#(
  parameter int                PORT_IDX    = 0,
  parameter logic [NPORTS-1:0] BORROW_MASK = 5'b01110
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream handshake
  input  logic              req_US,
  output logic              gnt_US,
  // FIFO requests and grants (index = FIFO's port)
  input  logic [NPORTS-1:0] fifo_full,
  output logic [NPORTS-1:0] req_fifo,
  input  logic [NPORTS-1:0] gnt_fifo,
  output logic              borrow,    // packet goes to another port's FIFO
  // toward the output ports
  input  logic              head_valid,
  input  logic [NPORTS-1:0] route,
  output logic [NPORTS-1:0] req_int,
  input  logic [NPORTS-1:0] gnt_int,
  output logic              pop
);
  localparam int PW = $clog2(NPORTS);

  logic [PW-1:0]     sp, sp_inc, sp_next;
  logic [NPORTS-1:0] cand;
  logic              own_free, borrow_req;

  assign own_free = !fifo_full[PORT_IDX];
  assign cand     = BORROW_MASK & ~fifo_full;

  // Choose the FIFO to request.
  always_comb begin
    int idx;
    logic found;
    idx        = 0;
    req_fifo   = '0;
    borrow_req = 1'b0;
    found      = 1'b0;
    if (req_US) begin
      if (own_free) begin
        req_fifo[PORT_IDX] = 1'b1;
      end else begin
        for (int k = 0; k < NPORTS; k++) begin
          idx = int'(sp) + k;
          if (idx >= NPORTS) idx -= NPORTS;
          if (!found && cand[idx]) begin
            req_fifo[idx] = 1'b1;
            found         = 1'b1;
          end
        end
        borrow_req = found;
      end
    end
  end

  assign gnt_US = |(req_fifo & gnt_fifo);
  assign borrow = gnt_US && borrow_req;

  // Rotating search pointer: sp + 1 through the carry select adder.
  csla #(.WIDTH(PW)) u_inc (
    .a(sp), .b('0), .cin(1'b1), .sum(sp_inc), .cout()
  );
  assign sp_next = (sp_inc >= PW'(NPORTS)) ? '0 : sp_inc;

  always_ff @(posedge clk) begin
    if (!rst_n)          sp <= '0;
    else if (borrow_req) sp <= sp_next;
  end

  // Output side.
  assign req_int = head_valid ? route : '0;
  assign pop     = |(req_int & gnt_int);

  // Upstream must hold its request until it is granted.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    req_US && !gnt_US |=> req_US);
  a_req_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(req_fifo));
endmodule
