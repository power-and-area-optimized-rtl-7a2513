// output_controller: handshake of one output port with the downstream
// router.
//
// A one-flit output register. When the arbiter grants a FIFO head (load),
// the selected flit is captured at the rising edge and req_DS is raised
// with pkt_DS from the next cycle on. The flit stays, unchanged, until the
// downstream router answers gnt_DS in a cycle where req_DS is high. ready
// tells the arbiter whether a flit can be loaded this cycle: the register is
// empty, or it is being emptied by gnt_DS now, so back-to-back flits go out
// on consecutive cycles.
//
// Synchronous active-low reset empties the register. The description gives
// the req_DS / gnt_DS signal names and the role; the one-entry register and
// same-cycle grant rule are this design's choices.
module output_controller
  import fra_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  flit_t load_pkt,
  output logic  ready,
  output logic  req_DS,
  output flit_t pkt_DS,
  input  logic  gnt_DS
);
  logic valid;

  assign ready  = !valid || gnt_DS;
  assign req_DS = valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      pkt_DS <= '0;
    end else if (load && ready) begin
      valid  <= 1'b1;
      pkt_DS <= load_pkt;
    end else if (gnt_DS) begin
      valid  <= 1'b0;
    end
  end

  // A flit offered downstream stays until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_DS && !gnt_DS |=> req_DS && $stable(pkt_DS));
endmodule
