// output_port: one output direction of the flexible router.
//
// Arbiter, output controller and multiplexer. The round-robin arbiter looks
// at the req_int lines of the five FIFO heads that want this direction and
// grants one (gnt_int) in a cycle where the output controller can take a
// flit. The multiplexer passes the granted head into the output controller,
// which offers it downstream with req_DS / pkt_DS until gnt_DS.
//
// Timing: gnt_int is combinational; the granted FIFO pops at the same
// rising edge that loads the output register; req_DS rises in the next
// cycle. One flit per cycle when downstream grants every cycle.
module output_port
  import fra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req_int,
  output logic [NPORTS-1:0] gnt_int,
  input  flit_t             heads [NPORTS],
  output logic              req_DS,
  output flit_t             pkt_DS,
  input  logic              gnt_DS
);
  logic  ready;
  flit_t sel_pkt;

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req_int),
    .advance(ready),
    .gnt    (gnt_int)
  );

  out_mux #(.N(NPORTS)) u_mux (
    .sel (gnt_int),
    .din (heads),
    .dout(sel_pkt)
  );

  output_controller u_oc (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (|gnt_int),
    .load_pkt(sel_pkt),
    .ready   (ready),
    .req_DS  (req_DS),
    .pkt_DS  (pkt_DS),
    .gnt_DS  (gnt_DS)
  );
endmodule
