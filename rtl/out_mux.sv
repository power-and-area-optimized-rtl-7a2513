// out_mux: packet multiplexer of one output port.
//
// Passes the flit of the FIFO head that the arbiter granted (sel is
// one-hot) and zero when nothing is granted. An AND-OR structure, purely
// combinational. The five out_mux instances of the router together form
// its crossbar: every FIFO head goes to every output's multiplexer.
module out_mux
  import fra_pkg::*;
#(
  parameter int N = NPORTS
) (
  input  logic [N-1:0] sel,
  input  flit_t        din [N],
  output flit_t        dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      dout = dout | (din[i] & {FLIT_W{sel[i]}});
    end
  end
endmodule
