// tb_out_mux: random flits on five inputs; each one-hot select must pass
// that input, no select must give zero.
module tb_out_mux;
  import fra_pkg::*;
  int checks = 0, failures = 0;

  logic [NPORTS-1:0] sel;
  flit_t             din [NPORTS];
  flit_t             dout;

  out_mux dut (.sel(sel), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < NPORTS; i++) din[i] = flit_t'($urandom);
      for (int s = -1; s < NPORTS; s++) begin
        sel = (s < 0) ? '0 : NPORTS'(1) << s;
        #1;
        checks++;
        if (dout != ((s < 0) ? flit_t'(0) : din[s])) begin
          failures++;
          $display("FAIL sel %b out %h", sel, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
