// tb_output_port: one output port with random FIFO-head requests and
// random downstream grants. The bench models the round-robin choice and the
// one-flit output register: it checks gnt_int, that the granted head is the
// flit later offered on pkt_DS, that req_DS/pkt_DS hold through stalls, and
// that a head granted at edge t is offered downstream right after t.
module tb_output_port;
  import fra_pkg::*;
  int checks = 0, failures = 0;
  int n_contention = 0, n_stall = 0, n_sent = 0;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] req_int = '0, gnt_int;
  flit_t heads [NPORTS];
  logic  req_DS, gnt_DS = 0;
  flit_t pkt_DS;
  int    ptr_m = 0;
  logic  valid_m = 0;
  flit_t reg_m = '0;

  output_port dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) heads[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [NPORTS-1:0] eg;
      logic ready_m;
      int w;
      req_int = NPORTS'($urandom);
      for (int i = 0; i < NPORTS; i++) heads[i] = flit_t'({$urandom, $urandom});
      gnt_DS = $urandom_range(9) < 6;
      #3;
      ready_m = !valid_m || gnt_DS;
      eg = '0; w = -1;
      if (ready_m)
        for (int k = NPORTS - 1; k >= 0; k--)
          if (req_int[(ptr_m + k) % NPORTS]) w = (ptr_m + k) % NPORTS;
      if (w >= 0) eg[w] = 1'b1;
      chk($sformatf("gnt_int %b expected %b (req %b ptr %0d)", gnt_int, eg, req_int, ptr_m), gnt_int == eg);
      chk("req_DS", req_DS == valid_m);
      if (valid_m) chk("pkt_DS", pkt_DS == reg_m);
      if ($countones(req_int) > 1 && w >= 0) n_contention++;
      if (valid_m && !gnt_DS) n_stall++;
      if (valid_m && gnt_DS) n_sent++;
      @(posedge clk);
      if (valid_m && gnt_DS) valid_m = 0;
      if (w >= 0) begin
        valid_m = 1;
        reg_m   = heads[w];
        ptr_m   = (w + 1) % NPORTS;
      end
      #1;
    end
    chk($sformatf("coverage contention %0d stall %0d sent %0d", n_contention, n_stall, n_sent),
        n_contention > 0 && n_stall > 0 && n_sent > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
