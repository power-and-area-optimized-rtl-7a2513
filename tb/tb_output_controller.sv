// tb_output_controller: loads flits with random downstream grants. Checks
// that every loaded flit leaves once, in order, that req_DS and pkt_DS hold
// while not granted, that ready follows "empty or being granted", and that
// a flit loaded at edge t is offered from t on (one-cycle latency).
module tb_output_controller;
  import fra_pkg::*;
  int checks = 0, failures = 0;
  int stalls = 0, b2b = 0;

  logic  clk = 0, rst_n = 0;
  logic  load = 0, ready, req_DS, gnt_DS = 0;
  flit_t load_pkt = '0, pkt_DS;
  flit_t q[$];

  output_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic exp_ready;
      load     = $urandom_range(9) < 7;
      load_pkt = flit_t'($urandom);
      gnt_DS   = $urandom_range(9) < 6;
      #3;
      exp_ready = (q.size() == 0) || gnt_DS;
      checks += 2;
      if (req_DS != (q.size() != 0)) begin
        failures++;
        $display("FAIL req_DS %0d with %0d queued", req_DS, q.size());
      end
      if (ready != exp_ready) begin
        failures++;
        $display("FAIL ready %0d expected %0d", ready, exp_ready);
      end
      if (q.size() != 0) begin
        checks++;
        if (pkt_DS != q[0]) begin
          failures++;
          $display("FAIL pkt_DS %h expected %h", pkt_DS, q[0]);
        end
        if (!gnt_DS) stalls++;
        if (gnt_DS && load) b2b++;
      end
      @(posedge clk);
      if (req_DS && gnt_DS) void'(q.pop_front());
      if (load && exp_ready) q.push_back(load_pkt);
      #1;
    end
    checks++;
    if (stalls == 0 || b2b == 0) begin
      failures++;
      $display("FAIL stalls %0d back-to-back %0d", stalls, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
