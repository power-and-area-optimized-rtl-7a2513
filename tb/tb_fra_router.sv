// tb_fra_router: end-to-end test of the flexible router at its default
// size (router at mesh position (1,1), four-flit FIFOs).
//
// Upstream drivers on all five ports send uniquely numbered packets (the
// number is the payload) and hold each one until it is granted; downstream
// receivers grant at random or stall on purpose. A scoreboard checks that
// every accepted packet leaves exactly once, unchanged, on the port XY
// routing selects. Phases:
//   1. latency: one packet at a time into an idle router, two edges from
//      acceptance to delivery;
//   2. throughput: a permutation (each input to a different output), one
//      packet per port per cycle;
//   3. hotspot: West floods the East output while East stalls, so West's
//      FIFO fills and its packets are stored in the E, N and S FIFOs, then
//      everything fills and upstream stalls;
//   4. random uniform traffic with random downstream stalls;
//   5. drain.
// Counted mechanisms (each must occur): borrowing, a refused borrow or
// write conflict at a FIFO, upstream stall, downstream stall, output
// contention, every direction FIFO taking another port's packets, and
// the Local port neither borrowing nor lending.
module tb_fra_router;
  import fra_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] req_US = '0, gnt_US, req_DS, gnt_DS = '0, borrow_evt;
  flit_t pkt_US [NPORTS];
  flit_t pkt_DS [NPORTS];

  fra_router dut (.*);

  always #5 clk = ~clk;

  // Scoreboard.
  int unsigned next_id = 1;
  int  exp_port [int unsigned];
  int  acc_cyc  [int unsigned];
  bit  got      [int unsigned];
  flit_t txq [NPORTS][$];
  int  n_sent = 0, n_recv = 0, cyc = 0;
  int  lat_checks = 0;
  bit  check_latency = 0;
  logic [NPORTS-1:0] last_acc = '0;

  // Mechanism counters.
  int c_borrow = 0, c_wr_conflict = 0, c_us_stall = 0, c_ds_stall = 0;
  int c_contention = 0, c_local_borrow = 0, c_full = 0;
  int c_lent [NPORTS];  // foreign packets written into FIFO j

  function automatic int xy_port(flit_t f);
    if (f.dst_x > 1) return PORT_E;
    if (f.dst_x < 1) return PORT_W;
    if (f.dst_y > 1) return PORT_N;
    if (f.dst_y < 1) return PORT_S;
    return PORT_L;
  endfunction

  // A destination that XY routing at (1,1) sends out of port o.
  function automatic flit_t make_pkt(int o);
    flit_t f;
    case (o)
      PORT_E:  begin f.dst_x = 4'($urandom_range(15, 2)); f.dst_y = 4'($urandom_range(15)); end
      PORT_W:  begin f.dst_x = 4'd0; f.dst_y = 4'($urandom_range(15)); end
      PORT_N:  begin f.dst_x = 4'd1; f.dst_y = 4'($urandom_range(15, 2)); end
      PORT_S:  begin f.dst_x = 4'd1; f.dst_y = 4'd0; end
      default: begin f.dst_x = 4'd1; f.dst_y = 4'd1; end
    endcase
    f.payload = 24'(next_id);
    next_id++;
    return f;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cyc %0d: %s", cyc, what);
    end
  endtask

  // One clock cycle: present queued packets, settle, sample both link
  // sides, advance the clock, update the scoreboard.
  task automatic step(logic [NPORTS-1:0] ds_gnt);
    logic [NPORTS-1:0] acc, dlv;
    for (int i = 0; i < NPORTS; i++) begin
      req_US[i] = txq[i].size() > 0;
      pkt_US[i] = (txq[i].size() > 0) ? txq[i][0] : '0;
    end
    gnt_DS = ds_gnt;
    #3;
    acc = req_US & gnt_US;
    dlv = req_DS & gnt_DS;
    last_acc = acc;
    // mechanisms
    for (int i = 0; i < NPORTS; i++) begin
      if (borrow_evt[i]) c_borrow++;
      if (req_US[i] && !gnt_US[i]) c_us_stall++;
      if (req_DS[i] && !gnt_DS[i]) c_ds_stall++;
      if ($countones(dut.req_int_out[i]) > 1) c_contention++;
      if ($countones(dut.req_to_fifo[i]) > 1) c_wr_conflict++;
      if (|(dut.gnt_from_fifo[i] & ~(NPORTS'(1) << i))) c_lent[i]++;
    end
    if (borrow_evt[PORT_L]) c_local_borrow++;
    if (&dut.fifo_full) c_full++;
    // deliveries
    for (int o = 0; o < NPORTS; o++) begin
      if (dlv[o]) begin
        int unsigned id;
        id = int'(pkt_DS[o].payload);
        n_recv++;
        if (!exp_port.exists(id)) begin
          chk($sformatf("unknown packet %0d on port %0d", id, o), 1'b0);
        end else begin
          chk($sformatf("packet %0d twice", id), !got.exists(id));
          chk($sformatf("packet %0d on port %0d, expected %0d", id, o, exp_port[id]),
              exp_port[id] == o);
          got[id] = 1'b1;
          if (check_latency) begin
            lat_checks++;
            chk($sformatf("packet %0d latency %0d", id, cyc - acc_cyc[id]),
                cyc - acc_cyc[id] == 2);
          end
        end
      end
    end
    // acceptances
    for (int i = 0; i < NPORTS; i++) begin
      if (acc[i]) begin
        flit_t f;
        f = txq[i].pop_front();
        exp_port[int'(f.payload)] = xy_port(f);
        acc_cyc[int'(f.payload)]  = cyc;
        n_sent++;
      end
    end
    @(posedge clk);
    cyc++;
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog: sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full_rate_cycles;
    for (int i = 0; i < NPORTS; i++) begin
      pkt_US[i] = '0;
      c_lent[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. latency into an idle router
    check_latency = 1;
    for (int i = 0; i < NPORTS; i++) begin
      txq[i].push_back(make_pkt((i + 2) % NPORTS));
      step('1);
      repeat (4) step('1);
    end
    check_latency = 0;
    chk("latency checks ran", lat_checks == NPORTS);

    // 2. permutation traffic at full rate: each input sends to a distinct
    //    output, so every port is granted every cycle.
    for (int i = 0; i < NPORTS; i++)
      repeat (40) txq[i].push_back(make_pkt((i + 1) % NPORTS));
    full_rate_cycles = 0;
    for (int n = 0; n < 40; n++) begin
      step('1);
      if (last_acc == '1) full_rate_cycles++;
    end
    chk($sformatf("permutation: all queues empty after 40 cycles (%0d cycles at full rate)",
                  full_rate_cycles),
        txq[0].size() == 0 && txq[1].size() == 0 && txq[2].size() == 0 &&
        txq[3].size() == 0 && txq[4].size() == 0 && full_rate_cycles == 40);
    repeat (5) step('1);

    // 3. hotspot: West floods East while East stalls.
    repeat (30) txq[PORT_W].push_back(make_pkt(PORT_E));
    repeat (6)  txq[PORT_L].push_back(make_pkt(PORT_E));
    repeat (60) step(5'b11110);
    chk("hotspot: West borrowed other FIFOs", c_borrow > 0);
    chk("hotspot: borrowed FIFOs filled up", c_full > 0);
    repeat (60) step('1);

    // 4. random uniform traffic with random downstream stalls
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NPORTS; i++)
        if (txq[i].size() < 3 && $urandom_range(9) < 6)
          txq[i].push_back(make_pkt($urandom_range(NPORTS - 1)));
      step(NPORTS'($urandom) | NPORTS'($urandom));
    end

    // 5. drain
    for (int n = 0; n < 500; n++) step('1);

    chk($sformatf("all %0d packets delivered (%0d)", n_sent, n_recv),
        n_recv == n_sent && got.size() == n_sent && n_sent == int'(next_id) - 1);
    chk($sformatf("borrow %0d", c_borrow), c_borrow > 0);
    chk($sformatf("write conflict %0d", c_wr_conflict), c_wr_conflict > 0);
    chk($sformatf("upstream stall %0d", c_us_stall), c_us_stall > 0);
    chk($sformatf("downstream stall %0d", c_ds_stall), c_ds_stall > 0);
    chk($sformatf("output contention %0d", c_contention), c_contention > 0);
    chk($sformatf("all FIFOs full %0d", c_full), c_full > 0);
    chk($sformatf("Local port never borrows (%0d)", c_local_borrow), c_local_borrow == 0);
    chk($sformatf("E, W, N, S FIFOs each took foreign packets (%0d %0d %0d %0d)",
                  c_lent[PORT_E], c_lent[PORT_W], c_lent[PORT_N], c_lent[PORT_S]),
        c_lent[PORT_E] > 0 && c_lent[PORT_W] > 0 && c_lent[PORT_N] > 0 && c_lent[PORT_S] > 0);
    chk($sformatf("Local FIFO never lent (%0d)", c_lent[PORT_L]), c_lent[PORT_L] == 0);
    $display("sent %0d received %0d borrow %0d wr_conflict %0d us_stall %0d ds_stall %0d contention %0d all_full %0d",
             n_sent, n_recv, c_borrow, c_wr_conflict, c_us_stall, c_ds_stall, c_contention, c_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
