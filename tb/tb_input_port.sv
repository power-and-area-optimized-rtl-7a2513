// tb_input_port: the West input port (shares with E, N, S) with its own
// upstream link and random requests from the other ports' controllers.
// The bench models the FIFO as a queue and checks: the write selector's
// choice (own controller first, then lowest port), that the winner's packet
// is stored, the head flit, req_int against XY routing, pops on gnt_int,
// and that the port borrows another FIFO once its own is full.
module tb_input_port;
  import fra_pkg::*;
  localparam int DEPTH = 4;
  localparam int ME = 1;  // West
  int checks = 0, failures = 0;
  int n_foreign_wr = 0, n_own_wr = 0, n_conflict = 0, n_borrow = 0, n_full = 0, n_pop = 0;

  logic clk = 0, rst_n = 0;
  logic req_US = 0, gnt_US, borrow, full;
  logic [NPORTS-1:0] fifo_full_all, req_fifo_out, gnt_fifo_in, gnt_others = '0;
  logic [NPORTS-1:0] wr_req_in, wr_gnt_out, req_int, gnt_int = '0;
  logic [NPORTS-1:0] others_full = '0, others_req = '0;
  flit_t wr_pkt_in [NPORTS];
  flit_t head;
  flit_t q[$];
  logic  held = 0;

  always_comb begin
    fifo_full_all     = others_full;
    fifo_full_all[ME] = full;
    wr_req_in         = others_req;
    wr_req_in[ME]     = req_fifo_out[ME];
    gnt_fifo_in       = gnt_others;
    gnt_fifo_in[ME]   = wr_gnt_out[ME];
  end

  input_port #(.PORT_IDX(ME), .BORROW_MASK(5'b01101), .DEPTH(DEPTH),
               .MY_X(4'd1), .MY_Y(4'd1)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [NPORTS-1:0] xy(flit_t f);
    if (f.dst_x > 1) return 5'b00001;
    if (f.dst_x < 1) return 5'b00010;
    if (f.dst_y > 1) return 5'b00100;
    if (f.dst_y < 1) return 5'b01000;
    return 5'b10000;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) wr_pkt_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [NPORTS-1:0] eg;
      int w;
      bit dense;
      dense = ((n / 200) % 2) == 0;  // phases: fill up, then drain
      if (!held) req_US = $urandom_range(9) < (dense ? 9 : 4);
      for (int i = 0; i < NPORTS; i++) begin
        wr_pkt_in[i].dst_x   = 4'($urandom_range(3));
        wr_pkt_in[i].dst_y   = 4'($urandom_range(3));
        wr_pkt_in[i].payload = 24'($urandom);
      end
      others_full = NPORTS'($urandom) & 5'b01101;
      others_req  = NPORTS'($urandom) & (dense ? 5'b11111 : 5'b00001) & ~(NPORTS'(1) << ME);
      gnt_others  = NPORTS'($urandom);
      gnt_int     = dense ? NPORTS'($urandom) & NPORTS'($urandom) : NPORTS'($urandom) | NPORTS'($urandom);
      #3;
      // Expected write grant.
      eg = '0;
      w  = -1;
      if (q.size() < DEPTH) begin
        if (wr_req_in[ME]) w = ME;
        else
          for (int i = NPORTS - 1; i >= 0; i--) if (wr_req_in[i]) w = i;
      end
      if (w >= 0) eg[w] = 1'b1;
      chk($sformatf("full %0d with %0d queued", full, q.size()), full == (q.size() == DEPTH));
      chk($sformatf("wr_gnt_out %b expected %b", wr_gnt_out, eg), wr_gnt_out == eg);
      chk("gnt_US", gnt_US == (req_US && (q.size() < DEPTH || |(req_fifo_out & gnt_others))));
      if (req_US && q.size() < DEPTH)
        chk("own FIFO requested when it has room", req_fifo_out == (NPORTS'(1) << ME));
      if (req_US && q.size() == DEPTH && (others_full & 5'b01101) != 5'b01101)
        chk("borrows when own FIFO is full", |(req_fifo_out & 5'b01101 & ~others_full));
      if (q.size() > 0) begin
        chk($sformatf("head %h expected %h", head, q[0]), head == q[0]);
        chk($sformatf("req_int %b", req_int), req_int == xy(q[0]));
      end else begin
        chk("no req_int when empty", req_int == '0);
      end
      if (w >= 0 && w != ME) n_foreign_wr++;
      if (w == ME) n_own_wr++;
      if (w == ME && |others_req) n_conflict++;
      if (borrow) n_borrow++;
      if (q.size() == DEPTH) n_full++;
      held = req_US && !gnt_US;
      @(posedge clk);
      if (q.size() > 0 && |(req_int & gnt_int)) begin
        void'(q.pop_front());
        n_pop++;
      end
      if (w >= 0) q.push_back(wr_pkt_in[w]);
      #1;
    end
    chk($sformatf("coverage own %0d foreign %0d conflict %0d borrow %0d full %0d pop %0d",
                  n_own_wr, n_foreign_wr, n_conflict, n_borrow, n_full, n_pop),
        n_own_wr > 0 && n_foreign_wr > 0 && n_conflict > 0 && n_borrow > 0 && n_full > 0 && n_pop > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
