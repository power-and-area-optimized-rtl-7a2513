// tb_ffc: the FIFO flexibility controller of a sharing port (East, may
// borrow W, N, S) and of the Local port (no sharing) under random FIFO
// states and grants. A reference model in the bench computes the expected
// FIFO request (own first, else first non-full sharable FIFO from the
// rotating pointer), gnt_US, borrow, req_int and pop each cycle.
module tb_ffc;
  import fra_pkg::*;
  int checks = 0, failures = 0;
  int n_own = 0, n_borrow = 0, n_refused = 0, n_blocked = 0;

  logic clk = 0, rst_n = 0;
  logic req_US = 0;
  logic [NPORTS-1:0] fifo_full = '0, gnt_fifo = '0, route = '0, gnt_int = '0;
  logic head_valid = 0;
  logic gnt_US_e, borrow_e, pop_e, gnt_US_l, borrow_l, pop_l;
  logic [NPORTS-1:0] req_fifo_e, req_int_e, req_fifo_l, req_int_l;
  int sp_m = 0;
  logic both_gnt = 1'b0;
  localparam logic [NPORTS-1:0] MASK_E = 5'b01110;

  ffc #(.PORT_IDX(0), .BORROW_MASK(5'b01110)) dut_e (
    .clk, .rst_n, .req_US, .gnt_US(gnt_US_e), .fifo_full, .req_fifo(req_fifo_e),
    .gnt_fifo, .borrow(borrow_e), .head_valid, .route, .req_int(req_int_e),
    .gnt_int, .pop(pop_e));
  ffc #(.PORT_IDX(4), .BORROW_MASK(5'b00000)) dut_l (
    .clk, .rst_n, .req_US, .gnt_US(gnt_US_l), .fifo_full, .req_fifo(req_fifo_l),
    .gnt_fifo, .borrow(borrow_l), .head_valid, .route, .req_int(req_int_l),
    .gnt_int, .pop(pop_l));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [NPORTS-1:0] got, logic [NPORTS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (full %b sp %0d)", what, got, exp, fifo_full, sp_m);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [NPORTS-1:0] ef, el;
      logic bre;
      // Keep the request until both controllers were granted (protocol).
      if (!(req_US && !both_gnt)) req_US = $urandom_range(9) < 8;
      fifo_full  = NPORTS'($urandom) | ((n % 7 == 0) ? 5'b11111 : 5'b00000);
      if ($urandom_range(3) == 0) fifo_full[0] = 1'b0;
      gnt_fifo   = NPORTS'($urandom);
      head_valid = $urandom_range(1);
      route      = NPORTS'(1) << $urandom_range(NPORTS - 1);
      gnt_int    = NPORTS'($urandom);
      #3;
      // Reference for the East controller.
      ef = '0; bre = 1'b0;
      if (req_US) begin
        if (!fifo_full[0]) ef[0] = 1'b1;
        else begin
          for (int k = 0; k < NPORTS; k++) begin
            int j;
            j = (sp_m + k) % NPORTS;
            if (!bre && MASK_E[j] && !fifo_full[j]) begin
              ef[j] = 1'b1; bre = 1'b1;
            end
          end
        end
      end
      el = (req_US && !fifo_full[4]) ? 5'b10000 : 5'b00000;
      expect_eq("req_fifo E", req_fifo_e, ef);
      expect_eq("gnt_US E", 5'(gnt_US_e), 5'(|(ef & gnt_fifo)));
      expect_eq("borrow E", 5'(borrow_e), 5'(bre && |(ef & gnt_fifo)));
      expect_eq("req_fifo L", req_fifo_l, el);
      expect_eq("gnt_US L", 5'(gnt_US_l), 5'(|(el & gnt_fifo)));
      expect_eq("borrow L", 5'(borrow_l), 5'b0);
      expect_eq("req_int", req_int_e, head_valid ? route : 5'b0);
      expect_eq("pop", 5'(pop_e), 5'(head_valid && |(route & gnt_int)));
      if (ef[0] && gnt_fifo[0]) n_own++;
      if (bre && |(ef & gnt_fifo)) n_borrow++;
      if (bre && !(|(ef & gnt_fifo))) n_refused++;
      if (req_US && fifo_full[0] && !bre) n_blocked++;
      both_gnt = gnt_US_e && gnt_US_l;
      @(posedge clk);
      if (bre) sp_m = (sp_m + 1) % NPORTS;
      #1;
    end
    checks++;
    if (n_own == 0 || n_borrow == 0 || n_refused == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL coverage own %0d borrow %0d refused %0d blocked %0d",
               n_own, n_borrow, n_refused, n_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
