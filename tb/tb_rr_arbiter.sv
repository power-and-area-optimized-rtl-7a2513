// tb_rr_arbiter: random request patterns against a round-robin reference
// (search from the pointer, pointer moves past the winner). Also checks
// fairness: with all five requesting every cycle, each wins once in every
// five consecutive grants.
module tb_rr_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt;
  logic advance = 0;
  int   ptr_m = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_gnt(logic [N-1:0] r, int p, logic adv);
    if (!adv) return '0;
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wins[N];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] e;
      req     = (n < 1000) ? N'($urandom) : '1;
      advance = (n < 1000) ? ($urandom_range(9) < 8) : 1'b1;
      #3;
      e = ref_gnt(req, ptr_m, advance);
      checks++;
      if (gnt != e) begin
        failures++;
        $display("FAIL req %b ptr %0d gnt %b expected %b", req, ptr_m, gnt, e);
      end
      if (n >= 1000) begin
        for (int i = 0; i < N; i++) if (gnt[i]) wins[i]++;
        if ((n - 1000) % N == N - 1) begin
          checks++;
          for (int i = 0; i < N; i++) begin
            if (wins[i] != (n - 1000 + 1) / N) begin
              failures++;
              $display("FAIL fairness: port %0d has %0d wins after %0d", i, wins[i], n - 999);
            end
          end
        end
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) if (e[i]) ptr_m = (i + 1) % N;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
