// tb_fifo_buffer: random pushes and pops against a queue model. Checks the
// head flit, empty, full and count every cycle, including pushes into a
// full FIFO that pops in the same cycle. Phases bias toward pushes, then
// pops, so the FIFO fills and drains several times.
module tb_fifo_buffer;
  import fra_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  int fulls = 0, simul_full = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [FLIT_W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [FLIT_W-1:0] model[$];

  fifo_buffer #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) dut (.*);

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
    for (int n = 0; n < 3000; n++) begin
      int pw;
      pw = ((n / 100) % 2 == 0) ? 80 : 30;
      // drive
      wr_en   = ($urandom_range(99) < pw);
      rd_en   = ($urandom_range(99) < 100 - pw + 10);
      wr_data = FLIT_W'({$urandom, $urandom});
      if (model.size() == DEPTH && wr_en && !rd_en) wr_en = 0;
      #3;
      // check
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          count != model.size()) begin
        failures++;
        $display("FAIL flags: empty %0d full %0d count %0d model %0d", empty, full, count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin
          failures++;
          $display("FAIL head %h expected %h", rd_data, model[0]);
        end
      end
      if (full) fulls++;
      if (full && wr_en && rd_en) simul_full++;
      @(posedge clk);
      begin
        logic do_rd;
        do_rd = rd_en && model.size() > 0;
        if (do_rd) void'(model.pop_front());
        if (wr_en) model.push_back(wr_data);
      end
      #1;
    end
    checks++;
    if (fulls == 0 || simul_full == 0) begin
      failures++;
      $display("FAIL never full (%0d) or never push+pop at full (%0d)", fulls, simul_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
