// tb_rca: exhaustive check of the 4-bit ripple carry adder and a random
// check of a 9-bit one against integer addition.
module tb_rca;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       c4i, c4o;
  logic [8:0] a9, b9, s9;
  logic       c9i, c9o;

  rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  rca #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(c9i), .sum(s9), .cout(c9o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); c4i = 1'(c);
          #1;
          checks++;
          if ({c4o, s4} != 5'(x + y + c)) begin
            failures++;
            $display("FAIL rca4 %0d+%0d+%0d = %0d", x, y, c, {c4o, s4});
          end
        end
    for (int n = 0; n < 1000; n++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); c9i = 1'($urandom);
      #1;
      checks++;
      if ({c9o, s9} != 10'(a9) + 10'(b9) + 10'(c9i)) begin
        failures++;
        $display("FAIL rca9 %0d+%0d+%0d", a9, b9, c9i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
