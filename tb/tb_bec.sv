// tb_bec: exhaustive check of the Binary-to-Excess-1 converter at 4 and
// 7 bits: y must equal x + 1 modulo 2^WIDTH.
module tb_bec;
  int checks = 0, failures = 0;

  logic [3:0] x4, y4;
  logic [6:0] x7, y7;

  bec #(.WIDTH(4)) dut4 (.x(x4), .y(y4));
  bec #(.WIDTH(7)) dut7 (.x(x7), .y(y7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      checks++;
      if (y4 != 4'(v + 1)) begin
        failures++;
        $display("FAIL bec4 %0d -> %0d", v, y4);
      end
    end
    for (int v = 0; v < 128; v++) begin
      x7 = 7'(v);
      #1;
      checks++;
      if (y7 != 7'(v + 1)) begin
        failures++;
        $display("FAIL bec7 %0d -> %0d", v, y7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
