// tb_csla: checks the carry select adder against integer addition: the
// 16-bit default with corner cases (carry through every group) and random
// operands, and the narrow 2- and 3-bit forms used for pointers and counts
// exhaustively.
module tb_csla;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [2:0]  a3, b3, s3;
  logic        ci3, co3;
  logic [1:0]  a2, b2, s2;
  logic        ci2, co2;

  csla dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  csla #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  csla #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    a = x; b = y; ci = c;
    #1;
    checks++;
    if ({co, s} != 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      $display("FAIL csla16 %h+%h+%0d = %h", x, y, c, {co, s});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h00FF, 16'h0001, 1'b0);
    check16(16'h0FFF, 16'h0000, 1'b1);
    // A carry generated at the bottom of each group boundary.
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'h0001, 1'b0);
      check16(16'(1 << k), 16'(1 << k), 1'b1);
    end
    for (int n = 0; n < 5000; n++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int c = 0; c < 2; c++) begin
          a3 = 3'(x); b3 = 3'(y); ci3 = 1'(c);
          a2 = 2'(x); b2 = 2'(y); ci2 = 1'(c);
          #1;
          checks += 2;
          if ({co3, s3} != 4'(x + y + c)) begin
            failures++;
            $display("FAIL csla3 %0d+%0d+%0d", x, y, c);
          end
          if ({co2, s2} != {1'b0, a2} + {1'b0, b2} + {2'b0, ci2}) begin
            failures++;
            $display("FAIL csla2 %0d+%0d+%0d got %0d", a2, b2, ci2, {co2, s2});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
