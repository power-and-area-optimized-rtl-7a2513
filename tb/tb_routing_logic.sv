// tb_routing_logic: every destination of a 16x16 mesh at two router
// positions; the expected port is worked out with XY rules in the bench.
module tb_routing_logic;
  import fra_pkg::*;
  int checks = 0, failures = 0;

  flit_t             f;
  logic [NPORTS-1:0] r11, r59;

  routing_logic #(.MY_X(4'd1), .MY_Y(4'd1)) dut11 (.head(f), .route(r11));
  routing_logic #(.MY_X(4'd5), .MY_Y(4'd9)) dut59 (.head(f), .route(r59));

  function automatic logic [NPORTS-1:0] xy(int x, int y, int mx, int my);
    if (x > mx) return 5'b00001;
    if (x < mx) return 5'b00010;
    if (y > my) return 5'b00100;
    if (y < my) return 5'b01000;
    return 5'b10000;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        f.dst_x = 4'(x); f.dst_y = 4'(y); f.payload = 24'($urandom);
        #1;
        checks += 2;
        if (r11 != xy(x, y, 1, 1)) begin
          failures++;
          $display("FAIL (1,1) dst (%0d,%0d) route %b", x, y, r11);
        end
        if (r59 != xy(x, y, 5, 9)) begin
          failures++;
          $display("FAIL (5,9) dst (%0d,%0d) route %b", x, y, r59);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
