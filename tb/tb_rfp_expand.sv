// Self-checking test of the load converter: every 15-bit external code is
// widened and its exact value compared with the value of the internal result.
module tb_rfp_expand;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;
  logic [15:0] x; rfp_t y;
  int checks = 0, failures = 0;
  rfp_expand dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    big_t nx, ny; int xx, xy;
    for (int c = 0; c < 65536; c += 3) begin
      x = 16'(c);
      #1;
      decode(x[14], int'(x[13:9]), int'(x[8:0]), 9, 15, nx, xx);
      decode(y.s, int'(y.e), int'(y.m), 13, 31, ny, xy);
      checks++;
      if (((nx == 0) != (ny == 0)) || (nx != 0 && (ny != (nx <<< 4) || xy != xx - 4)) || (nx == 0 && y != 0)) begin
        failures++; $display("x %h y %h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
