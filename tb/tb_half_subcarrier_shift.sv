// Self-checking test of half_subcarrier_shift: two symbols of 2048 random
// samples (with pauses) must come out multiplied by exp(j*pi*n/2048),
// n restarting at 0 for the second symbol, within 2 LSB, one cycle later.
module tb_half_subcarrier_shift;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic iv = 0, ov;
  cplx_t id = '0, od;
  half_subcarrier_shift dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < 2048; n++) begin
        automatic int xr = $urandom_range(0, 40000) - 20000, xi = $urandom_range(0, 40000) - 20000;
        automatic real a = PI * n / 2048.0;
        automatic real er = xr * $cos(a) - xi * $sin(a), ei = xr * $sin(a) + xi * $cos(a);
        @(negedge clk); iv = 1; id.re = 16'(xr); id.im = 16'(xi);
        @(negedge clk); iv = 0;
        checks++;
        if (!ov || (real'(od.re) - er) ** 2 > 4.0 || (real'(od.im) - ei) ** 2 > 4.0) begin
          failures++;
          if (failures < 10) $display("s %0d n %0d got %0d,%0d exp %f,%f", s, n, od.re, od.im, er, ei);
        end
        if (n % 5 == 0) @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
