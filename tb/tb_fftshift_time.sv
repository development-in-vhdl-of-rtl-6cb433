// Self-checking test of fftshift_time: random samples, including -32768,
// fed with pauses; even-numbered valid samples must pass unchanged and
// odd-numbered ones come out negated (saturating), one cycle later.
module tb_fftshift_time;
  import ultx_pkg::*;
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
  fftshift_time dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));
  function automatic int neg(input int x);
    return (x == -32768) ? 32767 : -x;
  endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int xr = (n % 97 == 1) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
      automatic int xi = int'($urandom_range(0, 65535)) - 32768;
      automatic int er = (n % 2) ? neg(xr) : xr, ei = (n % 2) ? neg(xi) : xi;
      @(negedge clk); iv = 1; id.re = 16'(xr); id.im = 16'(xi);
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || int'(od.re) != er || int'(od.im) != ei) begin
        failures++;
        if (failures < 10) $display("n %0d got %0d,%0d exp %0d,%0d", n, od.re, od.im, er, ei);
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
