// Self-checking test of amplitude_scaling: for every supported RB count,
// random samples (including full-scale ones) are scaled and compared with
// round(x * round(2^15/sqrt(12*NRB)) / 2^17), computed here from the
// square root, exactly; the output must follow the input after one cycle.
module tb_amplitude_scaling;
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

  logic [6:0] nrb;
  logic iv = 0, ov;
  cplx_t id, od;
  amplitude_scaling dut (.clk, .rst_n, .nrb, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));

  function automatic int expv(input int x, input int m);
    longint g = longint'($floor(32768.0 / $sqrt(real'(m)) + 0.5));
    longint p = longint'(x) * g;
    return int'((p + (64'sd1 <<< 16)) >>> 17);
  endfunction

  int rbs[6] = '{6, 15, 25, 50, 75, 100};
  initial begin
    id = '0; nrb = 7'd6;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rbs[r]) begin
      nrb = 7'(rbs[r]);
      for (int i = 0; i < 200; i++) begin
        int xr, xi;
        xr = (i == 0) ? 32767 : (i == 1) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        xi = (i == 0) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        @(negedge clk); iv = 1; id.re = 16'(xr); id.im = 16'(xi);
        @(negedge clk); iv = 0;
        checks++;
        if (!ov || int'(od.re) != expv(xr, 12 * rbs[r]) || int'(od.im) != expv(xi, 12 * rbs[r])) begin
          failures++;
          if (failures < 10) $display("nrb %0d x %0d,%0d got %0d,%0d exp %0d,%0d v=%0b", rbs[r], xr, xi,
                                      od.re, od.im, expv(xr, 12*rbs[r]), expv(xi, 12*rbs[r]), ov);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
