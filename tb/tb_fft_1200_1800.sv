// Self-checking test of the 1200/1800-point FFT at full size. Two random
// 1800-sample frames are transformed with sel1800 = 1, then two 1200-sample
// frames with sel1800 = 0 (the second frame of each pair follows the first
// with no gap). Every bin is compared with a direct DFT computed in real
// arithmetic: no bin may be off by more than 80 LSB (the round-off of a
// 16-bit datapath without per-stage scaling) and the signal-to-error
// ratio over all bins must exceed 40 dB; the test also checks that every frame leaves
// as N consecutive samples in natural bin order.
module tb_fft_1200_1800;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real maxerr = 0, errpow = 0, sigpow = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic sel1800 = 1, iv = 0, ov;
  logic signed [15:0] ir = 0, ii = 0, orr, oi;
  fft_1200_1800 dut (.clk, .rst_n, .sel1800, .in_valid(iv), .in_re(ir), .in_im(ii),
                     .out_valid(ov), .out_re(orr), .out_im(oi));

  real xr[2][1800], xi[2][1800];

  task automatic run_pair(input int N);
    real cs[], sn[];
    cs = new[N]; sn = new[N];
    for (int i = 0; i < N; i++) begin cs[i] = $cos(2.0*PI*i/N); sn[i] = -$sin(2.0*PI*i/N); end
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = real'($urandom_range(0, 200)) - 100.0;
        xi[f][i] = real'($urandom_range(0, 200)) - 100.0;
      end
    fork
      begin
        for (int f = 0; f < 2; f++)
          for (int i = 0; i < N; i++) begin
            @(negedge clk); iv = 1; ir = 16'($rtoi(xr[f][i])); ii = 16'($rtoi(xi[f][i]));
          end
        @(negedge clk); iv = 0;
      end
      begin
        for (int f = 0; f < 2; f++) begin
          int k = 0;
          bit started = 0;
          while (k < N) begin
            @(posedge clk);
            if (ov) begin
              real er = 0, ei = 0, e;
              for (int n = 0; n < N; n++) begin
                int t = (k * n) % N;
                er += xr[f][n] * cs[t] - xi[f][n] * sn[t];
                ei += xr[f][n] * sn[t] + xi[f][n] * cs[t];
              end
              e = (real'(orr) - er) ** 2 + (real'(oi) - ei) ** 2;
              e = $sqrt(e);
              if (e > maxerr) maxerr = e;
              errpow += e * e;
              sigpow += er * er + ei * ei;
              checks++;
              if (e > 80.0) begin
                failures++;
                if (failures < 10) $display("N=%0d f=%0d k=%0d got %0d,%0d exp %f,%f", N, f, k, orr, oi, er, ei);
              end
              started = 1;
              k++;
            end else if (started) begin
              checks++; failures++;
              $display("N=%0d frame %0d: gap at k=%0d", N, f, k);
              started = 0;
            end
          end
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    sel1800 = 1;
    run_pair(1800);
    repeat (10) @(posedge clk);
    sel1800 = 0;
    run_pair(1200);
    $display("max error %f LSB, SNR %f dB", maxerr, 10.0 * $log10(sigpow / errpow));
    checks++;
    if (sigpow / errpow < 1.0e4) begin failures++; $display("SNR below 40 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
