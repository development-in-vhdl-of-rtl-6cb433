// Self-checking test of ifft_2048 at its full size. Three frames are
// transformed: random values on 600 random bins, a single bin (a pure
// tone), and random values on all 2048 bins at lower amplitude; the
// second frame follows the first without a gap, the third after a pause.
// Each output sample is compared with the inverse DFT
//   x(n) = sum_i X(i) exp(+2*pi*j*i*n/2048)   (no 1/N factor)
// computed here in real arithmetic: the signal-to-error ratio of each frame
// must exceed 60 dB and every frame must leave as 2048 consecutive samples
// in natural order.
module tb_ifft_2048;
  localparam real PI = 3.141592653589793;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic iv = 0, ov;
  logic signed [15:0] ir = 0, ii = 0;
  logic signed [26:0] orr, oi;
  ifft_2048 dut (.clk, .rst_n, .in_valid(iv), .in_re(ir), .in_im(ii), .out_valid(ov), .out_re(orr), .out_im(oi));

  int xr[3][N], xi[3][N];
  real cs[N], sn[N];

  initial begin
    for (int i = 0; i < N; i++) begin cs[i] = $cos(2.0*PI*i/N); sn[i] = $sin(2.0*PI*i/N); end
    for (int f = 0; f < 3; f++) for (int i = 0; i < N; i++) begin xr[f][i] = 0; xi[f][i] = 0; end
    for (int j = 0; j < 600; j++) begin
      automatic int b = $urandom_range(0, N - 1);
      xr[0][b] = $urandom_range(0, 4000) - 2000; xi[0][b] = $urandom_range(0, 4000) - 2000;
    end
    xr[1][1100] = 8192; xi[1][1100] = -4096;
    for (int i = 0; i < N; i++) begin xr[2][i] = $urandom_range(0, 1000) - 500; xi[2][i] = $urandom_range(0, 1000) - 500; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < 3; f++) begin
        if (f == 2) repeat (700) @(negedge clk);
        for (int i = 0; i < N; i++) begin
          @(negedge clk); iv = 1; ir = 16'(xr[f][i]); ii = 16'(xi[f][i]);
        end
        @(negedge clk); iv = 0;
      end
      for (int f = 0; f < 3; f++) begin
        automatic real ep = 0, sp = 0;
        while (!ov) @(posedge clk);
        for (int n = 0; n < N; n++) begin
          automatic real er = 0, ei = 0;
          for (int i = 0; i < N; i++)
            if (xr[f][i] != 0 || xi[f][i] != 0) begin
              automatic int t = (i * n) % N;
              er += xr[f][i] * cs[t] - xi[f][i] * sn[t];
              ei += xr[f][i] * sn[t] + xi[f][i] * cs[t];
            end
          checks++;
          if (!ov) begin failures++; $display("gap at frame %0d n %0d", f, n); end
          ep += (real'(orr) - er) ** 2 + (real'(oi) - ei) ** 2;
          sp += er * er + ei * ei;
          @(posedge clk);
        end
        checks++;
        $display("frame %0d SNR %f dB", f, 10.0 * $log10(sp / ep));
        if (sp / ep < 1.0e6) failures++;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
