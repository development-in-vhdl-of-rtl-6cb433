// Self-checking test of fft_stage: a forward radix-3 stage on 15-sample
// blocks (the 15 = 3 x 5 example of the Cooley-Tukey split) and an inverse
// radix-5 stage on 25-sample blocks. Random blocks are fed, some with
// pauses; each output is compared with
//   y(j*M+n) = W_L^(j*n) * sum_p x(p*M+n) * W_R^(j*p)
// computed in real arithmetic, within 4 LSB. Also checks that each block's
// L outputs leave on consecutive cycles, 4 cycles after its last input.
module tb_fft_stage;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DUT A: radix 3, L 15, forward. DUT B: radix 5, L 25, inverse.
  logic a_iv = 0, b_iv = 0, a_ov, b_ov;
  logic signed [15:0] a_ir = 0, a_ii = 0, b_ir = 0, b_ii = 0, a_or, a_oi, b_or, b_oi;
  fft_stage #(.RADIX(3), .L(15), .W_IN(16), .W_OUT(16)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_re(a_ir), .in_im(a_ii),
    .out_valid(a_ov), .out_re(a_or), .out_im(a_oi));
  fft_stage #(.RADIX(5), .L(25), .W_IN(16), .W_OUT(18), .INVERSE(1'b1)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_re(b_ir), .in_im(b_ii),
    .out_valid(b_ov), .out_re(b_or), .out_im(b_oi));

  real xa_re[$], xa_im[$], xb_re[$], xb_im[$];
  int  a_last[$], b_last[$];

  function automatic void expect_block(input int R, input int L, input bit inv,
                                       input real xr[], input real xi[],
                                       output real yr[], output real yi[]);
    int M = L / R;
    real sg = inv ? 1.0 : -1.0;
    yr = new[L]; yi = new[L];
    for (int j = 0; j < R; j++)
      for (int n = 0; n < M; n++) begin
        real sr = 0, si = 0, a, tr, ti;
        for (int p = 0; p < R; p++) begin
          a = sg * 2.0 * PI * j * p / R;
          sr += xr[p*M+n] * $cos(a) - xi[p*M+n] * $sin(a);
          si += xr[p*M+n] * $sin(a) + xi[p*M+n] * $cos(a);
        end
        a = sg * 2.0 * PI * j * n / L;
        tr = sr * $cos(a) - si * $sin(a);
        ti = sr * $sin(a) + si * $cos(a);
        yr[j*M+n] = tr; yi[j*M+n] = ti;
      end
  endfunction

  // Checkers
  task automatic check_stream(input int R, input int L, input bit inv, input int which);
    real xr[], xi[], yr[], yi[];
    int k, first_cyc;
    xr = new[L]; xi = new[L];
    for (int i = 0; i < L; i++) begin
      if (which == 0) begin xr[i] = xa_re.pop_front(); xi[i] = xa_im.pop_front(); end
      else            begin xr[i] = xb_re.pop_front(); xi[i] = xb_im.pop_front(); end
    end
    expect_block(R, L, inv, xr, xi, yr, yi);
    k = 0;
    while (k < L) begin
      @(posedge clk);
      if (which == 0 ? a_ov : b_ov) begin
        real gr = which == 0 ? real'(a_or) : real'(b_or);
        real gi = which == 0 ? real'(a_oi) : real'(b_oi);
        if (k == 0) begin
          int lc = which == 0 ? a_last.pop_front() : b_last.pop_front();
          first_cyc = cyc;
          checks++;
          if (first_cyc - lc != 4) begin
            failures++;
            $display("latency %0d (dut %0d)", first_cyc - lc, which);
          end
        end else begin
          checks++;
          if (cyc != first_cyc + k) begin failures++; $display("gap in output"); end
        end
        checks++;
        if ((gr - yr[k]) > 4.0 || (yr[k] - gr) > 4.0 || (gi - yi[k]) > 4.0 || (yi[k] - gi) > 4.0) begin
          failures++;
          if (failures < 10) $display("dut %0d k=%0d got %f,%f exp %f,%f", which, k, gr, gi, yr[k], yi[k]);
        end
        k++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int b = 0; b < 3; b++)
          for (int i = 0; i < 15; i++) begin
            @(negedge clk);
            a_iv = 1; a_ir = 16'($urandom_range(0, 8000)) - 16'sd4000; a_ii = 16'($urandom_range(0, 8000)) - 16'sd4000;
            xa_re.push_back(real'(a_ir)); xa_im.push_back(real'(a_ii));
            if (i == 14) a_last.push_back(cyc + 1);
            if (b == 1 && i == 7) begin @(negedge clk); a_iv = 0; end
          end
        @(negedge clk); a_iv = 0;
      end
      begin
        for (int b = 0; b < 3; b++)
          for (int i = 0; i < 25; i++) begin
            @(negedge clk);
            b_iv = 1; b_ir = 16'($urandom_range(0, 8000)) - 16'sd4000; b_ii = 16'($urandom_range(0, 8000)) - 16'sd4000;
            xb_re.push_back(real'(b_ir)); xb_im.push_back(real'(b_ii));
            if (i == 24) b_last.push_back(cyc + 1);
          end
        @(negedge clk); b_iv = 0;
      end
      begin
        for (int b = 0; b < 3; b++) begin wait (a_last.size() > 0); check_stream(3, 15, 0, 0); end
      end
      begin
        for (int b = 0; b < 3; b++) begin wait (b_last.size() > 0); check_stream(5, 25, 1, 1); end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
