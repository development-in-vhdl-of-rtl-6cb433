// Self-checking testbench for transform_precoding.
//
// For NRB = 6 (1800-point FFT, one value every 25th input sample) and
// NRB = 25 (1200-point FFT, every 4th) it feeds one subframe of 12 random
// 16QAM symbols, zero-stuffed as the block expects, with random idle
// cycles between input samples. Every output is compared with the
// transform-precoding definition X(k) = sum_m a(m) exp(-2j*pi*k*m/M)/sqrt(M),
// M = 12*NRB, computed in real arithmetic: per component the error must
// stay within 160 LSB (2% of the RMS level) and the signal-to-error ratio over the subframe must
// exceed 40 dB. It also checks the subcarrier and symbol tags (k = 0..M-1,
// l skipping DMRS symbols 3 and 10), the sf_start pulse, the subframe-last
// flag and that each symbol leaves as M consecutive samples.
module tb_transform_precoding;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]  nrb;
  logic        in_valid = 0, sf_start, out_valid, out_sf_last;
  cplx_t       in_data = '0, out_data;
  logic [10:0] out_k;
  logic [3:0]  out_l;

  transform_precoding dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int QAM[4] = '{-7772, -2591, 2591, 7772};
  real ar[NPUSCH_SYM][1200], ai[NPUSCH_SYM][1200];
  int  sf_pulses;
  real sigpow, errpow, maxerr;

  always @(posedge clk) if (rst_n && sf_start) sf_pulses++;

  task automatic run(input int nrb_i);
    int msc, nfft, stride;
    real cs[], sn[];
    msc = 12 * nrb_i;
    nfft = (nrb_i == 6 || nrb_i == 15 || nrb_i == 75) ? 1800 : 1200;
    stride = nfft / msc;
    cs = new[msc]; sn = new[msc];
    for (int i = 0; i < msc; i++) begin
      cs[i] = $cos(2.0 * PI * i / msc);
      sn[i] = -$sin(2.0 * PI * i / msc);
    end
    for (int s = 0; s < NPUSCH_SYM; s++)
      for (int m = 0; m < msc; m++) begin
        ar[s][m] = real'(QAM[$urandom_range(0, 3)]);
        ai[s][m] = real'(QAM[$urandom_range(0, 3)]);
      end
    rst_n = 0;
    nrb = 7'(nrb_i);
    sf_pulses = 0; sigpow = 0; errpow = 0; maxerr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (int s = 0; s < NPUSCH_SYM; s++)
          for (int i = 0; i < nfft; i++) begin
            @(negedge clk);
            if ($urandom_range(0, 9) == 0) begin
              in_valid = 0;
              @(negedge clk);
            end
            in_valid = 1;
            if (i % stride == 0) begin
              in_data.re = 16'($rtoi(ar[s][i / stride]));
              in_data.im = 16'($rtoi(ai[s][i / stride]));
            end else in_data = '0;
          end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        for (int s = 0; s < NPUSCH_SYM; s++)
          for (int k = 0; k < msc; k++) begin
            real er = 0, ei = 0, e;
            if (k == 0) while (!out_valid) @(posedge clk);
            else begin
              @(posedge clk);
              check(out_valid, $sformatf("gap inside symbol %0d at k %0d", s, k));
            end
            for (int m = 0; m < msc; m++) begin
              int t = (k * m) % msc;
              er += ar[s][m] * cs[t] - ai[s][m] * sn[t];
              ei += ar[s][m] * sn[t] + ai[s][m] * cs[t];
            end
            er = er / $sqrt(real'(msc));
            ei = ei / $sqrt(real'(msc));
            e = (real'(out_data.re) - er) ** 2 + (real'(out_data.im) - ei) ** 2;
            errpow += e; sigpow += er * er + ei * ei;
            if ($sqrt(e) > maxerr) maxerr = $sqrt(e);
            check((real'(out_data.re) - er) ** 2 <= 160.0 * 160.0 &&
                  (real'(out_data.im) - ei) ** 2 <= 160.0 * 160.0,
                  $sformatf("nrb %0d sym %0d k %0d got %0d,%0d exp %0.1f,%0.1f",
                            nrb_i, s, k, $signed(out_data.re), $signed(out_data.im), er, ei));
            check(int'(out_k) == k, $sformatf("out_k %0d exp %0d", out_k, k));
            check(out_l == pusch_sym_to_l(4'(s)), $sformatf("out_l %0d for data symbol %0d", out_l, s));
            check(out_sf_last == (s == NPUSCH_SYM - 1 && k == msc - 1), "sf_last flag");
            @(negedge clk);
          end
      end
    join
    repeat (50) @(posedge clk);
    check(!out_valid, "no extra output");
    check(sf_pulses == 1, $sformatf("sf_start pulses %0d", sf_pulses));
    check(10.0 * $log10(sigpow / errpow) > 40.0, "signal-to-error ratio");
    $display("nrb %0d: max error %0.1f LSB, SNR %0.1f dB", nrb_i, maxerr, 10.0 * $log10(sigpow / errpow));
  endtask

  initial begin
    nrb = 7'd6;
    run(6);
    run(25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
