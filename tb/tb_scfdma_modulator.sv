// Self-checking testbench for scfdma_modulator.
//
// A behavioural resource grid holds one subframe of random subcarrier
// values a(l,k) and serves the modulator's reads one cycle later; symbol 5
// is made ready late so the modulator has to wait for it. For NRB = 6
// (decimation 16) and NRB = 25 (decimation 4) every output sample is
// compared with the SC-FDMA definition
//   x_l(n) = 2^-s * sum_k a(l,k) exp(2j*pi*(k - 6*NRB + 1/2)*n/2048),
// n = 0..2047, s the NRB output shift, sent as the last Ncp samples
// (Ncp = 160 for symbols 0 and 7, 144 otherwise) followed by all 2048,
// keeping every D-th sample. A third run (NRB = 25) enables windowing: the
// first 32 samples of each symbol are then expected as the raised-cosine
// cross-fade w(i)*x_l + w(31-i)*x_(l-1)(i) with the previous symbol's
// continuation (zero before the first symbol). Bounds: 8 LSB per component and a
// signal-to-error ratio above 45 dB. It also checks the sample count of
// every symbol, out_sym_start on its first sample and out_l.
module tb_scfdma_modulator;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]      nrb;
  logic            win_en = 0;
  logic [NSYM-1:0] sym_full;
  logic            ready, rd_en, rd_valid, out_valid, out_sym_start;
  logic [3:0]      rd_l, out_l;
  logic [10:0]     rd_k;
  cplx_t           rd_data, out_data;

  scfdma_modulator dut (.*);

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

  // Behavioural grid.
  int ga_re[NSYM][1200], ga_im[NSYM][1200];
  int cur_nrb;
  always @(posedge clk) begin
    rd_valid <= rd_en;
    if (rd_en) begin
      rd_data.re <= 16'(ga_re[rd_l][rd_k]);
      rd_data.im <= 16'(ga_im[rd_l][rd_k]);
      if (12'(rd_k) == 12'(12 * cur_nrb - 1)) sym_full[rd_l] <= 1'b0;
    end
  end

  real sigpow, errpow, maxerr;

  localparam int WL = 32;
  function automatic real win(input int i);
    return real'($rtoi($floor((1.0 - $cos(PI * (i + 0.5) / WL)) / 2.0 * 16384.0 + 0.5))) / 16384.0;
  endfunction

  // Reference sample n of symbol l, before the output shift.
  task automatic sym_val(input int l, input int n, input int msc, output real er, output real ei);
    er = 0; ei = 0;
    for (int k = 0; k < msc; k++) begin
      real ph = 2.0 * PI * (real'(k - msc / 2) + 0.5) * real'(n) / 2048.0;
      er += real'(ga_re[l][k]) * $cos(ph) - real'(ga_im[l][k]) * $sin(ph);
      ei += real'(ga_re[l][k]) * $sin(ph) + real'(ga_im[l][k]) * $cos(ph);
    end
  endtask

  task automatic run(input int nrb_i, input bit wen);
    int msc, dec, sh;
    msc = 12 * nrb_i;
    dec = int'(nrb_to_decim(7'(nrb_i)));
    sh  = int'(nrb_to_out_shift(7'(nrb_i)));
    for (int l = 0; l < NSYM; l++)
      for (int k = 0; k < msc; k++) begin
        ga_re[l][k] = int'($urandom_range(0, 10000)) - 5000;
        ga_im[l][k] = int'($urandom_range(0, 10000)) - 5000;
      end
    rst_n = 0;
    cur_nrb = nrb_i;
    nrb = 7'(nrb_i);
    win_en = wen;
    sym_full = '0;
    sigpow = 0; errpow = 0; maxerr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        sym_full = 14'h3fdf;            // all but symbol 5
        repeat (30000) @(negedge clk);
        sym_full[5] = 1'b1;
      end
      begin
        for (int l = 0; l < NSYM; l++) begin
          int ncp = int'(cp_len(4'(l)));
          for (int i = 0; i < NFFT_MAX + ncp; i += dec) begin
            int n;
            real er = 0, ei = 0, e;
            n = (i < ncp) ? NFFT_MAX - ncp + i : i - ncp;
            @(posedge clk);
            while (!out_valid) @(posedge clk);
            sym_val(l, n, msc, er, ei);
            if (wen && i < WL) begin
              real pr = 0, pim = 0;
              if (l > 0) sym_val(l - 1, i, msc, pr, pim);
              er = win(i) * er + win(WL - 1 - i) * pr;
              ei = win(i) * ei + win(WL - 1 - i) * pim;
            end
            er /= real'(1 << sh);
            ei /= real'(1 << sh);
            e = (real'(out_data.re) - er) ** 2 + (real'(out_data.im) - ei) ** 2;
            errpow += e; sigpow += er * er + ei * ei;
            if ($sqrt(e) > maxerr) maxerr = $sqrt(e);
            check((real'(out_data.re) - er) ** 2 <= 8.0 * 8.0 &&
                  (real'(out_data.im) - ei) ** 2 <= 8.0 * 8.0,
                  $sformatf("nrb %0d l %0d i %0d got %0d,%0d exp %0.1f,%0.1f", nrb_i, l, i,
                            $signed(out_data.re), $signed(out_data.im), er, ei));
            check(out_sym_start == (i == 0), $sformatf("sym_start at l %0d i %0d", l, i));
            check(int'(out_l) == l, $sformatf("out_l %0d exp %0d", out_l, l));
          end
        end
      end
    join
    repeat (6000) @(posedge clk) check(!out_valid, "extra output after the subframe");
    check(10.0 * $log10(sigpow / errpow) > 45.0, "signal-to-error ratio");
    $display("nrb %0d: max error %0.1f LSB, SNR %0.1f dB", nrb_i, maxerr, 10.0 * $log10(sigpow / errpow));
  endtask

  initial begin
    nrb = 7'd6;
    sym_full = '0;
    run(6, 0);
    run(25, 0);
    run(25, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
