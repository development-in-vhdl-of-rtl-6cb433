// End-to-end self-checking testbench of uplink_tx.
//
// Random PUSCH data (zero-stuffed QPSK or 16QAM) goes in; the SC-FDMA
// waveform that comes out is compared sample by sample with a reference
// built here from the definitions: a DFT of each data symbol scaled by
// 1/sqrt(12*NRB), the LTE PUSCH DMRS (Gold sequences, group or sequence
// hopping, cyclic shift, Zadoff-Chu root) in symbols 3 and 10, and
//   x_l(n) = 2^-s * sum_k X(l,k) exp(2j*pi*(k - 6*NRB + 1/2)*n/2048)
// sent with its cyclic prefix (160/144) and decimated to the bandwidth's
// rate. Runs: 6 RBs (1800-point path, decimation 16, group hopping) for
// two subframes, 25 RBs (1200-point path, decimation 4, sequence hopping,
// symbol-edge windowing on) for two, and 6 RBs with subframes sent back to
// back faster than the modulator can send them, which must raise the grid
// overrun counter. The end prints how often each mechanism was exercised
// and counts a failure for any that never happened.
module tb_uplink_tx;
  localparam real TOL = 160.0;
  localparam real MIN_SNR = 40.0;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]  nulrb = 7'd6;
  logic [8:0]  ncell_id = '0;
  logic [4:0]  seqgroup = '0;
  logic [2:0]  cyclicshift = '0, cyclicshift_dci = '0;
  logic        group_en = 0, seq_en = 0, win_en = 0;
  logic        data_in_valid = 0;
  cplx_t       data_in = '0;
  logic        tx_valid, tx_sym_start, mod_ready, dmrs_busy;
  cplx_t       tx_out;
  logic [3:0]  tx_sym, dmrs_subframe;
  logic [15:0] grid_overrun;

  uplink_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // Mechanism counters.
  int n_sf = 0, n_sym160 = 0, n_sym144 = 0, n_samples = 0, n_dmrs_sym = 0;
  int n_path1200 = 0, n_path1800 = 0, n_decim[int], n_overrun_runs = 0;
  int n_u_changes = 0, n_v_set = 0, n_windowed_sym = 0;

  // Latency from the first input sample to the first output sample of a run.
  longint cyc = 0, t_in = -1, t_out = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      t_in = -1;
      t_out = -1;
    end else begin
      if (data_in_valid && t_in < 0) t_in = cyc;
      if (tx_valid && t_out < 0) t_out = cyc;
    end
  end

  // ------------------------------------------------------------ reference
  function automatic bit cseq(input int cinit, input int n);
    bit x1[], x2[];
    x1 = new[n + 1600 + 31]; x2 = new[n + 1600 + 31];
    for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = (cinit >> i) & 1; end
    for (int i = 0; i < n + 1600; i++) begin
      x1[i+31] = x1[i+3] ^ x1[i];
      x2[i+31] = x2[i+3] ^ x2[i+2] ^ x2[i+1] ^ x2[i];
    end
    return x1[n+1600] ^ x2[n+1600];
  endfunction

  function automatic bit is_prime(input int p);
    for (int d = 2; d * d <= p; d++) if (p % d == 0) return 0;
    return 1;
  endfunction

  real g_re[2][NSYM][1200], g_im[2][NSYM][1200];   // reference grid per subframe
  real t_c[4096], t_s[4096];
  int  last_u = -1;
  initial for (int i = 0; i < 4096; i++) begin
    t_c[i] = $cos(2.0 * PI * i / 4096.0);
    t_s[i] = $sin(2.0 * PI * i / 4096.0);
  end

  // DMRS of slot ns into the reference grid, symbol 3 or 10.
  task automatic ref_dmrs(input int b, input int ns, input int rb, input int cellv, input int sgv,
                          input int csv, input int csdv, input bit g, input bit s);
    int n1[8] = '{0, 2, 3, 4, 6, 8, 9, 10};
    int n2[8] = '{0, 6, 3, 4, 2, 8, 10, 9};
    int msc = 12 * rb, nzc, fss, fgh = 0, u, v = 0, npn = 0, ncs, q, l;
    real qbar;
    nzc = msc - 1;
    while (!is_prime(nzc)) nzc--;
    fss = (cellv + sgv) % 30;
    if (g) begin
      for (int i = 0; i < 8; i++) fgh += cseq(cellv / 30, 8 * ns + i) << i;
      fgh = fgh % 30;
    end
    u = (fgh + fss) % 30;
    if (!g && s) v = cseq((cellv / 30) * 32 + fss, ns);
    for (int i = 0; i < 8; i++) npn += cseq((cellv / 30) * 32 + fss, 56 * ns + i) << i;
    ncs = (n1[csv] + n2[csdv] + npn) % 12;
    qbar = real'(nzc) * real'(u + 1) / 31.0;
    q = int'($floor(qbar + 0.5)) + v * ((int'($floor(2.0 * qbar)) % 2 == 0) ? 1 : -1);
    l = (ns % 2) ? 10 : 3;
    if (last_u >= 0 && u != last_u) n_u_changes++;
    last_u = u;
    if (v) n_v_set++;
    for (int k = 0; k < msc; k++) begin
      int m = k % nzc;
      real ph = 2.0 * PI * ncs * k / 12.0 - PI * real'(q) * real'(m) * real'(m + 1) / real'(nzc);
      g_re[b][l][k] = 8192.0 * $cos(ph);
      g_im[b][l][k] = 8192.0 * $sin(ph);
    end
  endtask

  localparam int WL = 32;   // window length of the modulator
  function automatic real win(input int i);
    return real'($rtoi($floor((1.0 - $cos(PI * (i + 0.5) / WL)) / 2.0 * 16384.0 + 0.5))) / 16384.0;
  endfunction

  // Reference sample n of grid symbol l of buffer b, before the output shift.
  task automatic sym_val(input int b, input int l, input int n, input int msc, output real er, output real ei);
    er = 0; ei = 0;
    for (int k = 0; k < msc; k++) begin
      int t = ((2 * k - msc + 1) * n) & 4095;
      er += g_re[b][l][k] * t_c[t] - g_im[b][l][k] * t_s[t];
      ei += g_re[b][l][k] * t_s[t] + g_im[b][l][k] * t_c[t];
    end
  endtask

  // ------------------------------------------------------------ one run
  // Sends nsf subframes of random PUSCH data (QPSK if qpsk, else 16QAM) for
  // the given configuration. With paced = 1 each subframe starts 30720
  // cycles after the previous one and the whole waveform is checked;
  // otherwise data is sent back to back and only grid overruns are checked.
  task automatic run(input int rb, input int cellv, input int sgv, input int csv, input int csdv,
                     input bit g, input bit s, input int nsf, input bit paced, input bit qpsk,
                     input bit wen);
    int msc, nfft, stride, dec, sh, tol;
    real sigpow = 0, errpow = 0, maxerr = 0;
    msc = 12 * rb;
    nfft = int'(nrb_to_nfft_tp(7'(rb)));
    stride = nfft / msc;
    dec = int'(nrb_to_decim(7'(rb)));
    sh = int'(nrb_to_out_shift(7'(rb)));
    rst_n = 0;
    nulrb = 7'(rb); ncell_id = 9'(cellv); seqgroup = 5'(sgv);
    cyclicshift = 3'(csv); cyclicshift_dci = 3'(csdv); group_en = g; seq_en = s; win_en = wen;
    last_u = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (nfft == 1800) n_path1800++; else n_path1200++;
    fork
      // driver and reference
      begin
        for (int sf = 0; sf < nsf; sf++) begin
          int t0 = 0;
          real a_re[1200], a_im[1200];
          for (int d = 0; d < NPUSCH_SYM; d++) begin
            int l = int'(pusch_sym_to_l(4'(d)));
            for (int m = 0; m < msc; m++) begin
              if (qpsk) begin
                a_re[m] = $urandom_range(0, 1) ? 5793.0 : -5793.0;
                a_im[m] = $urandom_range(0, 1) ? 5793.0 : -5793.0;
              end else begin
                a_re[m] = real'(int'($urandom_range(0, 3)) * 5181 - 7772);
                a_im[m] = real'(int'($urandom_range(0, 3)) * 5181 - 7772);
              end
            end
            for (int k = 0; k < msc; k++) begin
              real er = 0, ei = 0;
              for (int m = 0; m < msc; m++) begin
                real c = $cos(2.0 * PI * real'((k * m) % msc) / real'(msc));
                real sn = -$sin(2.0 * PI * real'((k * m) % msc) / real'(msc));
                er += a_re[m] * c - a_im[m] * sn;
                ei += a_re[m] * sn + a_im[m] * c;
              end
              g_re[sf % 2][l][k] = er / $sqrt(real'(msc));
              g_im[sf % 2][l][k] = ei / $sqrt(real'(msc));
            end
            for (int i = 0; i < nfft; i++) begin
              @(negedge clk);
              t0++;
              data_in_valid = 1;
              if (i % stride == 0) begin
                data_in.re = 16'($rtoi(a_re[i / stride]));
                data_in.im = 16'($rtoi(a_im[i / stride]));
              end else data_in = '0;
            end
            if (d == 0) begin
              @(negedge clk);
              data_in_valid = 0;
              t0++;
              ref_dmrs(sf % 2, 2 * (sf % 10), rb, cellv, sgv, csv, csdv, g, s);
              ref_dmrs(sf % 2, 2 * (sf % 10) + 1, rb, cellv, sgv, csv, csdv, g, s);
            end
          end
          @(negedge clk);
          data_in_valid = 0;
          t0++;
          if (paced) while (t0 < 30720) begin @(negedge clk); t0++; end
        end
      end
      // waveform checker
      if (paced) begin
        for (int sf = 0; sf < nsf; sf++) begin
          for (int l = 0; l < NSYM; l++) begin
            int ncp = int'(cp_len(4'(l)));
            for (int i = 0; i < NFFT_MAX + ncp; i += dec) begin
              int n;
              real er = 0, ei = 0, e;
              n = (i < ncp) ? NFFT_MAX - ncp + i : i - ncp;
              @(posedge clk);
              while (!tx_valid) @(posedge clk);
              sym_val(sf % 2, l, n, msc, er, ei);
              if (wen && i < WL) begin
                real pr = 0, pim = 0;
                if (l > 0)       sym_val(sf % 2, l - 1, i, msc, pr, pim);
                else if (sf > 0) sym_val((sf - 1) % 2, NSYM - 1, i, msc, pr, pim);
                er = win(i) * er + win(WL - 1 - i) * pr;
                ei = win(i) * ei + win(WL - 1 - i) * pim;
              end
              er /= real'(1 << sh);
              ei /= real'(1 << sh);
              e = (real'(tx_out.re) - er) ** 2 + (real'(tx_out.im) - ei) ** 2;
              errpow += e; sigpow += er * er + ei * ei;
              if ($sqrt(e) > maxerr) maxerr = $sqrt(e);
              check((real'(tx_out.re) - er) ** 2 <= TOL * TOL && (real'(tx_out.im) - ei) ** 2 <= TOL * TOL,
                    $sformatf("nrb %0d sf %0d l %0d i %0d got %0d,%0d exp %0.1f,%0.1f", rb, sf, l, i,
                              $signed(tx_out.re), $signed(tx_out.im), er, ei));
              check(tx_sym_start == (i == 0), $sformatf("tx_sym_start sf %0d l %0d i %0d", sf, l, i));
              check(int'(tx_sym) == l, $sformatf("tx_sym %0d exp %0d", tx_sym, l));
              n_samples++;
            end
            if (ncp == 160) n_sym160++; else n_sym144++;
            if (l == 3 || l == 10) n_dmrs_sym++;
            if (wen) n_windowed_sym++;
          end
          n_sf++;
          if (n_decim.exists(dec)) n_decim[dec]++; else n_decim[dec] = 1;
        end
      end
    join
    if (paced) begin
      repeat (8000) @(posedge clk);
      check(!tx_valid && mod_ready && !dmrs_busy, "idle after the last subframe");
      check(grid_overrun == 0, $sformatf("no overrun when paced (%0d)", grid_overrun));
      check(int'(dmrs_subframe) == nsf % 10, "DMRS subframe counter");
      check(10.0 * $log10(sigpow / errpow) > MIN_SNR, "signal-to-error ratio");
      $display("nrb %0d (%0d-point FFT, decimation %0d): %0d subframes, max error %0.1f LSB, SNR %0.1f dB, latency %0d cycles",
               rb, nfft, dec, nsf, maxerr, 10.0 * $log10(sigpow / errpow), t_out - t_in);
    end else begin
      repeat (40000) @(posedge clk);
      check(grid_overrun > 0, "overrun detected when input outpaces the modulator");
      if (grid_overrun > 0) n_overrun_runs++;
      $display("nrb %0d unpaced, %0d subframes: %0d samples dropped as overrun", rb, nsf, grid_overrun);
    end
  endtask

  task automatic report();
    $display("mechanisms: subframes %0d, symbols with CP 160: %0d, with CP 144: %0d, DMRS symbols %0d",
             n_sf, n_sym160, n_sym144, n_dmrs_sym);
    $display("mechanisms: 1200-point path runs %0d, 1800-point path runs %0d, output samples %0d",
             n_path1200, n_path1800, n_samples);
    $display("mechanisms: group-hopping root changes %0d, sequence-hopping v=1 slots %0d, overrun runs %0d, windowed symbols %0d",
             n_u_changes, n_v_set, n_overrun_runs, n_windowed_sym);
    foreach (n_decim[d]) $display("mechanisms: decimation %0d used in %0d subframes", d, n_decim[d]);
  endtask

  initial begin
    #40_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    run(6, 17, 3, 2, 5, 1, 0, 2, 1, 1, 0);
    run(25, 230, 0, 7, 1, 0, 1, 2, 1, 0, 1);
    run(6, 401, 11, 0, 0, 0, 0, 5, 0, 1, 0);
    report();
    check(n_path1200 > 0 && n_path1800 > 0, "both FFT sizes used");
    check(n_sym160 > 0 && n_sym144 > 0, "both CP lengths used");
    check(n_dmrs_sym > 0 && n_u_changes > 0 && n_v_set > 0, "DMRS with group and sequence hopping");
    check(n_decim.num() >= 2, "at least two decimation factors");
    check(n_overrun_runs > 0 && n_windowed_sym > 0, "overrun and windowing exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
