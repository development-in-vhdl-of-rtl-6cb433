// Self-checking test of pusch_dmrs_gen against a reference model of the
// LTE PUSCH DMRS written here in real arithmetic: Gold sequences from the
// bit recursions, group hopping, sequence hopping, cyclic shift and the
// Zadoff-Chu root from qbar = NZC*(u+1)/31. Four configurations (6 RBs
// with group hopping, 25 RBs with sequence hopping, 100 RBs with neither,
// 50 RBs with group hopping) each run two subframes, i.e. slots ns = 0..3,
// so the internal subframe counter is also exercised. Every sample must be
// within 4 LSB of 8192*r(n), carry its subcarrier n and symbol 3 or 10, and
// each slot's samples must leave on consecutive cycles.
module tb_pusch_dmrs_gen;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] nrb = 6;
  logic [8:0] cell_id = 0;
  logic [4:0] sg = 0;
  logic [2:0] cs = 0, csd = 0;
  logic gen = 0, sen = 0, start = 0, busy, ov;
  cplx_t od;
  logic [10:0] ok;
  logic [3:0] ol, sfc;
  pusch_dmrs_gen dut (.clk, .rst_n, .nrb, .ncell_id(cell_id), .seqgroup(sg), .cyclicshift(cs),
                      .cyclicshift_dci(csd), .group_en(gen), .seq_en(sen), .start, .busy,
                      .out_valid(ov), .out_data(od), .out_k(ok), .out_l(ol), .subframe(sfc));

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

  task automatic check_slot(input int ns, input int rb, input int cellv, input int sgv,
                            input int csv, input int csdv, input bit g, input bit s);
    int n1[8] = '{0, 2, 3, 4, 6, 8, 9, 10};
    int n2[8] = '{0, 6, 3, 4, 2, 8, 10, 9};
    int msc = 12 * rb, nzc, fss, fgh = 0, u, v = 0, npn = 0, ncs, q;
    real qbar;
    int k = 0, first = -1, cyc = 0;
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
    while (k < msc) begin
      @(posedge clk);
      cyc++;
      if (ov) begin
        int m = k % nzc;
        real ph = 2.0 * PI * ncs * k / 12.0 - PI * real'(q) * real'(m) * real'(m + 1) / real'(nzc);
        real er = 8192.0 * $cos(ph), ei = 8192.0 * $sin(ph);
        if (first < 0) first = cyc;
        checks++;
        if ((real'(od.re) - er) ** 2 > 16.0 || (real'(od.im) - ei) ** 2 > 16.0 || ok != 11'(k)
            || ol != ((ns % 2) ? 4'd10 : 4'd3) || cyc != first + k) begin
          failures++;
          if (failures < 10) $display("ns %0d rb %0d k %0d: got %0d,%0d exp %f,%f (u %0d v %0d ncs %0d q %0d)",
                                      ns, rb, k, od.re, od.im, er, ei, u, v, ncs, q);
        end
        k++;
      end
    end
  endtask

  initial begin
    int cfg_rb[4]   = '{6, 25, 100, 50};
    int cfg_cell[4] = '{17, 233, 503, 88};
    int cfg_sg[4]   = '{0, 5, 29, 13};
    int cfg_cs[4]   = '{3, 0, 7, 5};
    int cfg_csd[4]  = '{1, 6, 2, 0};
    bit cfg_g[4]    = '{1, 0, 0, 1};
    bit cfg_s[4]    = '{0, 1, 0, 1};
    int ns_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4; c++) begin
      nrb = 7'(cfg_rb[c]); cell_id = 9'(cfg_cell[c]); sg = 5'(cfg_sg[c]);
      cs = 3'(cfg_cs[c]); csd = 3'(cfg_csd[c]); gen = cfg_g[c]; sen = cfg_s[c];
      for (int sf = 0; sf < 2; sf++) begin
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        check_slot(ns_base, cfg_rb[c], cfg_cell[c], cfg_sg[c], cfg_cs[c], cfg_csd[c], cfg_g[c], cfg_s[c]);
        check_slot(ns_base + 1, cfg_rb[c], cfg_cell[c], cfg_sg[c], cfg_cs[c], cfg_csd[c], cfg_g[c], cfg_s[c]);
        while (busy) @(negedge clk);
        ns_base += 2;
        checks++;
        if (sfc != 4'((ns_base / 2) % 10)) begin failures++; $display("subframe counter %0d", sfc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
