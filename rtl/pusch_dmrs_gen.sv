// PUSCH demodulation reference signal (DMRS) generator.
//
// For each slot ns of a subframe it produces the 12*NRB samples
//   r(n) = exp(j*alpha*n) * x_q(n mod NZC),  x_q(m) = exp(-j*pi*q*m*(m+1)/NZC)
// of the cyclically shifted Zadoff-Chu base sequence, NZC being the
// largest prime below 12*NRB, and writes them to symbol 3 (slot 0) or 10
// (slot 1) of the subframe, subcarrier n. The parameters are derived as in
// the LTE uplink reference-signal rules:
//   f_ss = (ncell_id + seqgroup) mod 30
//   f_gh = group_en ? (sum_i c1(8*ns+i)*2^i) mod 30 : 0, c1 seeded ncell_id/30
//   u    = (f_gh + f_ss) mod 30
//   v    = (!group_en && seq_en) ? c2(ns) : 0, c2 seeded (ncell_id/30)*32+f_ss
//   n_cs = (n1[cyclicshift] + n2[cyclicshift_dci] + sum_i c2(56*ns+i)*2^i) mod 12
//   qbar = NZC*(u+1)/31, q = floor(qbar+1/2) + v*(-1)^floor(2*qbar)
// with alpha = 2*pi*n_cs/12, n1 = {0,2,3,4,6,8,9,10}, n2 = {0,6,3,4,2,8,10,9}.
//
// Structure, after the document's generator: a Gold-sequence-inputs step
// loads two Gold generators (init/load/enable) and collects the hopping bits;
// the hopping-numbers step derives u and v; subcarrier counters run n over
// 0..12*NRB-1 and m over 0..NZC-1; the alpha-exponent and Xq(m) phases are
// added and a CORDIC turns the sum into cos + j*sin. The phases are kept
// as exact residues (n_cs*n mod 12, q*m*(m+1)/2 mod NZC, updated by
// additions only) and scaled to a 24-bit turn fraction with a reciprocal.
//
// Interface: a start pulse (first PUSCH sample of a subframe) runs slot 0
// then slot 1 of the current subframe; an internal subframe counter, reset
// to 0, advances by one (mod 10) after each subframe. About 1600+56*ns
// cycles of Gold-sequence warm-up precede each slot's 12*NRB outputs, which
// leave on consecutive cycles with out_k and out_l. Configuration inputs
// must be stable from start to the end of busy.
module pusch_dmrs_gen
  import ultx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  nrb,
  input  logic [8:0]  ncell_id,
  input  logic [4:0]  seqgroup,
  input  logic [2:0]  cyclicshift,
  input  logic [2:0]  cyclicshift_dci,
  input  logic        group_en,
  input  logic        seq_en,
  input  logic        start,
  output logic        busy,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [10:0] out_k,
  output logic [3:0]  out_l,
  output logic [3:0]  subframe
);
  typedef enum logic [2:0] {IDLE, LOAD, RUN, HOP, QCALC, GEN, DRAIN} state_t;
  state_t state;

  logic        slot;
  logic [4:0]  ns;
  logic [4:0]  fss;
  logic [4:0]  cell_div30;
  logic [7:0]  fgh_bits, npn_bits;
  logic        v_bit;
  logic [10:0] nzc;
  logic [31:0] recip;
  logic [11:0] msc;

  assign nzc   = nrb_to_nzc(nrb);
  assign recip = nrb_to_nzc_recip(nrb);
  assign msc   = nrb_to_msc(nrb);
  assign cell_div30 = 5'(ncell_id / 9'd30);
  assign fss = 5'((10'(ncell_id) + 10'(seqgroup)) % 10'd30);

  // ------------------------------------------------------ Gold sequences
  logic        g_load, g_en;
  logic        c1, c1_v, c2, c2_v;
  logic [11:0] i1, i2;

  gold_seq_gen u_gold_gh (
    .clk, .rst_n, .load(g_load), .c_init(31'(cell_div30)), .enable(g_en),
    .c(c1), .c_valid(c1_v), .idx(i1));

  gold_seq_gen u_gold_pn (
    .clk, .rst_n, .load(g_load), .c_init(31'({cell_div30, fss})), .enable(g_en),
    .c(c2), .c_valid(c2_v), .idx(i2));

  logic [11:0] base_gh, base_pn, last_idx;
  assign base_gh  = 12'(ns) * 12'd8;
  assign base_pn  = 12'(ns) * 12'd56;
  assign last_idx = base_pn + 12'd7;

  // --------------------------------------------------- hopping numbers
  logic [4:0]  u;
  logic        v;
  logic [3:0]  ncs;
  logic [10:0] q;

  function automatic logic [3:0] n1_tab(input logic [2:0] i);
    case (i)
      3'd0: return 4'd0;  3'd1: return 4'd2;  3'd2: return 4'd3;  3'd3: return 4'd4;
      3'd4: return 4'd6;  3'd5: return 4'd8;  3'd6: return 4'd9;  default: return 4'd10;
    endcase
  endfunction
  function automatic logic [3:0] n2_tab(input logic [2:0] i);
    case (i)
      3'd0: return 4'd0;  3'd1: return 4'd6;  3'd2: return 4'd3;  3'd3: return 4'd4;
      3'd4: return 4'd2;  3'd5: return 4'd8;  3'd6: return 4'd10; default: return 4'd9;
    endcase
  endfunction

  // Zadoff-Chu root: q = floor(qbar + 1/2) + v*(-1)^floor(2*qbar), reduced mod NZC.
  logic [16:0] zc_prod;
  logic [10:0] q0, q_next;
  logic        q_odd;
  logic [11:0] qq;
  always_comb begin
    zc_prod = 17'(nzc) * 17'(6'(u) + 6'd1);
    q0      = 11'((18'(zc_prod) * 18'd2 + 18'd31) / 18'd62);
    q_odd   = 1'(((18'(zc_prod) * 18'd2) / 18'd31) & 18'd1);
    qq      = v ? (q_odd ? 12'(q0) - 12'd1 : 12'(q0) + 12'd1) : 12'(q0);
    q_next  = (qq >= 12'(nzc)) ? 11'(qq - 12'(nzc)) : 11'(qq);
  end

  // ------------------------------------------------ subcarrier counters
  logic [10:0] n, m;
  logic [10:0] acc_b, inc;   // q*m*(m+1)/2 mod NZC and q*(m+1) mod NZC
  logic [3:0]  acc_a;        // n_cs*n mod 12
  logic [31:0] ph32;
  logic        cor_v;

  always_comb begin
    ph32 = 32'(acc_a) * 32'd357913941 - 32'(acc_b) * recip;   // 2^32/12
  end

  function automatic logic [10:0] addmod(input logic [10:0] a, input logic [10:0] b,
                                         input logic [10:0] md);
    logic [11:0] s;
    s = 12'(a) + 12'(b);
    return (s >= 12'(md)) ? 11'(s - 12'(md)) : 11'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      slot     <= 1'b0;
      ns       <= '0;
      subframe <= '0;
      fgh_bits <= '0;
      npn_bits <= '0;
      v_bit    <= 1'b0;
      u        <= '0;
      v        <= 1'b0;
      ncs      <= '0;
      q        <= '0;
      n        <= '0;
      m        <= '0;
      acc_a    <= '0;
      acc_b    <= '0;
      inc      <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          slot  <= 1'b0;
          ns    <= 5'(subframe) * 5'd2;
          state <= LOAD;
        end
        LOAD: state <= RUN;
        RUN: begin
          if (c1_v && i1 >= base_gh && i1 < base_gh + 12'd8)
            fgh_bits[3'(i1 - base_gh)] <= c1;
          if (c2_v && i2 == 12'(ns)) v_bit <= c2;
          if (c2_v && i2 >= base_pn && i2 <= last_idx)
            npn_bits[3'(i2 - base_pn)] <= c2;
          if (c2_v && i2 == last_idx) state <= HOP;
        end
        HOP: begin
          u   <= 5'((10'(group_en ? 8'(fgh_bits % 8'd30) : 8'd0) + 10'(fss)) % 10'd30);
          v   <= !group_en && seq_en && v_bit;
          ncs <= 4'((8'(n1_tab(cyclicshift)) + 8'(n2_tab(cyclicshift_dci)) + 8'(npn_bits % 8'd12)) % 8'd12);
          state <= QCALC;
        end
        QCALC: begin
          q     <= q_next;
          n     <= '0;
          m     <= '0;
          acc_a <= '0;
          acc_b <= '0;
          state <= GEN;
        end
        GEN: begin
          if (n == '0) inc <= q;
          acc_a <= (5'(acc_a) + 5'(ncs) >= 5'd12) ? 4'(5'(acc_a) + 5'(ncs) - 5'd12)
                                                  : acc_a + ncs;
          if (m == nzc - 11'd1) begin
            m     <= '0;
            acc_b <= '0;
            inc   <= q;
          end else begin
            m     <= m + 11'd1;
            acc_b <= addmod(acc_b, (n == '0) ? q : inc, nzc);
            inc   <= addmod((n == '0) ? q : inc, q, nzc);
          end
          n <= n + 11'd1;
          if (12'(n) == msc - 12'd1) state <= DRAIN;
        end
        DRAIN: if (!cor_v && !out_valid) begin
          if (!slot) begin
            slot  <= 1'b1;
            ns    <= ns + 5'd1;
            state <= LOAD;
          end else begin
            subframe <= (subframe == 4'd9) ? '0 : subframe + 4'd1;
            state    <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign g_load = (state == LOAD);
  assign g_en   = (state == RUN);
  assign busy   = (state != IDLE);

  // Phase to complex exponential.
  logic [14:0] tag_in, tag_out;
  assign tag_in = {n, slot ? 4'd10 : 4'd3};

  cordic_rotator #(.NIT(16), .TW(15)) u_cordic (
    .clk, .rst_n, .in_valid(state == GEN), .in_phase(ph32[31:8]), .in_tag(tag_in),
    .out_valid, .out_data, .out_tag(tag_out));

  assign out_k = tag_out[14:4];
  assign out_l = tag_out[3:0];

  // Any sample still inside the CORDIC pipeline.
  logic [17:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[16:0], state == GEN};
  end
  assign cor_v = |inflight;

endmodule
