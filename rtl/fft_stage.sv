// One decimation-in-frequency Cooley-Tukey stage of a mixed-radix FFT.
//
// The stage treats its input stream as consecutive blocks of L samples. A
// block is written into one half of a two-bank buffer (the delay line)
// while the previous block is read from the other half. For every block it
// produces L outputs, in position order o = j*(L/RADIX) + n, where
//   y(o) = W_L^(j*n) * sum_{p=0..RADIX-1} x(p*(L/RADIX) + n) * W_RADIX^(j*p)
// and W_K = exp(-2*pi*i/K) (exp(+2*pi*i/K) when INVERSE is set). This is
// one column-DFT plus twiddle step of the Cooley-Tukey factorisation
// N = RADIX * (L/RADIX); chaining stages with L divided by the radix each
// time gives a full FFT whose outputs are in digit-reversed order.
// The twiddle product uses three multipliers and three adders:
//   k1 = c(a+b), k2 = a(d-c), k3 = b(c+d); re = k1-k3, im = k1+k2.
//
// Interface: in_valid/in_re/in_im may arrive at any rate up to one sample
// per cycle and may pause. Once a block is complete, its L outputs leave on
// L consecutive cycles (out_valid high), starting 4 cycles after the last
// input sample of the block. Results are rounded, shifted right by SCALE
// and saturated to W_OUT bits. Twiddles are Q1.14 constants computed at
// elaboration. The block-buffered (ping-pong) delay line, the output
// ordering and the rounding are this design's choices; the document gives
// the stage as a delay line, an n-point FFT and a three-multiplier twiddle.
module fft_stage #(
  parameter int RADIX   = 3,
  parameter int L       = 15,
  parameter int W_IN    = 16,
  parameter int W_OUT   = 16,
  parameter int SCALE   = 0,
  parameter bit INVERSE = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_re,
  input  logic signed [W_IN-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [W_OUT-1:0] out_re,
  output logic signed [W_OUT-1:0] out_im
);
  import ultx_pkg::*;

  localparam int M  = L / RADIX;
  localparam int AW = (L > 1) ? $clog2(L) : 1;
  localparam int JW = (RADIX > 1) ? $clog2(RADIX) : 1;
  localparam int WY = W_IN + 3;   // width after the RADIX-point DFT
  localparam real PI = 3.141592653589793;

  typedef logic signed [15:0] tab_t [L];
  typedef logic signed [15:0] rtab_t [RADIX];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int i = 0; i < L; i++)
      t[i] = 16'($rtoi($floor($cos(2.0 * PI * i / L) * 16384.0 + 0.5)));
    return t;
  endfunction
  function automatic tab_t mk_sin();
    tab_t t;
    for (int i = 0; i < L; i++)
      t[i] = 16'($rtoi($floor((INVERSE ? 1.0 : -1.0) * $sin(2.0 * PI * i / L) * 16384.0 + 0.5)));
    return t;
  endfunction
  function automatic rtab_t mk_rcos();
    rtab_t t;
    for (int i = 0; i < RADIX; i++)
      t[i] = 16'($rtoi($floor($cos(2.0 * PI * i / RADIX) * 16384.0 + 0.5)));
    return t;
  endfunction
  function automatic rtab_t mk_rsin();
    rtab_t t;
    for (int i = 0; i < RADIX; i++)
      t[i] = 16'($rtoi($floor((INVERSE ? 1.0 : -1.0) * $sin(2.0 * PI * i / RADIX) * 16384.0 + 0.5)));
    return t;
  endfunction

  localparam tab_t  TW_C = mk_cos();
  localparam tab_t  TW_S = mk_sin();
  localparam rtab_t R_C  = mk_rcos();
  localparam rtab_t R_S  = mk_rsin();

  // ---------------------------------------------------------------- delay line
  logic signed [W_IN-1:0] buf_re [2][L];
  logic signed [W_IN-1:0] buf_im [2][L];
  logic          wr_bank;
  logic [AW-1:0] wr_addr;
  logic          blk_done;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_re[wr_bank][wr_addr] <= in_re;
      buf_im[wr_bank][wr_addr] <= in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank  <= 1'b0;
      wr_addr  <= '0;
      blk_done <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      if (in_valid) begin
        if (wr_addr == AW'(L - 1)) begin
          wr_addr  <= '0;
          wr_bank  <= ~wr_bank;
          blk_done <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------- read control
  logic          rd_active, rd_bank;
  logic [JW-1:0] rd_j;
  logic [AW-1:0] rd_n, rd_tw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_j      <= '0;
      rd_n      <= '0;
      rd_tw     <= '0;
    end else if (blk_done) begin
      rd_active <= 1'b1;
      rd_bank   <= ~wr_bank;
      rd_j      <= '0;
      rd_n      <= '0;
      rd_tw     <= '0;
    end else if (rd_active) begin
      if (rd_n == AW'(M - 1)) begin
        rd_n  <= '0;
        rd_tw <= '0;
        if (rd_j == JW'(RADIX - 1)) rd_active <= 1'b0;
        else                        rd_j <= rd_j + 1'b1;
      end else begin
        rd_n  <= rd_n + 1'b1;
        rd_tw <= (32'(rd_tw) + 32'(rd_j) >= L) ? AW'(32'(rd_tw) + 32'(rd_j) - L)
                                               : rd_tw + AW'(rd_j);
      end
    end
  end

  // ------------------------------------------- pipeline 1: read RADIX taps
  logic signed [W_IN-1:0] x_re [RADIX];
  logic signed [W_IN-1:0] x_im [RADIX];
  logic          v1;
  logic [JW-1:0] j1;
  logic [AW-1:0] tw1;

  always_ff @(posedge clk) begin
    for (int p = 0; p < RADIX; p++) begin
      x_re[p] <= buf_re[rd_bank][AW'(p * M) + rd_n];
      x_im[p] <= buf_im[rd_bank][AW'(p * M) + rd_n];
    end
    j1  <= rd_j;
    tw1 <= rd_tw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= rd_active;
  end

  // ------------------------------------- pipeline 2: RADIX-point DFT row j
  logic signed [WY-1:0] y_re, y_im;
  logic          v2;
  logic [AW-1:0] tw2;

  always_ff @(posedge clk) begin
    logic signed [47:0] acc_re, acc_im;
    int unsigned m;
    acc_re = '0;
    acc_im = '0;
    for (int p = 0; p < RADIX; p++) begin
      m = (32'(j1) * p) % RADIX;
      acc_re += 48'(x_re[p]) * 48'(R_C[m]) - 48'(x_im[p]) * 48'(R_S[m]);
      acc_im += 48'(x_re[p]) * 48'(R_S[m]) + 48'(x_im[p]) * 48'(R_C[m]);
    end
    y_re <= WY'(rshift_round(acc_re, 14));
    y_im <= WY'(rshift_round(acc_im, 14));
    tw2  <= tw1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  // ------------------------------- pipeline 3: twiddle, three multipliers
  logic signed [47:0] k1, k2, k3, z_re, z_im;
  always_comb begin
    k1   = 48'(TW_C[tw2]) * (48'(y_re) + 48'(y_im));
    k2   = 48'(y_re) * (48'(TW_S[tw2]) - 48'(TW_C[tw2]));
    k3   = 48'(y_im) * (48'(TW_C[tw2]) + 48'(TW_S[tw2]));
    z_re = rshift_round(k1 - k3, 14 + SCALE);
    z_im = rshift_round(k1 + k2, 14 + SCALE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= v2;
      if (z_re > 48'((48'sd1 <<< (W_OUT - 1)) - 1))  out_re <= {1'b0, {(W_OUT-1){1'b1}}};
      else if (z_re < -(48'sd1 <<< (W_OUT - 1)))     out_re <= {1'b1, {(W_OUT-1){1'b0}}};
      else                                           out_re <= W_OUT'(z_re);
      if (z_im > 48'((48'sd1 <<< (W_OUT - 1)) - 1))  out_im <= {1'b0, {(W_OUT-1){1'b1}}};
      else if (z_im < -(48'sd1 <<< (W_OUT - 1)))     out_im <= {1'b1, {(W_OUT-1){1'b0}}};
      else                                           out_im <= W_OUT'(z_im);
    end
  end

endmodule
