// SC-FDMA waveform modulator: resource-grid symbols in, baseband samples out.
//
// Chain, in the document's order: symbol formation (maps the 12*NRB
// subcarriers of grid symbol l around bin 1024 of a 2048-bin frame), a
// 2048-point IFFT, a right shift of the unnormalised IFFT output by 3 to 6
// bits chosen by NRB (keeps the output power near one, this design's
// choice) with saturation to 16 bits, the half-subcarrier shift
// exp(j*pi*n/2048), the (-1)^n time-domain FFT shift, cyclic-prefix
// insertion (160/144 samples), the optional windowing (raised-cosine
// cross-fade of each symbol's first 32 samples with the previous symbol,
// enabled by win_en) and the output rate controller. The cyclic
// prefix is copied after the half-subcarrier shift, as in the document's
// block order; the copied samples therefore carry the opposite sign to a
// continuous-phase waveform, which a receiver that discards the prefix
// does not see.
//
// Interface: reads the grid through rd_en/rd_l/rd_k (data back one cycle
// later) whenever sym_full shows the next symbol ready. out_valid/out_data
// carry the output at the NRB sampling rate; out_sym_start marks the first
// sample of each symbol (its CP), out_l gives its index. At 100 RBs one
// subframe is 30720 samples.
module scfdma_modulator
  import ultx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [6:0]      nrb,
  input  logic            win_en,
  input  logic [NSYM-1:0] sym_full,
  output logic            ready,
  output logic            rd_en,
  output logic [3:0]      rd_l,
  output logic [10:0]     rd_k,
  input  logic            rd_valid,
  input  cplx_t           rd_data,
  output logic            out_valid,
  output cplx_t           out_data,
  output logic            out_sym_start,
  output logic [3:0]      out_l
);
  localparam int LG = $clog2(NFFT_MAX);

  logic  sf_v, if_v, sc_v, hs_v, fs_v, cp_v, cp_first;
  cplx_t sf_d, sc_d, hs_d, fs_d, cp_d;
  logic [3:0] cp_l;
  logic signed [DW+LG-1:0] if_re, if_im;

  scfdma_symbol_formation u_form (
    .clk, .rst_n, .nrb, .sym_full, .ready, .rd_en, .rd_l, .rd_k,
    .rd_valid, .rd_data, .out_valid(sf_v), .out_data(sf_d));

  ifft_2048 #(.N(NFFT_MAX), .W_IN(DW)) u_ifft (
    .clk, .rst_n, .in_valid(sf_v), .in_re(sf_d.re), .in_im(sf_d.im),
    .out_valid(if_v), .out_re(if_re), .out_im(if_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_v <= 1'b0;
      sc_d <= '0;
    end else begin
      sc_v    <= if_v;
      sc_d.re <= sat16(rshift_round(48'(if_re), 32'(nrb_to_out_shift(nrb))));
      sc_d.im <= sat16(rshift_round(48'(if_im), 32'(nrb_to_out_shift(nrb))));
    end
  end

  half_subcarrier_shift #(.N(NFFT_MAX)) u_half (
    .clk, .rst_n, .in_valid(sc_v), .in_data(sc_d), .out_valid(hs_v), .out_data(hs_d));

  fftshift_time u_shift (
    .clk, .rst_n, .in_valid(hs_v), .in_data(hs_d), .out_valid(fs_v), .out_data(fs_d));

  cp_insertion #(.N(NFFT_MAX)) u_cp (
    .clk, .rst_n, .in_valid(fs_v), .in_data(fs_d),
    .out_valid(cp_v), .out_data(cp_d), .out_sym_start(cp_first), .out_l(cp_l));

  logic       wn_v, wn_first;
  cplx_t      wn_d;
  logic [3:0] wn_l;

  windowing #(.W(32)) u_win (
    .clk, .rst_n, .enable(win_en), .in_valid(cp_v), .in_data(cp_d),
    .in_sym_start(cp_first), .in_l(cp_l),
    .out_valid(wn_v), .out_data(wn_d), .out_sym_start(wn_first), .out_l(wn_l));

  output_rate_controller u_rate (
    .clk, .rst_n, .nrb, .in_valid(wn_v), .in_data(wn_d), .out_valid, .out_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_sym_start <= 1'b0;
      out_l         <= '0;
    end else begin
      out_sym_start <= wn_first;
      out_l         <= wn_l;
    end
  end
endmodule
