// Transform precoding (DFT spreading) of the PUSCH data symbols.
//
// Chain: amplitude scaling by 1/sqrt(12*NRB) with a right shift of SHIFT
// bits, a 1200- or 1800-point FFT (1800 for 6, 15 and 75 RBs, 1200 for 25,
// 50 and 100), the rate controller that keeps the first 12*NRB bins, and a
// left shift of SHIFT bits with saturation that undoes the earlier right
// shift. The PUSCH index generator tags every output with its subcarrier
// and symbol. Input symbols must already be zero-stuffed: each of the 12
// PUSCH symbols of a subframe arrives as N = 1200/1800 samples holding the
// 12*NRB modulated values at every N/(12*NRB)-th position.
//
// Interface: in_valid/in_data, up to one sample per cycle, frames counted
// from reset. sf_start pulses with the first input sample of a subframe.
// Outputs (out_valid, out_data, out_k, out_l) leave in bursts of 12*NRB
// samples on consecutive cycles, one burst per symbol, after the FFT
// latency. nrb must be one of 6, 15, 25, 50, 75, 100 and held while data
// is in flight.
module transform_precoding
  import ultx_pkg::*;
#(
  parameter int SHIFT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  nrb,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        sf_start,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [10:0] out_k,
  output logic [3:0]  out_l,
  output logic        out_sf_last
);
  // Input framing: detect the first sample of each subframe.
  logic [10:0] in_cnt;
  logic [3:0]  in_sym;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      in_sym <= '0;
    end else if (in_valid) begin
      if (in_cnt == nrb_to_nfft_tp(nrb) - 11'd1) begin
        in_cnt <= '0;
        in_sym <= (in_sym == 4'(NPUSCH_SYM - 1)) ? '0 : in_sym + 4'd1;
      end else begin
        in_cnt <= in_cnt + 11'd1;
      end
    end
  end
  assign sf_start = in_valid && in_cnt == '0 && in_sym == '0;

  logic  sc_v, fft_v, rc_v;
  cplx_t sc_d, fft_d, rc_d;

  amplitude_scaling #(.SHIFT(SHIFT)) u_scale (
    .clk, .rst_n, .nrb, .in_valid, .in_data, .out_valid(sc_v), .out_data(sc_d));

  fft_1200_1800 #(.W(DW)) u_fft (
    .clk, .rst_n, .sel1800(nrb_uses_1800(nrb)),
    .in_valid(sc_v), .in_re(sc_d.re), .in_im(sc_d.im),
    .out_valid(fft_v), .out_re(fft_d.re), .out_im(fft_d.im));

  tp_rate_controller u_rate (
    .clk, .rst_n, .nrb, .in_valid(fft_v), .in_data(fft_d),
    .out_valid(rc_v), .out_data(rc_d));

  // Shift left to cancel the right shift of the amplitude scaling.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_data <= '0;
    else begin
      out_data.re <= sat16(48'(rc_d.re) <<< SHIFT);
      out_data.im <= sat16(48'(rc_d.im) <<< SHIFT);
    end
  end

  pusch_index_gen u_idx (
    .clk, .rst_n, .nrb, .in_valid(rc_v),
    .out_valid, .out_k, .out_l, .sym_last(), .sf_last(out_sf_last));

endmodule
