// LTE uplink physical-layer transmitter for the PUSCH, single antenna.
//
// Takes modulated PUSCH symbols (zero-stuffed to 1200 or 1800 samples per
// SC-FDMA symbol) and produces the SC-FDMA baseband waveform of each
// subframe with the PUSCH demodulation reference signal inserted:
//
//   data_in -> transform_precoding -> 15-cycle delay --+
//                  | sf_start                          +-> resource_grid
//                  +-> pusch_dmrs_gen -----------------+        |
//                                                               v
//                                    tx_out <- scfdma_modulator
//
// Transform precoding scales by 1/sqrt(12*NRB) and applies a 1200/1800-
// point FFT, keeping 12*NRB bins per symbol tagged with subcarrier and
// symbol. The DMRS generator is started by the first PUSCH sample of each
// subframe and fills symbols 3 and 10. The resource grid holds one
// subframe; the modulator reads it symbol by symbol as symbols become
// complete, erasing what it reads, and emits 2048-point IFFT symbols with
// half-subcarrier shift, cyclic prefix, optional edge windowing (win_en)
// and the sampling rate of the bandwidth (NRB = 6, 15, 25, 50, 75, 100).
//
// Timing: at one input sample per cycle of a 30.72 MHz clock the input of
// a subframe (12 x 1200 or 1800 samples) fits in the 30720 cycles that the
// output of a subframe takes at 100 RBs, so subframes can follow each
// other. Subframe numbering (for hopping) counts from reset. Configuration
// inputs are to be changed only while the transmitter is idle.
// grid_overrun counts PUSCH/DMRS samples dropped because their grid
// symbol had not yet been read out.
module uplink_tx
  import ultx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic [6:0]  nulrb,
  input  logic [8:0]  ncell_id,
  input  logic [4:0]  seqgroup,
  input  logic [2:0]  cyclicshift,
  input  logic [2:0]  cyclicshift_dci,
  input  logic        group_en,
  input  logic        seq_en,
  input  logic        win_en,
  // PUSCH input
  input  logic        data_in_valid,
  input  cplx_t       data_in,
  // SC-FDMA output
  output logic        tx_valid,
  output cplx_t       tx_out,
  output logic        tx_sym_start,
  output logic [3:0]  tx_sym,
  // status
  output logic        mod_ready,
  output logic        dmrs_busy,
  output logic [3:0]  dmrs_subframe,
  output logic [15:0] grid_overrun
);
  // Transform precoding.
  logic        sf_start, tp_v;
  cplx_t       tp_d;
  logic [10:0] tp_k;
  logic [3:0]  tp_l;

  transform_precoding u_tp (
    .clk, .rst_n, .nrb(nulrb), .in_valid(data_in_valid), .in_data(data_in),
    .sf_start, .out_valid(tp_v), .out_data(tp_d), .out_k(tp_k), .out_l(tp_l),
    .out_sf_last());

  // 15-sample delay of PUSCH data, indices and valid.
  logic        pd_v;
  logic [46:0] pd_bus;
  pipe_delay #(.W(47), .DEPTH(15)) u_delay (
    .clk, .rst_n, .in_valid(tp_v), .in_data({tp_d, tp_k, tp_l}),
    .out_valid(pd_v), .out_data(pd_bus));

  // DMRS.
  logic        dm_v;
  cplx_t       dm_d;
  logic [10:0] dm_k;
  logic [3:0]  dm_l;

  pusch_dmrs_gen u_dmrs (
    .clk, .rst_n, .nrb(nulrb), .ncell_id, .seqgroup, .cyclicshift, .cyclicshift_dci,
    .group_en, .seq_en, .start(sf_start), .busy(dmrs_busy),
    .out_valid(dm_v), .out_data(dm_d), .out_k(dm_k), .out_l(dm_l),
    .subframe(dmrs_subframe));

  // Resource grid.
  logic [NSYM-1:0] sym_full;
  logic        rd_en, rd_valid;
  logic [3:0]  rd_l;
  logic [10:0] rd_k;
  cplx_t       rd_data;

  resource_grid u_grid (
    .clk, .rst_n, .nrb(nulrb),
    .pw_valid(pd_v), .pw_data(pd_bus[46:15]), .pw_k(pd_bus[14:4]), .pw_l(pd_bus[3:0]),
    .dw_valid(dm_v), .dw_data(dm_d), .dw_k(dm_k), .dw_l(dm_l),
    .rd_en, .rd_l, .rd_k, .rd_valid, .rd_data,
    .sym_full, .overrun_count(grid_overrun));

  // SC-FDMA modulation.
  scfdma_modulator u_mod (
    .clk, .rst_n, .nrb(nulrb), .win_en, .sym_full, .ready(mod_ready),
    .rd_en, .rd_l, .rd_k, .rd_valid, .rd_data,
    .out_valid(tx_valid), .out_data(tx_out), .out_sym_start(tx_sym_start), .out_l(tx_sym));

endmodule
