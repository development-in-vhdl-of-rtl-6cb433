// Shared types, constants and helper functions of the LTE PUSCH uplink
// transmitter.
//
// Samples are complex fixed-point words of 16 bits per component in
// s2.13 format (sign, 2 integer bits, 13 fraction bits), as at the
// transmitter's input and output. The resource grid covers one subframe of
// 14 SC-FDMA symbols (normal cyclic prefix) of up to 2048 subcarriers.
// The per-bandwidth tables (subcarrier count, Zadoff-Chu length, FFT size,
// cyclic-prefix and decimation factors) follow the LTE uplink numerology;
// the amplitude and output scale factors are this design's choice.
package ultx_pkg;

  localparam int DW = 16;          // sample component width, s2.13
  localparam int FRAC = 13;        // fraction bits of a sample
  localparam int NSYM = 14;        // SC-FDMA symbols per subframe
  localparam int NFFT_MAX = 2048;  // IFFT size / grid bank depth
  localparam int NPUSCH_SYM = 12;  // PUSCH data symbols per subframe

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Number of PUSCH subcarriers in one symbol: 12 per resource block.
  function automatic logic [11:0] nrb_to_msc(input logic [6:0] nrb);
    return 12'(nrb) * 12'd12;
  endfunction

  // Transform-precoding FFT size: 1200 for 25/50/100 RBs, 1800 for 6/15/75.
  function automatic logic nrb_uses_1800(input logic [6:0] nrb);
    return (nrb == 7'd6) || (nrb == 7'd15) || (nrb == 7'd75);
  endfunction

  function automatic logic [10:0] nrb_to_nfft_tp(input logic [6:0] nrb);
    return nrb_uses_1800(nrb) ? 11'd1800 : 11'd1200;
  endfunction

  // Largest prime below 12*NRB: length of the Zadoff-Chu sequence.
  function automatic logic [10:0] nrb_to_nzc(input logic [6:0] nrb);
    case (nrb)
      7'd6:    return 11'd71;
      7'd15:   return 11'd179;
      7'd25:   return 11'd293;
      7'd50:   return 11'd599;
      7'd75:   return 11'd887;
      default: return 11'd1193;
    endcase
  endfunction

  // round(2^32 / NZC), used to turn a residue mod NZC into a phase.
  function automatic logic [31:0] nrb_to_nzc_recip(input logic [6:0] nrb);
    case (nrb)
      7'd6:    return 32'd60492497;   // 2^32/71
      7'd15:   return 32'd23994231;   // 2^32/179
      7'd25:   return 32'd14658591;   // 2^32/293
      7'd50:   return 32'd7170229;    // 2^32/599
      7'd75:   return 32'd4842128;    // 2^32/887
      default: return 32'd3600140;    // 2^32/1193
    endcase
  endfunction

  // round(2^15 / sqrt(12*NRB)): amplitude-scaling factor, Q1.15.
  function automatic logic [15:0] nrb_to_ampl(input logic [6:0] nrb);
    case (nrb)
      7'd6:    return 16'd3862;  // 1/sqrt(72)
      7'd15:   return 16'd2442;  // 1/sqrt(180)
      7'd25:   return 16'd1892;  // 1/sqrt(300)
      7'd50:   return 16'd1338;  // 1/sqrt(600)
      7'd75:   return 16'd1092;  // 1/sqrt(900)
      default: return 16'd946;   // 1/sqrt(1200)
    endcase
  endfunction

  // 2048 / (IFFT size of the bandwidth): decimation of the 30.72 MHz stream.
  function automatic logic [4:0] nrb_to_decim(input logic [6:0] nrb);
    case (nrb)
      7'd6:          return 5'd16;  // 1.92 MHz
      7'd15:         return 5'd8;   // 3.84 MHz
      7'd25:         return 5'd4;   // 7.68 MHz
      7'd50, 7'd75:  return 5'd2;   // 15.36 MHz
      default:       return 5'd1;   // 30.72 MHz
    endcase
  endfunction

  // Right shift applied to the unnormalised 2048-point IFFT output so that
  // the output power stays near unity for every bandwidth.
  function automatic logic [3:0] nrb_to_out_shift(input logic [6:0] nrb);
    case (nrb)
      7'd6:    return 4'd3;
      7'd15:   return 4'd4;
      7'd25:   return 4'd5;
      7'd50:   return 4'd5;
      7'd75:   return 4'd5;
      default: return 4'd6;
    endcase
  endfunction

  // Cyclic-prefix length at 2048 samples per symbol (normal CP).
  function automatic logic [7:0] cp_len(input logic [3:0] l);
    return (l == 4'd0 || l == 4'd7) ? 8'd160 : 8'd144;
  endfunction

  // Grid symbol of the n-th PUSCH data symbol (DMRS occupies 3 and 10).
  function automatic logic [3:0] pusch_sym_to_l(input logic [3:0] s);
    if (s < 4'd3)      return s;
    else if (s < 4'd9) return s + 4'd1;
    else               return s + 4'd2;
  endfunction

  // Saturate a wide signed value to W bits.
  function automatic logic signed [DW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

  // Rounded arithmetic right shift of a wide value.
  function automatic logic signed [47:0] rshift_round(input logic signed [47:0] v,
                                                      input int unsigned sh);
    logic signed [47:0] half;
    if (sh == 0) return v;
    half = 48'sd1 <<< (sh - 1);
    return (v + half) >>> sh;
  endfunction

endpackage
