// SC-FDMA symbol formation: builds the IFFT input of each symbol.
//
// For symbol l = 0..13 of the subframe it waits until the resource grid
// reports that bank l is full (ready is high meanwhile), then emits the
// NFFT = 2048 IFFT input bins on consecutive cycles. The 12*NRB occupied
// subcarriers k sit at bins 1024 - 6*NRB + k, read from the grid as they
// are needed; every other bin is zero. No subcarrier is left out at DC
// (the time-domain half-subcarrier shift keeps DC between two subcarriers),
// and the later (-1)^n multiplication moves bin 1024 to zero frequency.
// After the 2048 bins the block stays idle for the cyclic-prefix length of
// that symbol (160 for l = 0 and 7, 144 otherwise), so symbols enter the
// IFFT at the pace at which the CP insertion can send them out.
//
// Grid reads: rd_en/rd_l/rd_k, data back one cycle later on rd_valid/
// rd_data. Output: out_valid/out_data, one cycle after the read request.
// The ready/request handshake is this design's choice; the document says
// only that the block requests symbols with a ready signal.
module scfdma_symbol_formation
  import ultx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [6:0]      nrb,
  input  logic [NSYM-1:0] sym_full,
  output logic            ready,
  output logic            rd_en,
  output logic [3:0]      rd_l,
  output logic [10:0]     rd_k,
  input  logic            rd_valid,
  input  cplx_t           rd_data,
  output logic            out_valid,
  output cplx_t           out_data
);
  typedef enum logic [1:0] {WAIT, RUN, GAP} state_t;
  state_t state;

  logic [3:0]  l;
  logic [11:0] i;      // bin counter 0..2047, then gap counter
  logic [11:0] first, msc;
  logic        in_range, in_range_d;

  assign msc      = nrb_to_msc(nrb);
  assign first    = 12'd1024 - (msc >> 1);
  assign in_range = (state == RUN) && (i >= first) && (i < first + msc);

  assign ready = (state == WAIT);
  assign rd_en = in_range;
  assign rd_l  = l;
  assign rd_k  = 11'(i - first);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WAIT;
      l     <= '0;
      i     <= '0;
    end else begin
      case (state)
        WAIT: if (sym_full[l]) begin
          state <= RUN;
          i     <= '0;
        end
        RUN: begin
          if (i == 12'(NFFT_MAX - 1)) begin
            state <= GAP;
            i     <= '0;
          end else begin
            i <= i + 12'd1;
          end
        end
        GAP: begin
          if (i == 12'(cp_len(l)) - 12'd2) begin
            state <= WAIT;
            l     <= (l == 4'(NSYM - 1)) ? '0 : l + 4'd1;
          end else begin
            i <= i + 12'd1;
          end
        end
        default: state <= WAIT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      in_range_d <= 1'b0;
    end else begin
      out_valid  <= (state == RUN);
      in_range_d <= in_range;
    end
  end

  assign out_data = (in_range_d && rd_valid) ? rd_data : '0;
endmodule
