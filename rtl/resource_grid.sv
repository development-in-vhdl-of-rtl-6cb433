// Resource grid of one uplink subframe: 14 symbol banks of DEPTH complex
// words (the LTE memory bank), with a write selector, a read selector and
// a bank selector.
//
// Write selector: PUSCH samples (symbols 0-2, 4-9, 11-13) and DMRS samples
// (symbols 3 and 10) arrive on two independent ports, each tagged with its
// subcarrier k and symbol l, and are written to bank l, address k. The two
// ports can be active in the same cycle because they target different
// banks. A bank is marked full when its last subcarrier (12*NRB-1) has been
// written.
// Read selector: the modulator reads symbol rd_l at subcarrier rd_k when
// rd_en is high. Every bank is read at rd_k, and the bank select picks
// bank rd_l one cycle later (rd_valid, rd_data). Each location read is
// cleared to zero in the same cycle, so a bank is erased as it is read and
// the next subframe starts from an empty grid; reading the last subcarrier
// clears the full flag and frees the bank for the next subframe.
// A write that reaches a bank that is still full has arrived before the
// previous subframe's symbol was read: it is dropped and counted in
// overrun_count.
//
// The bank organisation (14 x 2048 x 32 bits), the two-symbol-plus-DMRS
// write order and the erase after reading follow the document; erasing
// location by location during the read and the per-bank full flags as the
// read/write handshake are this design's choices.
module resource_grid
  import ultx_pkg::*;
#(
  parameter int DEPTH = NFFT_MAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  nrb,
  // PUSCH write port
  input  logic        pw_valid,
  input  cplx_t       pw_data,
  input  logic [10:0] pw_k,
  input  logic [3:0]  pw_l,
  // DMRS write port
  input  logic        dw_valid,
  input  cplx_t       dw_data,
  input  logic [10:0] dw_k,
  input  logic [3:0]  dw_l,
  // Read port
  input  logic        rd_en,
  input  logic [3:0]  rd_l,
  input  logic [10:0] rd_k,
  output logic        rd_valid,
  output cplx_t       rd_data,
  // Status
  output logic [NSYM-1:0] sym_full,
  output logic [15:0] overrun_count
);
  localparam int AW = $clog2(DEPTH);

  logic [11:0] k_last;
  assign k_last = nrb_to_msc(nrb) - 12'd1;

  logic  pw_ok, dw_ok;
  assign pw_ok = pw_valid && !sym_full[pw_l];
  assign dw_ok = dw_valid && !sym_full[dw_l];

  cplx_t q [NSYM];

  for (genvar b = 0; b < NSYM; b++) begin : g_bank
    cplx_t mem [DEPTH];
    logic        we;
    logic [AW-1:0] wa;
    cplx_t       wd;

    // Write selector for this bank: PUSCH, then DMRS, then erase-on-read.
    always_comb begin
      we = 1'b0;
      wa = AW'(rd_k);
      wd = '0;
      if (pw_ok && pw_l == 4'(b)) begin
        we = 1'b1;
        wa = AW'(pw_k);
        wd = pw_data;
      end else if (dw_ok && dw_l == 4'(b)) begin
        we = 1'b1;
        wa = AW'(dw_k);
        wd = dw_data;
      end else if (rd_en && rd_l == 4'(b)) begin
        we = 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wd;
      q[b] <= mem[AW'(rd_k)];
    end
  end

  // Grid bank select.
  logic [3:0] rd_l_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_l_d   <= '0;
    end else begin
      rd_valid <= rd_en;
      rd_l_d   <= rd_l;
    end
  end
  assign rd_data = q[rd_l_d];

  // Full flags and overrun counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_full      <= '0;
      overrun_count <= '0;
    end else begin
      if (pw_ok && 12'(pw_k) == k_last) sym_full[pw_l] <= 1'b1;
      if (dw_ok && 12'(dw_k) == k_last) sym_full[dw_l] <= 1'b1;
      if (rd_en && 12'(rd_k) == k_last) sym_full[rd_l] <= 1'b0;
      if ((pw_valid && !pw_ok) || (dw_valid && !dw_ok))
        overrun_count <= overrun_count + 16'd1;
    end
  end

endmodule
