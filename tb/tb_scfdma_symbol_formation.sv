// Self-checking testbench for scfdma_symbol_formation.
//
// A behavioural grid answers every read one cycle later with a word that
// encodes its symbol and subcarrier, and raises a bank's full flag only
// after a random delay, so the block must wait on ready. For NRB = 6, 25
// and 100 the testbench checks for every symbol of a subframe: 2048 output
// bins on consecutive cycles, the grid word at bins 1024-6*NRB+k and zero
// elsewhere, reads only of the current symbol, and an idle gap of at least
// the cyclic-prefix length (160 or 144) after each symbol.
module tb_scfdma_symbol_formation;
  import ultx_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]      nrb;
  logic [NSYM-1:0] sym_full;
  logic            ready, rd_en, rd_valid, out_valid;
  logic [3:0]      rd_l;
  logic [10:0]     rd_k;
  cplx_t           rd_data, out_data;

  scfdma_symbol_formation dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic cplx_t grid_word(input int l, input int k);
    cplx_t w;
    w.re = 16'(k + 1);
    w.im = 16'(l * 1000 + 7);
    return w;
  endfunction

  // Behavioural grid read port.
  always_ff @(posedge clk) begin
    rd_valid <= rd_en;
    rd_data  <= rd_en ? grid_word(int'(rd_l), int'(rd_k)) : '0;
  end

  initial begin
    #50_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  int nrb_list[3] = '{6, 25, 100};
  int cur_l, bin, gap, last_end, sym_seen;
  bit in_sym;

  // Output monitor.
  always @(posedge clk) if (rst_n) begin
    if (rd_en) check(int'(rd_l) == cur_l, $sformatf("read of symbol %0d while forming %0d", rd_l, cur_l));
    if (out_valid) begin
      cplx_t exp_w;
      int first, msc;
      msc   = 12 * int'(nrb);
      first = 1024 - msc / 2;
      if (!in_sym) begin
        if (sym_seen > 0)
          check(gap >= int'(cp_len(4'(cur_l == 0 ? 13 : cur_l - 1))) - 1,
                $sformatf("gap %0d before symbol %0d", gap, cur_l));
        in_sym = 1;
        bin = 0;
      end
      exp_w = (bin >= first && bin < first + msc) ? grid_word(cur_l, bin - first) : '0;
      check(out_data == exp_w, $sformatf("nrb %0d l %0d bin %0d got %h exp %h", nrb, cur_l, bin, out_data, exp_w));
      bin++;
      if (bin == NFFT_MAX) begin
        in_sym = 0;
        sym_seen++;
        gap = 0;
        cur_l = (cur_l + 1) % NSYM;
      end
    end else begin
      if (in_sym) check(0, $sformatf("output pause inside symbol %0d at bin %0d", cur_l, bin));
      gap++;
    end
  end

  initial begin
    sym_full = '0;
    nrb = 7'd6;
    for (int c = 0; c < 3; c++) begin
      rst_n = 0;
      nrb = 7'(nrb_list[c]);
      cur_l = 0; bin = 0; gap = 0; sym_seen = 0; in_sym = 0;
      sym_full = '0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int l = 0; l < NSYM; l++) begin
        // keep the bank empty for a while: the block must keep waiting
        while (!ready) @(negedge clk);
        repeat ($urandom_range(5, 400)) @(negedge clk);
        check(ready == 1'b1, $sformatf("ready low while waiting for symbol %0d", l));
        sym_full[l] = 1'b1;
        // clear the flag once the last subcarrier has been read
        while (!(rd_en && int'(rd_k) == 12 * int'(nrb) - 1)) @(negedge clk);
        @(negedge clk);
        sym_full[l] = 1'b0;
      end
      while (sym_seen < NSYM) @(negedge clk);
      check(sym_seen == NSYM, "symbol count");
      repeat (200) @(negedge clk);
      check(!out_valid && ready, "idle after the subframe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
