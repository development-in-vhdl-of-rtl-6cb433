// Self-checking test of resource_grid with 6 and 25 RBs: PUSCH symbols and
// DMRS symbols are written at the same time through the two ports; the
// full flags must rise on completion; a write into a full symbol must be
// dropped and counted; reading a symbol must return what was written (one
// cycle later), clear its flag and erase it, so a second read returns
// zeros; and the freed symbol must accept the next subframe's data.
module tb_resource_grid;
  import ultx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] nrb = 6;
  logic pw_v = 0, dw_v = 0, rd_en = 0, rd_v;
  cplx_t pw_d = '0, dw_d = '0, rd_d;
  logic [10:0] pw_k = 0, dw_k = 0, rd_k = 0;
  logic [3:0] pw_l = 0, dw_l = 0, rd_l = 0;
  logic [13:0] full;
  logic [15:0] ovr;
  resource_grid dut (.clk, .rst_n, .nrb, .pw_valid(pw_v), .pw_data(pw_d), .pw_k, .pw_l,
                     .dw_valid(dw_v), .dw_data(dw_d), .dw_k, .dw_l, .rd_en, .rd_l, .rd_k,
                     .rd_valid(rd_v), .rd_data(rd_d), .sym_full(full), .overrun_count(ovr));

  function automatic cplx_t pat(input int l, input int k, input int sf);
    cplx_t c;
    c.re = 16'(l * 1000 + k);
    c.im = 16'(sf * 7 - k);
    return c;
  endfunction

  task automatic write_pair(input int pl, input int dl, input int msc, input int sf);
    for (int k = 0; k < msc; k++) begin
      @(negedge clk);
      pw_v = 1; pw_l = 4'(pl); pw_k = 11'(k); pw_d = pat(pl, k, sf);
      dw_v = (dl >= 0); dw_l = 4'(dl < 0 ? 0 : dl); dw_k = 11'(k); dw_d = pat(dl, k, sf);
    end
    @(negedge clk); pw_v = 0; dw_v = 0;
  endtask

  task automatic read_check(input int l, input int msc, input int sf, input bit expect_zero);
    for (int k = 0; k <= msc; k++) begin
      @(negedge clk);
      if (k > 0) begin
        checks++;
        if (!rd_v || rd_d != (expect_zero ? '0 : pat(l, k - 1, sf))) begin
          failures++;
          if (failures < 10) $display("read l %0d k %0d got %h", l, k - 1, rd_d);
        end
      end
      rd_en = (k < msc); rd_l = 4'(l); rd_k = 11'(k);
    end
    rd_en = 0;
  endtask

  int rbs[2] = '{6, 25};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rbs[r]) begin
      automatic int msc = 12 * rbs[r];
      nrb = 7'(rbs[r]);
      // Subframe 0: symbols 0 and 1 with DMRS 3 and 10, then the rest.
      write_pair(0, 3, msc, 0);
      write_pair(1, 10, msc, 0);
      checks++;
      if (full != 14'b00_0100_0000_1011) begin failures++; $display("full %b", full); end
      for (int l = 2; l < 14; l++) if (l != 3 && l != 10) write_pair(l, -1, msc, 0);
      checks++;
      if (full != '1) begin failures++; $display("full %b", full); end
      // Overrun: symbol 0 is still full.
      write_pair(0, -1, 4, 9);
      checks++;
      if (ovr != 16'(4 * (r + 1))) begin failures++; $display("overrun count %0d", ovr); end
      // Read out all symbols, check erase.
      for (int l = 0; l < 14; l++) begin
        read_check(l, msc, 0, 0);
        @(negedge clk);
        checks++;
        if (full[l]) begin failures++; $display("flag %0d not cleared", l); end
      end
      read_check(5, msc, 0, 1);
      // Next subframe goes into the freed banks.
      write_pair(0, 3, msc, 1);
      read_check(0, msc, 1, 0);
      read_check(3, msc, 1, 0);
      checks++;
      if (full != '0) begin failures++; $display("full %b at end", full); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
