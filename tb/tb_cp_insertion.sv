// Self-checking test of cp_insertion: a full subframe of 14 symbols of
// 2048 numbered samples, each symbol sent as a burst every 2048 + Ncp
// cycles (the pace of the modulator), then one more. Every output symbol
// must be the last Ncp samples followed by the whole symbol, with Ncp = 160
// for symbols 0 and 7 and 144 otherwise, on consecutive cycles, so the
// output is one gap-free stream; out_sym_start and out_l must mark the
// symbol starts.
module tb_cp_insertion;
  import ultx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic iv = 0, ov, ss;
  logic [3:0] ol;
  cplx_t id = '0, od;
  cp_insertion dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od),
                    .out_sym_start(ss), .out_l(ol));
  function automatic int ncp(input int l);
    return (l % 7 == 0) ? 160 : 144;
  endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int s = 0; s < 15; s++) begin
        for (int n = 0; n < 2048; n++) begin
          @(negedge clk); iv = 1; id.re = 16'(n); id.im = 16'(s);
        end
        @(negedge clk); iv = 0;
        repeat (ncp(s % 14) - 1) @(negedge clk);
      end
      begin
        while (!ov) @(posedge clk);
        for (int s = 0; s < 15; s++) begin
          automatic int l = s % 14;
          for (int i = 0; i < 2048 + ncp(l); i++) begin
            automatic int n = (i < ncp(l)) ? 2048 - ncp(l) + i : i - ncp(l);
            checks++;
            if (!ov || int'(od.re) != n || int'(od.im) != s || ss != (i == 0) || ol != 4'(l)) begin
              failures++;
              if (failures < 10) $display("s %0d i %0d: v%0b got %0d,%0d ss %0b l %0d", s, i, ov, od.re, od.im, ss, ol);
            end
            @(posedge clk);
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
