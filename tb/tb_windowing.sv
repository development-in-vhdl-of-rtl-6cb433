// Self-checking testbench for windowing.
//
// Streams 16 CP-extended symbols (l = 0..13, 0, 1; 2048 + 160/144 random
// samples each, with random idle cycles) through the block, first with
// windowing enabled and then disabled, and compares every output with a
// model computed here: with enable, y(i) = w(i)*x(i) + w(W-1-i)*p(i) for
// the first W = 32 samples of each symbol, where w is the raised cosine
// (1 - cos(pi*(i+1/2)/W))/2 in Q1.14 and p(i) is sample Ncp + i of the
// previous symbol (zero before the first); all other samples pass
// unchanged. Checks: values within 1 LSB, out_sym_start on the first
// sample of each symbol, out_l, one output per input and latency 1.
module tb_windowing;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;
  localparam int  W = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enable = 0, in_valid = 0, in_sym_start = 0, out_valid, out_sym_start;
  cplx_t      in_data = '0, out_data;
  logic [3:0] in_l = '0, out_l;

  windowing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int win[W];
  initial for (int i = 0; i < W; i++)
    win[i] = $rtoi($floor((1.0 - $cos(PI * (i + 0.5) / W)) / 2.0 * 16384.0 + 0.5));

  function automatic int rnd_shift(input longint v);
    return int'((v + 8192) >>> 14);
  endfunction
  function automatic int sat(input int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  // expected outputs, in order
  int exp_re[$], exp_im[$], exp_l[$];
  bit exp_first[$];
  int sent, got;

  always @(posedge clk) if (rst_n && out_valid) begin
    int er, ei, el;
    bit ef;
    er = exp_re.pop_front(); ei = exp_im.pop_front(); el = exp_l.pop_front(); ef = exp_first.pop_front();
    check((int'(out_data.re) - er) ** 2 <= 1 && (int'(out_data.im) - ei) ** 2 <= 1,
          $sformatf("sample %0d got %0d,%0d exp %0d,%0d", got, $signed(out_data.re), $signed(out_data.im), er, ei));
    check(out_sym_start == ef, $sformatf("sym_start at sample %0d", got));
    check(int'(out_l) == el, $sformatf("out_l at sample %0d", got));
    got++;
  end

  task automatic run(input bit en);
    int pr[W], pi[W];
    rst_n = 0;
    enable = en;
    sent = 0; got = 0;
    for (int i = 0; i < W; i++) begin pr[i] = 0; pi[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      int l = s % NSYM;
      int ncp = int'(cp_len(4'(l)));
      int nr[W], ni[W];
      for (int i = 0; i < NFFT_MAX + ncp; i++) begin
        int xr = int'($urandom_range(0, 40000)) - 20000;
        int xi = int'($urandom_range(0, 40000)) - 20000;
        int er = xr, ei = xi;
        if (en && i < W) begin
          er = sat(rnd_shift(longint'(xr) * win[i] + longint'(pr[i]) * win[W - 1 - i]));
          ei = sat(rnd_shift(longint'(xi) * win[i] + longint'(pi[i]) * win[W - 1 - i]));
        end
        if (i >= ncp && i < ncp + W) begin nr[i - ncp] = xr; ni[i - ncp] = xi; end
        exp_re.push_back(er); exp_im.push_back(ei); exp_l.push_back(l); exp_first.push_back(i == 0);
        if ($urandom_range(0, 15) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        in_data.re = 16'(xr);
        in_data.im = 16'(xi);
        in_sym_start = (i == 0);
        in_l = 4'(l);
        sent++;
      end
      pr = nr; pi = ni;
    end
    @(negedge clk);
    in_valid = 0;
    in_sym_start = 0;
    repeat (5) @(negedge clk);
    check(got == sent && exp_re.size() == 0, $sformatf("sent %0d got %0d", sent, got));
  endtask

  // latency check: output valid exactly one cycle after an input
  logic in_valid_d;
  always @(posedge clk) begin
    if (rst_n) check(out_valid == in_valid_d, "latency 1");
    in_valid_d <= rst_n && in_valid;
  end

  initial begin
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
