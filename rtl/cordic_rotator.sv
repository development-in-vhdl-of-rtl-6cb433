// Pipelined CORDIC that turns a phase into a unit complex exponential.
//
// The phase is a 24-bit fraction of a full turn (2^24 = 2*pi). A first
// stage folds it into [-1/4, +1/4) turn, negating the start vector when it
// was in the left half-plane; NIT rotation stages then drive the residual
// angle to zero with shift-and-add micro-rotations by atan(2^-i), and a
// last stage rounds x and y to s2.13, giving cos(angle) + j*sin(angle)
// with magnitude 1.0 = 8192. The start vector carries the inverse CORDIC
// gain, so no final multiplication is needed. A TW-bit tag travels with
// every sample. One sample per cycle, latency NIT+2 cycles. The document
// gives the CORDIC's role (angle in, cos + j*sin out, shift-add only);
// the widths and the iteration count are this design's choices.
module cordic_rotator
  import ultx_pkg::*;
#(
  parameter int NIT = 16,
  parameter int TW  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [23:0]   in_phase,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output cplx_t         out_data,
  output logic [TW-1:0] out_tag
);
  localparam int XW = 22;                  // internal: 1.0 = 2^17
  localparam real PI = 3.141592653589793;
  typedef logic signed [23:0] atan_t [NIT];

  function automatic atan_t mk_atan();
    atan_t t;
    for (int i = 0; i < NIT; i++)
      t[i] = 24'($rtoi($floor($atan(1.0 / (2.0 ** i)) / (2.0 * PI) * 16777216.0 + 0.5)));
    return t;
  endfunction
  localparam atan_t ATAN = mk_atan();
  // 0.6072529350 * 2^17
  localparam logic signed [XW-1:0] X0 = XW'(79594);

  logic signed [XW-1:0] x [NIT+1];
  logic signed [XW-1:0] y [NIT+1];
  logic signed [23:0]   z [NIT+1];
  logic [TW-1:0]        tg [NIT+1];
  logic [NIT:0]         v;

  // Fold into the right half-plane.
  always_ff @(posedge clk) begin
    logic signed [23:0] a;
    a = in_phase;
    if (a >= 24'sh400000 || a < -24'sh400000) begin
      x[0] <= -X0;
      z[0] <= a - 24'sh800000;   // wraps modulo one turn
    end else begin
      x[0] <= X0;
      z[0] <= a;
    end
    y[0]  <= '0;
    tg[0] <= in_tag;
  end

  for (genvar i = 0; i < NIT; i++) begin : g_it
    always_ff @(posedge clk) begin
      if (z[i] >= 0) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ATAN[i];
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ATAN[i];
      end
      tg[i+1] <= tg[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[NIT-1:0], in_valid};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid   <= v[NIT];
      out_data.re <= sat16(rshift_round(48'(x[NIT]), 4));
      out_data.im <= sat16(rshift_round(48'(y[NIT]), 4));
      out_tag     <= tg[NIT];
    end
  end
endmodule
