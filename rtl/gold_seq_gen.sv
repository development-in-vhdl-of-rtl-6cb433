// Length-31 Gold sequence generator of the LTE pseudo-random sequence c(n).
//
//   x1(n+31) = x1(n+3) xor x1(n),  x1 starts at 1 (x1(0)=1, others 0)
//   x2(n+31) = x2(n+3) xor x2(n+2) xor x2(n+1) xor x2(n), x2 starts at c_init
//   c(n)     = x1(n+1600) xor x2(n+1600)
// A load pulse starts a new sequence. Every cycle with enable high shifts
// both registers one step; the first 1600 steps are discarded internally,
// after which c_valid is high and c is c(n) with n given by idx, advancing
// by one on each enabled cycle. One bit per cycle; the serial form is this
// design's choice, the document only names the generator and its init,
// load and enable inputs.
module gold_seq_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [30:0] c_init,
  input  logic        enable,
  output logic        c,
  output logic        c_valid,
  output logic [11:0] idx
);
  localparam int NC = 1600;

  logic [30:0] x1, x2;
  logic [11:0] t;      // steps taken since load, saturating at NC

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1      <= 31'd1;
      x2      <= '0;
      t       <= '0;
      idx     <= '0;
      c_valid <= 1'b0;
    end else if (load) begin
      x1      <= 31'd1;
      x2      <= c_init;
      t       <= '0;
      idx     <= '0;
      c_valid <= 1'b0;
    end else if (enable) begin
      x1 <= {x1[3] ^ x1[0], x1[30:1]};
      x2 <= {x2[3] ^ x2[2] ^ x2[1] ^ x2[0], x2[30:1]};
      if (t == 12'(NC - 1)) begin
        t       <= t + 12'd1;
        c_valid <= 1'b1;
      end else if (t < 12'(NC - 1)) begin
        t <= t + 12'd1;
      end else begin
        idx <= idx + 12'd1;
      end
    end
  end

  assign c = x1[0] ^ x2[0];
endmodule
