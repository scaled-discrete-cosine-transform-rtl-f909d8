// dct8aan: serial 8-point 1-D DCT using the Arai-Agui-Nakajima (AAN) flow.
//
// One sample enters per enabled clock; groups of eight consecutive samples
// form a vector a(0..7).  The eighth sample of a group is loaded, together
// with the seven held in a shift register, into a hold register.  From there
// the adder network of the AAN algorithm (b, c, d, f and sa terms) is pure
// combinational logic.  The five AAN products
//     e3 = m1*d7, e4 = m4*d6, e7 = m2*d4, e6 = m1*d3, e2 = m3*d2
// share one multiplier and are computed in that order in the five cycles
// after the load.  A second multiplier scales each butterfly output,
// y(k) = sa(k) * s(k), to the orthonormal DCT
//     y(0) = 1/sqrt(8) * sum a(m),  y(k) = 1/2 * sum a(m) cos((2m+1)k*pi/16).
// y(0..3) are taken straight from the live butterfly; y(4..7) use a
// snapshot of sa(4..7) taken once all products exist, because the hold
// register and the product registers are refilled by the next group before
// y(4..7) leave.
// So two multipliers per stage, as in the document's resource count.
// With SCALED = 1 the stage runs in the scaled-output mode: the scaling
// multiplier is left out and y(k) = sa(k) / 2^SC_SHIFT, so the stage needs
// one multiplier; the factors s(k) are then the consumer's business.
//
// Interface: start marks the sample on din as a(0) of a group (it resets
// the phase counter); without start the groups follow each other with no
// gap.  en is a clock enable for every register.  Timing: y(k) appears on
// dout STAGE_LAT = 11 enabled cycles after a(k) was on din, and rdy is start
// delayed by the same amount, so it marks y(0) of the group start marked.
//
// The AAN equations, the coefficient width (11 bits) and the use of two
// multipliers (one in scaled mode) follow the document.  The schedule, the
// GUARD fraction bits kept between the products and the output scaling,
// the SC_SHIFT of scaled mode, round-half-up rounding, saturation of dout
// to OUT_W bits and the synchronous reset are this design's choices.
module dct8aan
  import dct_pkg::*;
#(
  parameter int IN_W  = 8,
  parameter int OUT_W = 10,
  parameter int GUARD = 2,
  parameter bit SCALED   = 1'b0,
  parameter int SC_SHIFT = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    rdy
);

  localparam int IW   = IN_W + 6 + GUARD;   // internal word width
  localparam int PW   = IW + COEF_W + 1;    // product width
  localparam int E_SH = COEF_FRAC - GUARD;  // product -> e shift
  localparam int Y_SH = COEF_FRAC + GUARD;  // scaled sa -> y shift

  typedef logic signed [IW-1:0] word_t;
  typedef logic signed [PW-1:0] prod_t;

  // ---------------------------------------------------------------- phase
  logic [2:0] cnt;
  logic [2:0] ph;  // index of the sample on din within its group
  assign ph = start ? 3'd0 : cnt;

  always_ff @(posedge clk) begin
    if (rst)     cnt <= 3'd0;
    else if (en) cnt <= ph + 3'd1;
  end

  // ------------------------------------------------------ input collection
  logic signed [IN_W-1:0] sr [7];
  word_t a [8];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < 6; i++) sr[i] <= sr[i+1];
      sr[6] <= din;
      if (ph == 3'd7) begin
        for (int i = 0; i < 7; i++) a[i] <= word_t'(sr[i]);
        a[7] <= word_t'(din);
      end
    end
  end

  // ---------------------------------------------------- AAN adder network
  word_t b0, b1, b2, b3, b4, b5, b6, b7;
  word_t c0, c1, c2, c3, c4, c5, c6, c7;
  word_t d0, d1, d2, d3, d4, d5, d6, d7, d8;

  always_comb begin
    b0 = a[0] + a[7];  b1 = a[1] + a[6];  b2 = a[3] - a[4];  b3 = a[1] - a[6];
    b4 = a[2] + a[5];  b5 = a[3] + a[4];  b6 = a[2] - a[5];  b7 = a[0] - a[7];
    c0 = b0 + b5;  c1 = b1 - b4;  c2 = b2 + b6;  c3 = b1 + b4;
    c4 = b0 - b5;  c5 = b3 + b7;  c6 = b3 + b6;  c7 = b7;
    d0 = c0 + c3;  d1 = c0 - c3;  d2 = c2;  d3 = c1 + c4;
    d4 = c2 - c5;  d5 = c4;  d6 = c5;  d7 = c6;  d8 = c7;
  end

  // ------------------------------------------- shared rotation multiplier
  word_t mul_d;
  coef_t mul_c;
  prod_t mul_p;
  word_t mul_e;

  always_comb begin
    unique case (ph)
      3'd0:    begin mul_d = d7; mul_c = M1; end
      3'd1:    begin mul_d = d6; mul_c = M4; end
      3'd2:    begin mul_d = d4; mul_c = M2; end
      3'd3:    begin mul_d = d3; mul_c = M1; end
      3'd4:    begin mul_d = d2; mul_c = M3; end
      default: begin mul_d = '0; mul_c = '0; end
    endcase
    mul_p = prod_t'(mul_d) * prod_t'({1'b0, mul_c});
    mul_e = word_t'((mul_p + (prod_t'(1) <<< (E_SH - 1))) >>> E_SH);
  end

  // The product schedule runs on ph, the phase of the incoming group, which
  // equals the number of cycles since the hold register was loaded.
  word_t e2, e3, e4, e6, e7;

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (ph)
        3'd0: e3 <= mul_e;
        3'd1: e4 <= mul_e;
        3'd2: e7 <= mul_e;
        3'd3: e6 <= mul_e;
        3'd4: e2 <= mul_e;
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------- butterfly outputs
  word_t e0, e1, e5, e8;
  word_t f0, f1, f2, f3, f4, f5, f6, f7;
  word_t sa [8];

  always_comb begin
    e0 = d0 <<< GUARD;  e1 = d1 <<< GUARD;  e5 = d5 <<< GUARD;  e8 = d8 <<< GUARD;
    f0 = e0;       f1 = e1;       f2 = e5 + e6;  f3 = e5 - e6;
    f4 = e3 + e8;  f5 = e8 - e3;  f6 = e2 + e7;  f7 = e4 + e7;
    sa[0] = f0;       sa[1] = f4 + f7;  sa[2] = f2;       sa[3] = f5 - f6;
    sa[4] = f1;       sa[5] = f5 + f6;  sa[6] = f3;       sa[7] = f4 - f7;
  end

  word_t sa_bank [8];

  always_ff @(posedge clk) begin
    if (en && ph == 3'd5) sa_bank <= sa;
  end

  // ------------------------------------------------------- output scaling
  // Full mode: y(k) = sa(k) * s(k) through the second multiplier.
  // Scaled mode: y(k) = sa(k) / 2^SC_SHIFT, no multiplier; the factors s(k)
  // are left to the consumer (typically folded into a quantiser).
  logic [2:0] k;
  word_t      sa_sel;
  prod_t      y_r;

  always_comb begin
    k      = ph - 3'd2;
    sa_sel = k[2] ? sa_bank[k] : sa[k];
  end

  if (SCALED) begin : g_scaled
    localparam int S_SH = GUARD + SC_SHIFT;
    always_comb y_r = (prod_t'(sa_sel) + (prod_t'(1) <<< (S_SH - 1))) >>> S_SH;
  end else begin : g_full
    prod_t y_p;
    always_comb begin
      y_p = prod_t'(sa_sel) * prod_t'({1'b0, scale_coef(k)});
      y_r = (y_p + (prod_t'(1) <<< (Y_SH - 1))) >>> Y_SH;
    end
  end

  localparam prod_t Y_MAX = prod_t'((1 <<< (OUT_W - 1)) - 1);
  localparam prod_t Y_MIN = -prod_t'(1 <<< (OUT_W - 1));

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else if (en) begin
      if (y_r > Y_MAX)      dout <= Y_MAX[OUT_W-1:0];
      else if (y_r < Y_MIN) dout <= Y_MIN[OUT_W-1:0];
      else                  dout <= y_r[OUT_W-1:0];
    end
  end

  // ---------------------------------------------------------- ready strobe
  logic [STAGE_LAT-1:0] rdy_sr;

  always_ff @(posedge clk) begin
    if (rst)     rdy_sr <= '0;
    else if (en) rdy_sr <= {rdy_sr[STAGE_LAT-2:0], start};
  end

  assign rdy = rdy_sr[STAGE_LAT-1];

endmodule
