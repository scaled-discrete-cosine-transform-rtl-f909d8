// dct_pkg: constants shared by the 8x8 AAN DCT core.
//
// All multiplier constants are 11-bit unsigned fixed-point numbers with 10
// fractional bits (value = code / 1024), matching the 11-bit coefficient
// width of the core.  Codes are round(value * 1024):
//   M1 = cos(pi/4)                 -> 724
//   M2 = cos(3pi/8)                -> 392
//   M3 = cos(pi/8) - cos(3pi/8)    -> 554
//   M4 = cos(pi/8) + cos(3pi/8)    -> 1338
// The output scale factors turn the AAN butterfly result sa(k) into the
// orthonormal 1-D DCT coefficient y(k) = sa(k) * s(k), with
//   s(0) = 0.5/sqrt(2),  s(k) = 0.25/cos(k*pi/16) for k = 1..7.
// The 10-fraction-bit format is this design's choice; the constants
// themselves follow the AAN algorithm.
package dct_pkg;

  localparam int COEF_W    = 11;
  localparam int COEF_FRAC = 10;

  typedef logic [COEF_W-1:0] coef_t;

  localparam coef_t M1 = 11'd724;
  localparam coef_t M2 = 11'd392;
  localparam coef_t M3 = 11'd554;
  localparam coef_t M4 = 11'd1338;

  // round(s(k) * 1024), k = 0..7
  function automatic coef_t scale_coef(input logic [2:0] k);
    unique case (k)
      3'd0: scale_coef = 11'd362;
      3'd1: scale_coef = 11'd261;
      3'd2: scale_coef = 11'd277;
      3'd3: scale_coef = 11'd308;
      3'd4: scale_coef = 11'd362;
      3'd5: scale_coef = 11'd461;
      3'd6: scale_coef = 11'd669;
      default: scale_coef = 11'd1312;
    endcase
  endfunction

  // Latencies in enabled clock cycles, from a sample on the input bus to the
  // same-index result on the output bus.
  localparam int STAGE_LAT = 11;
  localparam int BUF_LAT   = 55;
  localparam int CORE_LAT  = 2 * STAGE_LAT + 2 * BUF_LAT;  // 132

endpackage
