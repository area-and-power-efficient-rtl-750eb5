// db4_pkg: types and constants shared by the db4 analysis filter bank.
//
// The db4 filters have eight taps. The lowpass coefficients are quantized to
// 11 bits (one sign bit, ten fractional bits) and scaled by 2^10 to integers:
//   g = { -11, 34, 32, -192, -29, 646, 732, 236 }.
// The widths follow the design: 8-bit signed samples, 19-bit reconfigurable
// multiplier block (ReMB) products, a 20-bit accumulator and 10-bit outputs
// (accumulator divided by 2^10 with truncation).
//
// The highpass coefficients are the same magnitudes in reverse order with
// alternating signs, h(k) = (-1)^(k+1) g(7-k):
//   h = { -236, 732, -646, -29, 192, 32, -34, -11 }.
//
// remb_sel_t bundles the four 2-bit mux select lines S0..S3 of the ReMB.
// tap_ctrl_t is what the controller sends to one filter for one tap:
// the ReMB selects plus S4, the sign mux select (1 = negate the product).
package db4_pkg;

  localparam int TAPS       = 8;
  localparam int TAP_W      = 3;
  localparam int COEF_FRAC  = 10;   // fractional bits of the coefficients

  typedef struct packed {
    logic [1:0] s3;
    logic [1:0] s2;
    logic [1:0] s1;
    logic [1:0] s0;
  } remb_sel_t;

  typedef struct packed {
    remb_sel_t  sel;
    logic       neg;
  } tap_ctrl_t;

endpackage
