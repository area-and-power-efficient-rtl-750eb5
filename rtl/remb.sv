// remb: reconfigurable multiplier block for the eight db4 coefficients.
//
// Replaces a general-purpose multiplier and the coefficient memory of a
// time-multiplexed FIR filter. Three basic structures (4:1 mux + add/sub with
// the select LSB as carry-in) and a final 4:1 shift mux compute y = c * x for
// the constant c chosen by the select lines S0..S3:
//   BS0 (S0): a = x,  d = {x<<1, x<<1, x<<3, x}        ->  3x, -x, 9x, 0
//   BS1 (S1): a = x,  d = {x<<2, x<<2, x<<4, x<<4}     ->  5x, -3x, 17x, -15x
//   BS2 (S2): a = BS0, d = {BS1<<2, BS1<<2, BS1<<6, x<<5}
//   S3 mux  : y = {BS2, BS2<<1, BS2<<2, BS2<<2}[S3]
// With the controller's decoder settings for taps 0..7 this gives 11, -34, -32, -192,
// 29, 646, -732 and 236 times x; the sign mux that follows in the filter
// fixes the sign. The structure, shifts and select coding follow the design;
// the fourth input of the S3 mux (unused by the coefficient set) repeating the
// <<2 operand is this implementation's choice. Combinational; the arithmetic is
// kept at full precision (REMB_W bits, no internal quantization).
module remb
  import db4_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int REMB_W = 19
) (
  input  logic signed [DATA_W-1:0] x,
  input  remb_sel_t                sel,
  output logic signed [REMB_W-1:0] y
);

  logic [REMB_W-1:0] xe;
  logic [REMB_W-1:0] bs0, bs1, bs2;

  assign xe = REMB_W'(x);   // sign extension of the signed sample

  basic_structure #(.W(REMB_W)) u_bs0 (
    .a   (xe),
    .d   ({xe, xe << 3, xe << 1, xe << 1}),
    .sel (sel.s0),
    .s   (bs0)
  );

  basic_structure #(.W(REMB_W)) u_bs1 (
    .a   (xe),
    .d   ({xe << 4, xe << 4, xe << 2, xe << 2}),
    .sel (sel.s1),
    .s   (bs1)
  );

  basic_structure #(.W(REMB_W)) u_bs2 (
    .a   (bs0),
    .d   ({xe << 5, bs1 << 6, bs1 << 2, bs1 << 2}),
    .sel (sel.s2),
    .s   (bs2)
  );

  always_comb begin
    case (sel.s3)
      2'd0:    y = bs2;
      2'd1:    y = bs2 << 1;
      default: y = bs2 << 2;
    endcase
  end

endmodule
