// tdl_filter: one time-multiplexed tap-delay-line FIR filter (g(k) or h(k)).
//
// Each busy cycle the ReMB multiplies the sample read from the input memory by
// the coefficient magnitude chosen by ctrl.sel, a 2:1 mux (ctrl.neg, the S4
// line) passes the product or its bitwise inverse, and the accumulator adds
// it, with ctrl.neg as carry-in, so an inverted product is subtracted
// (acc + ~p + 1 = acc - p) without a separate negator. On the first tap of a
// frame the accumulator is loaded instead of added to, so after eight cycles
// acc holds sum_k c(k) x(n-k), coefficients scaled by 2^10. The sign mux with
// one inverted input and the widths follow the design (19-bit product, 20-bit
// accumulator); using the mux select as the accumulator's carry-in, the
// load-on-first-tap clearing and the reset are this implementation's choice.
// acc is registered and stays until the next frame's first tap.
module tdl_filter
  import db4_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int REMB_W = 19,
  parameter int ACC_W  = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x,
  input  tap_ctrl_t                ctrl,
  input  logic                     en,
  input  logic                     first,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [REMB_W-1:0] prod;
  logic signed [REMB_W-1:0] term;

  remb #(.DATA_W(DATA_W), .REMB_W(REMB_W)) u_remb (
    .x   (x),
    .sel (ctrl.sel),
    .y   (prod)
  );

  // Sign mux at the ReMB output: product or its bitwise inverse.
  assign term = ctrl.neg ? ~prod : prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      acc <= (first ? '0 : acc) + ACC_W'(term) + ACC_W'(ctrl.neg);
    end
  end

endmodule
