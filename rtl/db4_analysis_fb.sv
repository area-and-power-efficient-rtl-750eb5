// db4_analysis_fb: one-level db4 discrete wavelet analysis filter bank.
//
// Splits an 8-bit signed sample stream x into approximation (cA, lowpass) and
// detail (cD, highpass) coefficients, each at half the input rate. The two
// filters are time-multiplexed: one input sample is taken every eight clock
// cycles and, during the eight cycles that follow, each filter multiplies one
// stored sample per cycle by one coefficient with a reconfigurable multiplier
// block (shift-add network, no multiplier and no coefficient memory) and
// accumulates it. A controller (counter + decoder) addresses the shared input
// memory and drives the select lines of both ReMBs. Each filter output is then
// decimated by two and truncated to 10 bits (divided by 2^10).
//
//   cA(m) = floor( sum_k g(k) x(2m-k) / 2^10 )
//   cD(m) = floor( sum_k h(k) x(2m-k) / 2^10 ),   x(n) = 0 for n < 0,
// with n counting accepted samples from reset, g and h in db4_pkg.
//
// Interface: x is offered with x_valid and taken when x_ready is high
// (ready/valid). c_valid pulses for one cycle with a new cA/cD pair, ten
// cycles after the sample x(2m) was accepted. Throughput: one sample per eight
// cycles, one cA/cD pair per sixteen cycles at full rate. The structure
// follows the design; the handshake, the reset and the decimation phase are
// this implementation's choices.
module db4_analysis_fb
  import db4_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int OUT_W  = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  output logic                     x_ready,
  input  logic signed [DATA_W-1:0] x,
  output logic                     c_valid,
  output logic signed [OUT_W-1:0]  ca,
  output logic signed [OUT_W-1:0]  cd
);

  localparam int REMB_W = 19;
  localparam int ACC_W  = 20;

  logic                     x_accept;
  logic [TAP_W-1:0]         addr;
  logic                     busy, first, frame_done;
  tap_ctrl_t                g_sel, h_sel;
  logic signed [DATA_W-1:0] tap_x;
  logic signed [ACC_W-1:0]  acc_g, acc_h;
  logic                     ca_valid, cd_valid;

  controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_valid    (x_valid),
    .x_ready    (x_ready),
    .x_accept   (x_accept),
    .addr       (addr),
    .busy       (busy),
    .first      (first),
    .g_sel      (g_sel),
    .h_sel      (h_sel),
    .frame_done (frame_done)
  );

  input_memory #(.DATA_W(DATA_W), .TAPS(TAPS)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (x_accept),
    .wr_data  (x),
    .rd_addr  (addr),
    .rd_data  (tap_x)
  );

  tdl_filter #(.DATA_W(DATA_W), .REMB_W(REMB_W), .ACC_W(ACC_W)) u_g (
    .clk (clk), .rst_n (rst_n), .x (tap_x), .ctrl (g_sel),
    .en (busy), .first (first), .acc (acc_g)
  );

  tdl_filter #(.DATA_W(DATA_W), .REMB_W(REMB_W), .ACC_W(ACC_W)) u_h (
    .clk (clk), .rst_n (rst_n), .x (tap_x), .ctrl (h_sel),
    .en (busy), .first (first), .acc (acc_h)
  );

  downsampler #(.ACC_W(ACC_W), .FRAC(COEF_FRAC), .OUT_W(OUT_W)) u_ds_a (
    .clk (clk), .rst_n (rst_n), .in_valid (frame_done), .in (acc_g),
    .out_valid (ca_valid), .out (ca)
  );

  downsampler #(.ACC_W(ACC_W), .FRAC(COEF_FRAC), .OUT_W(OUT_W)) u_ds_d (
    .clk (clk), .rst_n (rst_n), .in_valid (frame_done), .in (acc_h),
    .out_valid (cd_valid), .out (cd)
  );

  // Both downsamplers see the same frame_done, so their valids always agree.
  assign c_valid = ca_valid && cd_valid;

endmodule
