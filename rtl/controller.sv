// controller: sequencing and select-line decoding for the filter bank.
//
// An up-counter steps through the eight taps of a frame; its value is the
// input-memory address k (sample x(n-k)), and a decoder turns it into the
// select lines of both filters: ReMB selects S0..S3 and the sign select S4 of
// the lowpass g(k) filter (the fixed table of the design) and of the highpass
// h(k) filter (tap k reuses the ReMB setting of g(7-k), with the sign flipped
// on even k).
//
// Handshake (this implementation's choice): x_ready is high while idle and in
// the last tap cycle, so back-to-back samples are taken once every TAPS
// cycles. x_accept (x_valid & x_ready) shifts the sample into the input
// memory; the next TAPS cycles are the frame, with busy high, first marking
// tap 0. frame_done pulses in the cycle after the last tap, when the
// accumulators hold the finished outputs. One output per eight clock cycles,
// as in the design.
module controller
  import db4_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             x_valid,
  output logic             x_ready,
  output logic             x_accept,
  output logic [TAP_W-1:0] addr,
  output logic             busy,
  output logic             first,
  output tap_ctrl_t        g_sel,
  output tap_ctrl_t        h_sel,
  output logic             frame_done
);

  logic last;

  assign last     = busy && (addr == TAP_W'(TAPS - 1));
  assign x_ready  = !busy || last;
  assign x_accept = x_valid && x_ready;
  assign first    = busy && (addr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      addr       <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= last;
      if (x_accept) begin
        busy <= 1'b1;
        addr <= '0;
      end else if (busy) begin
        addr <= addr + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  // Decoder table: ReMB select lines S0..S3 and sign select S4 that make a
  // filter multiply by g(k). The S1 entry of tap 2 is a don't-care (the lower
  // basic structure is unused there) and is tied to 0.
  function automatic tap_ctrl_t g_ctrl(input logic [TAP_W-1:0] k);
    tap_ctrl_t c;
    case (k)
      3'd0:    c = '{sel: '{s3: 2'd0, s2: 2'd1, s1: 2'd1, s0: 2'd1}, neg: 1'b1};  //  -11
      3'd1:    c = '{sel: '{s3: 2'd1, s2: 2'd1, s1: 2'd0, s0: 2'd0}, neg: 1'b1};  //   34
      3'd2:    c = '{sel: '{s3: 2'd0, s2: 2'd3, s1: 2'd0, s0: 2'd3}, neg: 1'b1};  //   32
      3'd3:    c = '{sel: '{s3: 2'd0, s2: 2'd2, s1: 2'd1, s0: 2'd3}, neg: 1'b0};  // -192
      3'd4:    c = '{sel: '{s3: 2'd0, s2: 2'd0, s1: 2'd0, s0: 2'd2}, neg: 1'b1};  //  -29
      3'd5:    c = '{sel: '{s3: 2'd1, s2: 2'd2, s1: 2'd0, s0: 2'd0}, neg: 1'b0};  //  646
      3'd6:    c = '{sel: '{s3: 2'd2, s2: 2'd2, s1: 2'd1, s0: 2'd2}, neg: 1'b1};  //  732
      default: c = '{sel: '{s3: 2'd2, s2: 2'd1, s1: 2'd3, s0: 2'd1}, neg: 1'b0};  //  236
    endcase
    return c;
  endfunction

  // Decoder: the highpass tap k reuses the ReMB setting of g(7-k) and flips
  // the sign on even k, giving h(k) = (-1)^(k+1) g(7-k).
  always_comb begin
    g_sel     = g_ctrl(addr);
    h_sel     = g_ctrl(3'd7 - addr);
    h_sel.neg = h_sel.neg ^ ~addr[0];
  end

endmodule
