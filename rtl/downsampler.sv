// downsampler: 2:1 decimation and output scaling of one filter.
//
// Every in_valid pulse carries one filter output (accumulator, coefficients
// scaled by 2^10). The block keeps the first, third, fifth ... of them
// (y_d(m) = y(2m), counting from reset) and drops the others. A kept value is
// divided by 2^FRAC with truncation (arithmetic shift right, i.e. rounding
// towards minus infinity), cut to OUT_W bits and registered; out_valid pulses
// for one cycle. The decimation by two and the truncation to 10 bits follow
// the design; which phase is kept is this implementation's choice.
module downsampler #(
  parameter int ACC_W  = 20,
  parameter int FRAC   = 10,
  parameter int OUT_W  = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);

  logic phase;   // 0: keep the next output, 1: drop it

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid && !phase;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) out <= OUT_W'(in >>> FRAC);
      end
    end
  end

endmodule
