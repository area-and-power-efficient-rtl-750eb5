// input_memory: the tap-delay line that holds the last TAPS input samples.
//
// When shift_en is high a new sample enters at tap 0 and every stored sample
// moves one tap down, so tap k holds x(n-k) after sample x(n) was written.
// The read port is combinational: rd_addr (the controller's counter) selects
// the tap. A read in the same cycle as a shift returns the value from before
// the clock edge. Reset clears all taps, so the first outputs are computed as
// if the signal had been zero before the first sample. Storing the samples and
// addressing them with the controller's counter follows the design; the
// shift-register organisation and the reset value are this implementation's
// choice.
module input_memory #(
  parameter int DATA_W = 8,
  parameter int TAPS   = 8,
  parameter int ADDR_W = $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] wr_data,
  input  logic [ADDR_W-1:0]        rd_addr,
  output logic signed [DATA_W-1:0] rd_data
);

  logic signed [DATA_W-1:0] mem [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) mem[i] <= '0;
    end else if (shift_en) begin
      mem[0] <= wr_data;
      for (int i = 1; i < TAPS; i++) mem[i] <= mem[i-1];
    end
  end

  assign rd_data = mem[rd_addr];

endmodule
