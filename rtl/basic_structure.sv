// basic_structure: the reconfigurable adder cell of the multiplier block.
//
// A 4:1 multiplexer picks one of four (already shifted, hard-wired) operands
// d[0..3] and feeds it to an adder/subtractor whose other operand is a. The
// least significant select bit doubles as the adder's carry-in, so
//   sel = 0 or 2 : s = a + d[sel]
//   sel = 1 or 3 : s = a - d[sel]   (a + ~d[sel] + 1)
// On a 6-input-LUT FPGA the mux, the sum XOR and the carry-in share one LUT per
// bit. Two of the four mux inputs are normally wired to the same operand, so
// that operand can be both added and subtracted. The cell and the
// select-LSB-as-carry-in rule follow the design; the wiring of the d inputs is
// done by the instantiating module. Purely combinational; all values are
// W-bit two's complement and wrap modulo 2^W.
module basic_structure #(
  parameter int W = 19
) (
  input  logic [W-1:0]       a,
  input  logic [3:0][W-1:0]  d,
  input  logic [1:0]         sel,
  output logic [W-1:0]       s
);

  logic [W-1:0] b;

  always_comb begin
    b = d[sel];
    // Carry-in = sel[0]: invert the operand and add one to subtract.
    s = a + (sel[0] ? ~b : b) + W'(sel[0]);
  end

endmodule
