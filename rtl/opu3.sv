// opu3: operand preparation unit 3 of the reverse converter.
//
// Forms the operands of the final subtraction Y = Z + (2^(2n)-1) * T, which
// is rewritten as Y = {T, Z} - T: the 4n+1-bit minuend p is T placed above
// the 2n-bit digit Z, and the subtrahend is T itself, handed on inverted
// (tn = ~T) for the HRPX, which adds it with a carry-in of one.
// The subtraction S = P - T with a 2n+1-bit T is the published scheme;
// P = {T, Z} is this design's derivation. The inverter that the published
// netlist draws as a separate cell sits here. Only wiring and inverters.
// Purely combinational.
module opu3 #(
  parameter int unsigned N = 4
) (
  input  logic [2*N:0]   t,
  input  logic [2*N-1:0] z,
  output logic [4*N:0]   p,
  output logic [2*N:0]   tn
);

  assign p  = {t, z};
  assign tn = ~t;

endmodule
