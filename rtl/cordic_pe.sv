// cordic_pe: the processing element of the CORDIC systolic array.
//
// A one-bit adder/subtractor cell. Inputs: data bits X and Y, carry-in C and the
// operation select S; outputs: the sum bit Result and the carry-out Carry. With
// S = 0 the cell adds Y to X, with S = 1 it subtracts Y from X: S inverts Y, and a
// chain of these cells started with C = S forms the two's-complement X - Y.
//   Result = X ^ (Y ^ S) ^ C
//   Carry  = (X & (Y ^ S)) | (C & (X ^ (Y ^ S)))
// The four inputs, two outputs, the inversion of Y by S and the Result equation
// follow the design description. The Carry equation is the standard full-adder
// majority; the description prints a three-input AND, which cannot propagate a
// carry, so the full-adder form is used here. Purely combinational.
module cordic_pe (
  input  logic x,
  input  logic y,
  input  logic c,
  input  logic s,
  output logic result,
  output logic carry
);

  logic y_eff;

  always_comb begin
    y_eff  = y ^ s;
    result = x ^ y_eff ^ c;
    carry  = (x & y_eff) | (c & (x ^ y_eff));
  end

endmodule
