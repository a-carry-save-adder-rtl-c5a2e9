// csa_pkg: constants shared by the carry save adder and its testbenches.
//
// CSA_WIDTH is the operand width of the adder in its main configuration:
// two 32-bit operands, giving a 32-bit sum and a carry out.
package csa_pkg;
  localparam int unsigned CSA_WIDTH = 32;
endpackage
