// csa_adder: WIDTH-bit adder built from carry save adder bit cells.
//
// Adds the operands a and b plus the carry in cin and returns the WIDTH-bit
// sum and the carry out; {cout, sum} is the full (WIDTH+1)-bit result.
//
// Every bit position is a csa_bit_cell. All cells first form the carry-save
// pair of the operands at once (cs_sum = a ^ b, cs_carry = a & b). The carry
// then ripples from bit 0 upward: in each cell the carry-save sum bit picks
// the final sum bit (cin or !cin) and the carry out (operand bit a, or the
// incoming carry passed straight through). The carry out of the top cell is
// the adder's carry out.
//
// The default width of 32 bits and the bit cell are the design's own. The
// carry-in port is a choice of this implementation: the algorithm starts the
// chain from a carry of zero, so tie cin to 0 for that configuration.
// The carry out is taken directly from the top bit cell, which gives the
// correct sum for either value of cin.
//
// Interface: purely combinational, no clock or reset. The carry-save pair
// is brought out as cs_sum and cs_carry for users that want the unresolved
// form. Delay is one carry-save gate level plus WIDTH multiplexer levels on
// the carry chain.
module csa_adder
  import csa_pkg::*;
#(
  parameter int unsigned WIDTH = CSA_WIDTH
) (
  input  logic [WIDTH-1:0] a,        // operand a
  input  logic [WIDTH-1:0] b,        // operand b
  input  logic             cin,      // carry into bit 0 (0 in the basic configuration)
  output logic [WIDTH-1:0] sum,      // sum bits
  output logic             cout,     // carry out of the most significant bit
  output logic [WIDTH-1:0] cs_sum,   // carry-save sum, a ^ b
  output logic [WIDTH-1:0] cs_carry  // carry-save carry, a & b
);

  // carry[i] enters bit i; carry[WIDTH] leaves the top bit
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    csa_bit_cell u_cell (
      .a      (a[i]),
      .b      (b[i]),
      .cin    (carry[i]),
      .hsum   (cs_sum[i]),
      .hcarry (cs_carry[i]),
      .sum    (sum[i]),
      .cout   (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
