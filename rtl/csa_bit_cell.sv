// csa_bit_cell: one bit position of the carry save adder.
//
// The cell works in two steps.
//   1. Carry-save step. The half sum starts as operand bit b and is inverted
//      where operand bit a is 1 (hsum = a ^ b). The half carry starts as b
//      and is cleared where a is 0 (hcarry = a & b).
//   2. Carry resolution. The half sum selects how the incoming carry is
//      folded in:
//        hsum = 0 : sum = cin,  cout = a   (a == b here: generate or kill)
//        hsum = 1 : sum = !cin, cout = cin (a != b here: propagate)
// The result equals a full adder (sum = a^b^cin, cout = majority), but the
// carry out is a 2:1 multiplexer steered by the half sum, which is what keeps
// the carry chain short.
//
// Both steps, and taking cout from operand bit a on the hsum = 0 branch,
// follow the algorithm this adder is built from. On that branch a equals
// hcarry, so either could drive cout.
//
// Interface: purely combinational, no clock or reset. hsum and hcarry are
// the carry-save pair of this bit before the incoming carry is added.
module csa_bit_cell (
  input  logic a,      // operand bit a[i]
  input  logic b,      // operand bit b[i]
  input  logic cin,    // carry from bit i-1 (the adder carry in for bit 0)
  output logic hsum,   // carry-save sum bit, a ^ b
  output logic hcarry, // carry-save carry bit, a & b
  output logic sum,    // final sum bit
  output logic cout    // carry to bit i+1
);

  always_comb begin
    // carry-save step: start from b, invert / clear under control of a
    hsum   = b;
    hcarry = b;
    if (a) hsum = !hsum;
    if (!a) hcarry = 1'b0;

    // carry resolution, steered by the half sum
    if (hsum == 1'b0) begin
      sum  = cin;
      cout = a;
    end else begin
      sum  = !cin;
      cout = cin;
    end
  end

endmodule
