// tb_csa_adder: end-to-end test of the adder at its default 32-bit width.
//
// Operands are applied on the falling clock edge and the outputs compared on
// the rising edge with a reference sum formed with 64-bit arithmetic in the
// testbench. The vectors are: the 4-bit worked example 1010 + 1101 = 10111,
// directed corner cases (zeros, all ones, a full-length carry ripple) and
// random operands with random carry in.
//
// For every vector the testbench also counts, from the operands alone, how
// often each mechanism of the bit cell occurred: a bit that generates a
// carry (a = b = 1), one that kills it (a = b = 0), one that propagates the
// incoming carry (a != b), a carry leaving the top bit, a carry rippling
// through all bits, and a carry in of 1. A mechanism that never occurs counts
// as a failure. A watchdog ends the run if it stalls.
module tb_csa_adder;
  import csa_pkg::*;
  localparam int unsigned W = CSA_WIDTH;

  logic [W-1:0] a, b, sum, cs_sum, cs_carry;
  logic         cin, cout;
  logic         clk;
  int checks = 0, failures = 0;
  int n_gen = 0, n_kill = 0, n_prop = 0, n_cout = 0, n_ripple = 0, n_cin = 0;

  csa_adder dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .cs_sum(cs_sum), .cs_carry(cs_carry)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    longint unsigned ref_sum;
    @(negedge clk);
    a = va; b = vb; cin = vc;
    @(posedge clk);
    ref_sum = longint'(va) + longint'(vb) + longint'(vc);
    checks++;
    if ({cout, sum} !== (W+1)'(ref_sum)) begin
      failures++;
      $display("FAIL %h + %h + %0b: got %0b_%h expected %h", va, vb, vc, cout, sum, ref_sum);
    end
    checks++;
    if (cs_sum !== (va ^ vb) || cs_carry !== (va & vb)) begin
      failures++;
      $display("FAIL carry-save pair for %h, %h: %h %h", va, vb, cs_sum, cs_carry);
    end
    // mechanism coverage, worked out from the operands
    if ((va & vb) != '0)   n_gen++;
    if ((~va & ~vb) != '0) n_kill++;
    if ((va ^ vb) != '0)   n_prop++;
    if (ref_sum[W])        n_cout++;
    if (vc && (va ^ vb) == '1) n_ripple++;
    if (vc)                n_cin++;
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0;
    // worked example: 1010 + 1101 = 10111
    apply(W'(4'b1010), W'(4'b1101), 1'b0);
    checks++;
    if (sum[4:0] !== 5'b10111) begin
      failures++;
      $display("FAIL worked example: %b", sum[4:0]);
    end
    // corner cases
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, W'(1), 1'b0);          // carry ripples through every bit
    apply(W'(32'h5555_5555), W'(32'hAAAA_AAAA), 1'b1); // propagate chain fed by cin
    apply('1, '0, 1'b1);
    // random operands
    for (int n = 0; n < 20000; n++)
      apply(W'({$urandom, $urandom}), W'({$urandom, $urandom}), 1'($urandom));

    if (n_gen == 0)    begin failures++; $display("never: generate");    end
    if (n_kill == 0)   begin failures++; $display("never: kill");        end
    if (n_prop == 0)   begin failures++; $display("never: propagate");   end
    if (n_cout == 0)   begin failures++; $display("never: carry out");   end
    if (n_ripple == 0) begin failures++; $display("never: full ripple"); end
    if (n_cin == 0)    begin failures++; $display("never: carry in");    end
    $display("mechanisms: generate=%0d kill=%0d propagate=%0d carry_out=%0d full_ripple=%0d carry_in=%0d",
             n_gen, n_kill, n_prop, n_cout, n_ripple, n_cin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
