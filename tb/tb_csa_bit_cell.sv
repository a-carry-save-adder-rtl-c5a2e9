// tb_csa_bit_cell: exhaustive self-checking test of one adder bit cell.
//
// Applies all eight combinations of a, b and cin and compares the cell with
// the full adder truth table written out below as constants, and its
// carry-save pair with a ^ b and a & b. Each combination is applied a few
// times in random order as well. A watchdog ends the run if it stalls.
module tb_csa_bit_cell;
  logic a, b, cin;
  logic hsum, hcarry, sum, cout;
  int   checks   = 0;
  int   failures = 0;
  logic clk;

  // full adder truth table, rows indexed by {a, b, cin}: {sum, carryout}
  localparam logic [1:0] FA_TABLE [8] = '{
    2'b00, 2'b10, 2'b10, 2'b01, 2'b10, 2'b01, 2'b01, 2'b11
  };

  csa_bit_cell dut (
    .a(a), .b(b), .cin(cin),
    .hsum(hsum), .hcarry(hcarry), .sum(sum), .cout(cout)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic apply(input logic [2:0] v);
    {a, b, cin} = v;
    #1;
    checks++;
    if ({sum, cout} !== FA_TABLE[v]) begin
      failures++;
      $display("FAIL a=%0b b=%0b cin=%0b: sum=%0b cout=%0b expected %0b%0b",
               a, b, cin, sum, cout, FA_TABLE[v][1], FA_TABLE[v][0]);
    end
    checks++;
    if (hsum !== (v[2] != v[1]) || hcarry !== (v[2] && v[1])) begin
      failures++;
      $display("FAIL a=%0b b=%0b: hsum=%0b hcarry=%0b", a, b, hsum, hcarry);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) apply(3'(v));
    for (int n = 0; n < 64; n++) apply(3'($urandom_range(0, 7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
