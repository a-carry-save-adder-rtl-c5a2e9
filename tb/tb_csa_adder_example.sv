// tb_csa_adder_example: the adder at 4 bits, checked on the worked example
// and exhaustively.
//
// First the worked example a = 1010, b = 1101 with carry in 0: the
// carry-save sum must be 0111, the carry-save carry 1000 and the result
// 10111 (23). Then every pair of 4-bit operands is added with carry in 0 and
// 1 and compared with the integer sum. A watchdog ends the run if it stalls.
module tb_csa_adder_example;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, sum, cs_sum, cs_carry;
  logic         cin, cout;
  logic         clk;
  int checks = 0, failures = 0;

  csa_adder #(.WIDTH(W)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .cs_sum(cs_sum), .cs_carry(cs_carry)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b cin=%b -> %b_%b (cs %b %b)",
               what, a, b, cin, cout, sum, cs_sum, cs_carry);
    end
  endtask

  initial begin
    a = 4'b1010; b = 4'b1101; cin = 1'b0;
    @(posedge clk);
    check(cs_sum   == 4'b0111,  "example carry-save sum");
    check(cs_carry == 4'b1000,  "example carry-save carry");
    check({cout, sum} == 5'b10111, "example result");

    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          a = W'(i); b = W'(j); cin = 1'(c);
          @(posedge clk);
          check({cout, sum} == 5'(i + j + c), "exhaustive sum");
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
