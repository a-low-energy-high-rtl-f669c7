// tb_full_adder: exhaustive self-checking test of the one-bit full adder.
// All eight input combinations are applied and sum/carry are compared with
// the arithmetic sum a + b + c_in.
module tb_full_adder;
  logic a, b, c_in, sum, c_out;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  full_adder dut (.a(a), .b(b), .c_in(c_in), .sum(sum), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c_in} = 3'(v);
      #1;
      checks++;
      if ({c_out, sum} != 2'(int'(a) + int'(b) + int'(c_in))) begin
        failures++;
        $display("FAIL a=%b b=%b c_in=%b -> c_out=%b sum=%b", a, b, c_in, c_out, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
