// tb_ripple_carry_adder: exhaustive test of the ripple-carry adder at both
// sizes it is used at: 8 bits (the low-energy adder) and 4 bits (the
// sections of the carry-select adder). Every a, b, c_in is applied and
// {c_out, sum} is compared with a + b + c_in.
module tb_ripple_carry_adder;
  logic [7:0] a8, b8, s8;
  logic [3:0] a4, b4, s4;
  logic       ci8, co8, ci4, co4;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  ripple_carry_adder #(.N(8)) dut8 (.a(a8), .b(b8), .c_in(ci8), .sum(s8), .c_out(co8));
  ripple_carry_adder #(.N(4)) dut4 (.a(a4), .b(b4), .c_in(ci4), .sum(s4), .c_out(co4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %h+%h+%b -> %b %h", a8, b8, ci8, co8, s8);
      end
      if (v < (1 << 9)) begin
        checks++;
        if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4))) begin
          failures++;
          if (failures < 10) $display("FAIL N=4 %h+%h+%b -> %b %h", a4, b4, ci4, co4, s4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
