// tb_dm2_adder: test of the dual-mode adder.
// In both modes all 65536 operand pairs are compared with ra + rb. It also
// checks the operand isolation: the adder that is not selected must see
// zero operands and so produce a zero sum.
module tb_dm2_adder;
  import mult_pkg::*;
  adder_mode_e mode;
  logic [7:0]  ra, rb, add_out;
  logic        c_out;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  dm2_adder #(.WIDTH(8)) dut (.mode(mode), .ra(ra), .rb(rb), .add_out(add_out), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      mode = adder_mode_e'(m);
      for (int v = 0; v < (1 << 16); v++) begin
        {ra, rb} = 16'(v);
        #1;
        checks++;
        if ({c_out, add_out} != 9'(int'(ra) + int'(rb))) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%s %h+%h -> %b %h", mode.name(), ra, rb, c_out, add_out);
        end
        checks++;
        if ((mode == MODE_RCA) ? (dut.csa_sum != '0 || dut.csa_c)
                               : (dut.rca_sum != '0 || dut.rca_c)) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%s idle adder not isolated", mode.name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
