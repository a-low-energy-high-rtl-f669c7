// tb_multiplicand_reg: random test of the multiplicand register.
// Random load_cmd, reset and a_in are applied for many cycles; ra is
// compared each cycle with a model that loads on load_cmd, clears on
// reset and otherwise holds.
module tb_multiplicand_reg;
  logic       clk = 1'b0, reset, load_cmd;
  logic [7:0] a_in, ra, model;
  int         checks = 0, failures = 0;

  multiplicand_reg #(.WIDTH(8)) dut (.clk(clk), .reset(reset), .load_cmd(load_cmd), .a_in(a_in), .ra(ra));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load_cmd = 1'b0; a_in = '0; model = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      reset    = ($urandom_range(0, 49) == 0);
      load_cmd = ($urandom_range(0, 3) == 0);
      a_in     = 8'($urandom);
      @(posedge clk);
      if (reset) model = '0; else if (load_cmd) model = a_in;
      #1;
      checks++;
      if (ra != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d ra=%h expected %h", i, ra, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
