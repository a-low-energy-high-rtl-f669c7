// tb_carry_select_adder: test of the 8-bit carry-select adder.
// First the four operand pairs of the reference waveform are applied and
// the sum, carry and both precomputed high-nibble sums (carry-in 0 and 1)
// are compared with the values printed there. Then all 65536 operand pairs
// are compared with ra + rb. It also counts how often the low-nibble carry
// selected each high section, and fails if either never happened.
module tb_carry_select_adder;
  logic [7:0] ra, rb, add_out;
  logic       c_out;
  int         checks = 0, failures = 0;
  int         sel0 = 0, sel1 = 0;
  logic       clk = 1'b0;

  carry_select_adder #(.WIDTH(8)) dut (.ra(ra), .rb(rb), .add_out(add_out), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [7:0] ra, rb, add_out;
    logic       c_out;
    logic [3:0] temp0, temp1;
  } wave_vec_t;

  // Values printed in the reference waveform (binary).
  wave_vec_t wave [4] = '{
    '{8'b11101101, 8'b11011011, 8'b11001000, 1'b1, 4'b1011, 4'b1100},
    '{8'b11101110, 8'b00000000, 8'b11101110, 1'b0, 4'b1110, 4'b1111},
    '{8'b11101110, 8'b01110111, 8'b01100101, 1'b1, 4'b0101, 4'b0110},
    '{8'b11101110, 8'b10110010, 8'b10100000, 1'b1, 4'b1001, 4'b1010}
  };

  initial begin
    foreach (wave[i]) begin
      ra = wave[i].ra;
      rb = wave[i].rb;
      #1;
      checks++;
      if (add_out != wave[i].add_out || c_out != wave[i].c_out ||
          dut.add_temp0 != wave[i].temp0 || dut.add_temp1 != wave[i].temp1) begin
        failures++;
        $display("FAIL waveform vector %0d: %b+%b -> %b %b temp0=%b temp1=%b", i, ra, rb,
                 c_out, add_out, dut.add_temp0, dut.add_temp1);
      end
    end
    for (int v = 0; v < (1 << 16); v++) begin
      {ra, rb} = 16'(v);
      #1;
      checks++;
      if (int'(ra[3:0]) + int'(rb[3:0]) > 15) sel1++; else sel0++;
      if ({c_out, add_out} != 9'(int'(ra) + int'(rb))) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h -> %b %h", ra, rb, c_out, add_out);
      end
    end
    checks++;
    if (sel0 == 0 || sel1 == 0) failures++;
    $display("high section with carry-in 0 selected %0d times, carry-in 1 %0d times", sel0, sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
