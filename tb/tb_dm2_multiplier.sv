// tb_dm2_multiplier: end-to-end test of the add-and-shift multiplier at its
// default size (8 x 8 bits).
// Every one of the 65536 operand pairs is multiplied once in carry-select
// mode and once in ripple-carry mode. For each operation the product rc is
// compared with a * b and the number of cycles from start to stop with
// 2 + 16 + popcount(b) * add_cycles (add_cycles 1 or 2). It counts how often
// each mechanism of the design occurred and fails if one never did: an add
// cycle, a test without add (LSB 0), an add producing a carry out of the
// adder, a carry-select addition whose high section was taken from the
// carry-in-1 copy, a ripple-carry add wait cycle, and operations in both
// modes.
module tb_dm2_multiplier;
  logic        clk = 1'b0, reset, start, mode, stop;
  logic [7:0]  a_in, b_in;
  logic [15:0] rc;
  int          checks = 0, failures = 0;
  longint      n_add = 0, n_noadd = 0, n_carry = 0, n_csa_sel1 = 0, n_wait = 0;
  int          n_ops_rca = 0, n_ops_csa = 0;

  dm2_multiplier dut (
    .clk(clk), .reset(reset), .start(start), .mode(mode),
    .a_in(a_in), .b_in(b_in), .stop(stop), .rc(rc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the design's internal command signals.
  always @(posedge clk) begin
    if (!reset) begin
      if (dut.add_cmd) n_add++;
      if (dut.add_cmd && dut.c_out) n_carry++;
      if (dut.add_cmd && dut.adder_mode == mult_pkg::MODE_CSA && dut.u_adder.u_csa.c_lo) n_csa_sel1++;
      if (dut.u_controller.state == mult_pkg::ST_ADD_WAIT) n_wait++;
      if (dut.u_controller.state == mult_pkg::ST_TEST && !dut.lsb) n_noadd++;
    end
  end

  task automatic multiply(input logic [7:0] a, input logic [7:0] b, input logic m);
    int cycles, expected;
    a_in  = a;
    b_in  = b;
    mode  = m;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 1;
    while (!stop && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = 2 + 16 + $countones(b) * (m ? 1 : 2);
    checks++;
    if (rc != 16'(a * b) || cycles != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d mode %b: rc=%0d after %0d cycles, expected %0d after %0d",
                                  a, b, m, rc, cycles, 16'(a * b), expected);
    end
    if (m) n_ops_csa++; else n_ops_rca++;
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; mode = 1'b1; a_in = '0; b_in = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    // Example operation: 237 * 219 in both modes.
    multiply(8'd237, 8'd219, 1'b1);
    multiply(8'd237, 8'd219, 1'b0);
    for (int m = 1; m >= 0; m--)
      for (int v = 0; v < (1 << 16); v++)
        multiply(v[15:8], v[7:0], m[0]);
    checks++;
    if (n_add == 0 || n_noadd == 0 || n_carry == 0 || n_csa_sel1 == 0 || n_wait == 0 ||
        n_ops_rca == 0 || n_ops_csa == 0) failures++;
    $display("operations: carry-select %0d, ripple-carry %0d", n_ops_csa, n_ops_rca);
    $display("add cycles %0d, tests without add %0d, adds with carry out %0d", n_add, n_noadd, n_carry);
    $display("carry-select adds using the carry-in-1 high section %0d, ripple-carry wait cycles %0d",
             n_csa_sel1, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
