// tb_mult_controller: test of the multiplier's state machine.
// The testbench stands in for the result register: it keeps a copy of the
// multiplier bits, loads it on load_cmd, shifts it on shift_cmd and feeds
// its LSB back. For random multipliers in both adder modes it builds the
// expected command sequence (load; then per bit: a test cycle, and for a 1
// bit the add cycles, then a shift) and compares the controller's commands
// with it cycle by cycle. It also checks the total latency from start to
// stop, 2 + 2*8 + ones*add_cycles, that stop stays high until the next
// start, and that the mode is held through the operation.
module tb_mult_controller;
  import mult_pkg::*;
  localparam int W = 8;
  localparam int SLOW = 2;

  logic        clk = 1'b0, reset, start, lsb;
  adder_mode_e mode_in, mode;
  logic        load_cmd, add_cmd, shift_cmd, stop;
  logic [W-1:0] sr;
  int          checks = 0, failures = 0;
  int          n_rca = 0, n_csa = 0, n_add = 0, n_skip = 0;

  mult_controller #(.WIDTH(W), .SLOW_ADD_CYCLES(SLOW)) dut (
    .clk(clk), .reset(reset), .start(start), .mode_in(mode_in), .lsb(lsb),
    .load_cmd(load_cmd), .add_cmd(add_cmd), .shift_cmd(shift_cmd), .mode(mode), .stop(stop));

  always #5 clk = ~clk;

  // Behaviour of the result register's low bits, seen through lsb.
  logic [W-1:0] b_val;
  always_ff @(posedge clk) begin
    if (load_cmd)       sr <= b_val;
    else if (shift_cmd) sr <= sr >> 1;
  end
  assign lsb = sr[0];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Command code: 0 none, 1 load, 2 add, 3 shift.
  function automatic int cmd_code();
    return load_cmd ? 1 : add_cmd ? 2 : shift_cmd ? 3 : 0;
  endfunction

  task automatic run_one(input logic [W-1:0] b, input adder_mode_e m);
    int exp_q[$];
    int add_cycles, ones, cycles;
    add_cycles = (m == MODE_RCA) ? SLOW : 1;
    ones = $countones(b);
    // Expected command sequence, one entry per clock after start.
    exp_q.push_back(0);  // IDLE cycle in which start is seen
    exp_q.push_back(1);  // INIT
    for (int i = 0; i < W; i++) begin
      exp_q.push_back(0);  // TEST
      if (b[i]) begin
        for (int k = 1; k < add_cycles; k++) exp_q.push_back(0);
        exp_q.push_back(2);
        n_add++;
      end else n_skip++;
      exp_q.push_back(3);
    end
    b_val   = b;
    mode_in = m;
    start   = 1'b1;
    cycles  = 0;
    foreach (exp_q[i]) begin
      #1;
      if (i > 0) start = 1'b0;  // drop start one step after the edge that saw it
      checks++;
      if (cmd_code() != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h mode=%s cycle %0d cmd %0d expected %0d",
                                    b, m.name(), i, cmd_code(), exp_q[i]);
      end
      if (i > 0) begin
        checks++;
        if (mode != m || stop) begin
          failures++;
          if (failures < 10) $display("FAIL b=%h cycle %0d mode=%s stop=%b", b, i, mode.name(), stop);
        end
      end
      @(posedge clk);
      cycles++;
    end
    #1;
    checks++;
    if (!stop || cycles != 2 + 2 * W + ones * add_cycles) begin
      failures++;
      $display("FAIL b=%h mode=%s stop=%b after %0d cycles", b, m.name(), stop, cycles);
    end
    // stop holds while idle
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk); #1;
      checks++;
      if (!stop || cmd_code() != 0) failures++;
    end
    if (m == MODE_RCA) n_rca++; else n_csa++;
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; mode_in = MODE_CSA; b_val = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (stop || cmd_code() != 0) failures++;
    run_one(8'h00, MODE_RCA);
    run_one(8'hFF, MODE_RCA);
    run_one(8'hFF, MODE_CSA);
    run_one(8'h81, MODE_CSA);
    for (int i = 0; i < 200; i++)
      run_one(W'($urandom), adder_mode_e'($urandom_range(0, 1)));
    checks++;
    if (n_rca == 0 || n_csa == 0 || n_add == 0 || n_skip == 0) failures++;
    $display("ops: ripple-carry %0d, carry-select %0d; adds %0d, skipped adds %0d", n_rca, n_csa, n_add, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
