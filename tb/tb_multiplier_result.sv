// tb_multiplier_result: random test of the 17-bit multiplier/result
// register. One command (load, add, shift or none) is applied per cycle
// with random b_in, c_out and add_out; the register is compared each cycle
// with a model through its rb, rc and lsb outputs. Each command must have
// been exercised.
module tb_multiplier_result;
  logic        clk = 1'b0, reset, load_cmd, add_cmd, shift_cmd, c_out, lsb;
  logic [7:0]  b_in, add_out, rb;
  logic [15:0] rc;
  logic [16:0] model;
  int          checks = 0, failures = 0, n_load = 0, n_add = 0, n_shift = 0;

  multiplier_result #(.WIDTH(8)) dut (
    .clk(clk), .reset(reset), .load_cmd(load_cmd), .add_cmd(add_cmd), .shift_cmd(shift_cmd),
    .b_in(b_in), .c_out(c_out), .add_out(add_out), .rb(rb), .rc(rc), .lsb(lsb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load_cmd = 0; add_cmd = 0; shift_cmd = 0; b_in = 0; c_out = 0; add_out = 0;
    model = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int cmd;
      cmd = $urandom_range(0, 3);
      load_cmd  = (cmd == 1);
      add_cmd   = (cmd == 2);
      shift_cmd = (cmd == 3);
      b_in      = 8'($urandom);
      add_out   = 8'($urandom);
      c_out     = 1'($urandom);
      @(posedge clk);
      case (cmd)
        1: begin model = {9'b0, b_in}; n_load++; end
        2: begin model[16:8] = {c_out, add_out}; n_add++; end
        3: begin model = model >> 1; n_shift++; end
        default: ;
      endcase
      #1;
      checks++;
      if (rc != model[15:0] || rb != model[15:8] || lsb != model[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d cmd %0d rc=%h expected %h", i, cmd, rc, model[15:0]);
      end
    end
    checks++;
    if (n_load == 0 || n_add == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
