// dm2_multiplier: WIDTH x WIDTH unsigned add-and-shift multiplier built
// around a dual-mode adder (top level).
//
// On start the controller loads the multiplicand a_in into
// multiplicand_reg and the multiplier b_in into the low half of the
// (2*WIDTH+1)-bit multiplier_result register. It then examines the
// register's LSB WIDTH times. When the LSB is 1, the upper half of the
// register (rb) and the multiplicand (ra) go through the dual-mode adder and
// {carry, sum} replace the upper WIDTH+1 bits. Every round ends with a right
// shift. After WIDTH rounds rc holds the 2*WIDTH-bit product and stop rises.
//
// mode selects the adder for the next operation and is sampled with start:
// 0 = ripple-carry (low energy, two clock cycles per add), 1 = carry-select
// (fast, one cycle per add). In the reference design a separate mode
// decision unit drives this choice; its rule is not specified, so the signal
// is a port here.
// Interface: clk, reset (synchronous, active high), start, mode, a_in, b_in;
// stop, rc. Hold a_in/b_in stable during the cycle after start is accepted.
// Latency: 2 + 2*WIDTH + popcount(b_in)*add_cycles clock cycles from start
// to stop (add_cycles = 2 in ripple-carry mode, 1 in carry-select mode).
module dm2_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = WIDTH_DEFAULT
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic               mode,
  input  logic [WIDTH-1:0]   a_in,
  input  logic [WIDTH-1:0]   b_in,
  output logic               stop,
  output logic [2*WIDTH-1:0] rc
);

  logic             load_cmd, add_cmd, shift_cmd, lsb;
  adder_mode_e      adder_mode;
  logic [WIDTH-1:0] ra, rb, add_out;
  logic             c_out;

  mult_controller #(.WIDTH(WIDTH)) u_controller (
    .clk      (clk),
    .reset    (reset),
    .start    (start),
    .mode_in  (adder_mode_e'(mode)),
    .lsb      (lsb),
    .load_cmd (load_cmd),
    .add_cmd  (add_cmd),
    .shift_cmd(shift_cmd),
    .mode     (adder_mode),
    .stop     (stop)
  );

  multiplicand_reg #(.WIDTH(WIDTH)) u_multiplicand (
    .clk     (clk),
    .reset   (reset),
    .load_cmd(load_cmd),
    .a_in    (a_in),
    .ra      (ra)
  );

  dm2_adder #(.WIDTH(WIDTH)) u_adder (
    .mode   (adder_mode),
    .ra     (ra),
    .rb     (rb),
    .add_out(add_out),
    .c_out  (c_out)
  );

  multiplier_result #(.WIDTH(WIDTH)) u_result (
    .clk      (clk),
    .reset    (reset),
    .load_cmd (load_cmd),
    .add_cmd  (add_cmd),
    .shift_cmd(shift_cmd),
    .b_in     (b_in),
    .c_out    (c_out),
    .add_out  (add_out),
    .rb       (rb),
    .rc       (rc),
    .lsb      (lsb)
  );

endmodule
