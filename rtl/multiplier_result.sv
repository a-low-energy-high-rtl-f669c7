// multiplier_result: the (2*WIDTH+1)-bit shift register that holds the
// multiplier, the partial product and finally the product.
//
// temp_register has bits 2*WIDTH downto 0 (16 downto 0 for WIDTH = 8).
//  * load_cmd: bits WIDTH-1..0 take the multiplier b_in, the upper WIDTH+1
//    bits are cleared.
//  * add_cmd:  a multiplexer replaces the upper WIDTH+1 bits with
//    {c_out, add_out}, the adder's result for rb + multiplicand.
//  * shift_cmd: the whole register shifts right by one, a 0 enters the top
//    bit. The multiplier bits leave at the bottom as the partial product
//    grows in from the top.
// After WIDTH test/add/shift rounds temp_register[2*WIDTH-1:0] is the product.
// Outputs: rb = temp_register[2*WIDTH-1:WIDTH] (adder operand),
// rc = temp_register[2*WIDTH-1:0] (product), lsb = temp_register[0]
// (the bit the controller tests). If several commands are high at once,
// load wins over add and add over shift; that priority is this design's
// choice, the controller never raises two at once.
// Timing: each command takes effect at the next rising clock edge.
module multiplier_result
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = WIDTH_DEFAULT
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               load_cmd,
  input  logic               add_cmd,
  input  logic               shift_cmd,
  input  logic [WIDTH-1:0]   b_in,
  input  logic               c_out,
  input  logic [WIDTH-1:0]   add_out,
  output logic [WIDTH-1:0]   rb,
  output logic [2*WIDTH-1:0] rc,
  output logic               lsb
);

  logic [2*WIDTH:0] temp_register;
  logic [WIDTH:0]   upper_next;  // output of the add multiplexer

  // Multiplexer in front of the upper WIDTH+1 bits.
  always_comb begin
    if (add_cmd) upper_next = {c_out, add_out};
    else         upper_next = temp_register[2*WIDTH:WIDTH];
  end

  always_ff @(posedge clk) begin
    if (reset)
      temp_register <= '0;
    else if (load_cmd)
      temp_register <= {{(WIDTH+1){1'b0}}, b_in};
    else if (add_cmd)
      temp_register <= {upper_next, temp_register[WIDTH-1:0]};
    else if (shift_cmd)
      temp_register <= {1'b0, temp_register[2*WIDTH:1]};
  end

  assign rb  = temp_register[2*WIDTH-1:WIDTH];
  assign rc  = temp_register[2*WIDTH-1:0];
  assign lsb = temp_register[0];

endmodule
