// multiplicand_reg: WIDTH-bit register holding the multiplicand.
//
// A row of WIDTH D flip-flops. On a rising clock edge with load_cmd high it
// takes a_in; otherwise it keeps its value for the whole multiplication, and
// its output ra is one operand of the dual-mode adder. reset clears it.
// The register, its load command and its reset follow the reference design;
// making the reset synchronous is this design's choice.
// Interface: clk, reset (synchronous, active high), load_cmd, a_in; ra.
// Timing: ra shows a_in one clock after load_cmd.
module multiplicand_reg
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = WIDTH_DEFAULT
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load_cmd,
  input  logic [WIDTH-1:0] a_in,
  output logic [WIDTH-1:0] ra
);

  always_ff @(posedge clk) begin
    if (reset)         ra <= '0;
    else if (load_cmd) ra <= a_in;
  end

endmodule
