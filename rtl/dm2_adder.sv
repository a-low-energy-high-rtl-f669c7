// dm2_adder: dual-mode adder used by the multiplier.
//
// The same WIDTH-bit sum ra + rb is produced by one of two adder structures:
// an 8-bit ripple-carry adder (MODE_RCA, the slow low-energy mode) or the
// carry-select adder (MODE_CSA, the fast mode). The mode input picks which
// result reaches add_out/c_out. The adder that is not selected sees zero
// operands, so its internal nodes do not toggle: this operand isolation is
// the RTL stand-in for the energy saving of the idle path and is this
// design's choice. The mode itself comes from outside; the controller gives
// the ripple-carry mode two clock cycles per addition.
// Interface: mode, ra, rb (WIDTH bits); add_out (WIDTH bits), c_out.
// Combinational.
module dm2_adder
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = WIDTH_DEFAULT
) (
  input  adder_mode_e      mode,
  input  logic [WIDTH-1:0] ra,
  input  logic [WIDTH-1:0] rb,
  output logic [WIDTH-1:0] add_out,
  output logic             c_out
);

  logic [WIDTH-1:0] rca_a, rca_b, csa_a, csa_b;
  logic [WIDTH-1:0] rca_sum, csa_sum;
  logic             rca_c, csa_c;

  // Operand isolation of the unused path.
  always_comb begin
    rca_a = (mode == MODE_RCA) ? ra : '0;
    rca_b = (mode == MODE_RCA) ? rb : '0;
    csa_a = (mode == MODE_CSA) ? ra : '0;
    csa_b = (mode == MODE_CSA) ? rb : '0;
  end

  ripple_carry_adder #(.N(WIDTH)) u_rca (
    .a(rca_a), .b(rca_b), .c_in(1'b0), .sum(rca_sum), .c_out(rca_c)
  );

  carry_select_adder #(.WIDTH(WIDTH)) u_csa (
    .ra(csa_a), .rb(csa_b), .add_out(csa_sum), .c_out(csa_c)
  );

  always_comb begin
    if (mode == MODE_CSA) begin
      add_out = csa_sum;
      c_out   = csa_c;
    end else begin
      add_out = rca_sum;
      c_out   = rca_c;
    end
  end

endmodule
