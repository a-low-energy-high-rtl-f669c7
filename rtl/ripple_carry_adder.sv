// ripple_carry_adder: N-bit adder made of N full adders in a chain.
//
// The carry out of each full adder is the carry in of the next one, so the
// worst-case delay runs from bit 0 through every cell to c_out. With N = 8
// and c_in tied to 0 it is the 8-bit ripple-carry adder of the multiplier's
// low-energy path; with N = 4 it is each of the three sections of the
// carry-select adder. The c_in port is added here so one module serves both.
// Interface: a, b (N bits), c_in; sum (N bits), c_out. Combinational.
module ripple_carry_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c_in,
  output logic [N-1:0] sum,
  output logic         c_out
);

  // carry[i] is the carry into bit i; carry[N] is the carry out.
  logic [N:0] carry;

  assign carry[0] = c_in;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .c_in (carry[i]),
      .sum  (sum[i]),
      .c_out(carry[i+1])
    );
  end

  assign c_out = carry[N];

endmodule
