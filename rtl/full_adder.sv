// full_adder: one-bit full adder, the cell the ripple-carry and carry-select
// adders are chained from.
//
// sum = a ^ b ^ c_in and c_out = majority(a, b, c_in). The cell's gate-level
// structure is this design's choice; only its function is fixed.
// Interface: three one-bit inputs, two one-bit outputs. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c_in,
  output logic sum,
  output logic c_out
);

  always_comb begin
    sum   = a ^ b ^ c_in;
    c_out = (a & b) | (a & c_in) | (b & c_in);
  end

endmodule
