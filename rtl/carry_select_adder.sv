// carry_select_adder: WIDTH-bit carry-select adder (8 bits by default).
//
// The low half is added by one WIDTH/2-bit ripple-carry adder with carry-in
// 0. The high half is added twice at the same time, by one ripple-carry
// adder with carry-in 0 and one with carry-in 1. The carry out of the low
// half then drives a 2:1 multiplexer that picks the high-half sum and carry
// that match it, so the high half does not wait for the low carry to ripple
// through it. The three-section structure follows the reference design;
// the even split of any WIDTH is this design's generalisation.
// Interface: ra, rb (WIDTH bits); add_out (WIDTH bits), c_out. Combinational.
module carry_select_adder #(
  parameter int unsigned WIDTH = mult_pkg::WIDTH_DEFAULT
) (
  input  logic [WIDTH-1:0] ra,
  input  logic [WIDTH-1:0] rb,
  output logic [WIDTH-1:0] add_out,
  output logic             c_out
);

  localparam int unsigned H = WIDTH / 2;  // low-section width
  localparam int unsigned U = WIDTH - H;  // high-section width

  logic [H-1:0] sum_lo;
  logic         c_lo;
  logic [U-1:0] add_temp0, add_temp1;  // high-half sums for carry-in 0 / 1
  logic         c_temp0, c_temp1;

  ripple_carry_adder #(.N(H)) u_rca_lo (
    .a(ra[H-1:0]), .b(rb[H-1:0]), .c_in(1'b0), .sum(sum_lo), .c_out(c_lo)
  );

  ripple_carry_adder #(.N(U)) u_rca_hi0 (
    .a(ra[WIDTH-1:H]), .b(rb[WIDTH-1:H]), .c_in(1'b0), .sum(add_temp0), .c_out(c_temp0)
  );

  ripple_carry_adder #(.N(U)) u_rca_hi1 (
    .a(ra[WIDTH-1:H]), .b(rb[WIDTH-1:H]), .c_in(1'b1), .sum(add_temp1), .c_out(c_temp1)
  );

  // 2:1 multiplexer selected by the low section's carry out.
  always_comb begin
    if (c_lo) begin
      add_out = {add_temp1, sum_lo};
      c_out   = c_temp1;
    end else begin
      add_out = {add_temp0, sum_lo};
      c_out   = c_temp0;
    end
  end

endmodule
