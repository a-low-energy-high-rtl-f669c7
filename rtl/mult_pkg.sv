// mult_pkg: types and constants shared by the add-and-shift multiplier.
//
// The multiplier works on WIDTH-bit unsigned operands (8 in the reference
// configuration) and uses a dual-mode adder that can run either as a plain
// ripple-carry adder (low energy, given two clock cycles per add) or as a
// carry-select adder (fast, one clock cycle per add). The mode encoding and
// the controller state encoding below are choices of this design.
package mult_pkg;

  // Default operand width: 8-bit multiplicand and multiplier, 16-bit product.
  localparam int unsigned WIDTH_DEFAULT = 8;

  // Adder mode of the dual-mode adder.
  typedef enum logic {
    MODE_RCA = 1'b0,  // ripple-carry path: low energy, multi-cycle add
    MODE_CSA = 1'b1   // carry-select path: fast, single-cycle add
  } adder_mode_e;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,  // waiting for start
    ST_INIT     = 3'd1,  // load operands (LOAD_cmd)
    ST_TEST     = 3'd2,  // examine the LSB of the multiplier
    ST_ADD_WAIT = 3'd3,  // extra adder cycle in ripple-carry mode
    ST_ADD      = 3'd4,  // write the adder result (ADD_cmd)
    ST_SHIFT    = 3'd5   // shift the result register (SHIFT_cmd)
  } ctrl_state_e;

endpackage
