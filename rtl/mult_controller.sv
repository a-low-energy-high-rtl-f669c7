// mult_controller: state machine of the add-and-shift multiplier.
//
// A Moore machine clocked on the rising edge:
//   IDLE     waits for start; samples the requested adder mode.
//   INIT     raises load_cmd: multiplicand and multiplier are loaded.
//   TEST     looks at lsb, the current multiplier bit: 1 -> add, 0 -> shift.
//   ADD_WAIT only in ripple-carry mode: gives the slow adder extra cycles
//            (SLOW_ADD_CYCLES-1 of them) before its result is written.
//   ADD      raises add_cmd: the adder result is written into the register.
//   SHIFT    raises shift_cmd; after the WIDTH-th shift the machine sets stop
//            and returns to IDLE, otherwise it goes back to TEST.
// The state sequence (initialise, test, add, shift) follows the reference
// design. The extra add cycle in ripple-carry mode, the bit counter, the
// stop flag (set with the last shift, cleared when start is accepted) and
// the synchronous reset are this design's choices.
// Latency from the cycle start is seen in IDLE to stop high:
//   2 + 2*WIDTH + (number of 1 bits in the multiplier) * add_cycles
// clock cycles, with add_cycles = 1 in carry-select mode and
// SLOW_ADD_CYCLES in ripple-carry mode.
// The adder mode is held constant for the whole operation.
module mult_controller
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH           = WIDTH_DEFAULT,
  parameter int unsigned SLOW_ADD_CYCLES = 2
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  adder_mode_e mode_in,
  input  logic        lsb,
  output logic        load_cmd,
  output logic        add_cmd,
  output logic        shift_cmd,
  output adder_mode_e mode,
  output logic        stop
);

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned WW = (SLOW_ADD_CYCLES > 2) ? $clog2(SLOW_ADD_CYCLES) : 1;
  localparam logic [CW-1:0] LAST_BIT  = CW'(WIDTH - 1);
  localparam logic [WW-1:0] LAST_WAIT = WW'((SLOW_ADD_CYCLES > 1) ? SLOW_ADD_CYCLES - 2 : 0);

  ctrl_state_e   state, state_next;
  logic [CW-1:0] bit_cnt;   // number of shifts done in this operation
  logic [WW-1:0] wait_cnt;  // ADD_WAIT cycles done for this add

  always_comb begin
    state_next = state;
    unique case (state)
      ST_IDLE:     if (start) state_next = ST_INIT;
      ST_INIT:     state_next = ST_TEST;
      ST_TEST: begin
        if (!lsb)                                          state_next = ST_SHIFT;
        else if (mode == MODE_RCA && SLOW_ADD_CYCLES > 1)  state_next = ST_ADD_WAIT;
        else                                               state_next = ST_ADD;
      end
      ST_ADD_WAIT: if (wait_cnt == LAST_WAIT) state_next = ST_ADD;
      ST_ADD:      state_next = ST_SHIFT;
      ST_SHIFT:    state_next = (bit_cnt == LAST_BIT) ? ST_IDLE : ST_TEST;
      default:     state_next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= ST_IDLE;
      bit_cnt  <= '0;
      wait_cnt <= '0;
      mode     <= MODE_CSA;
      stop     <= 1'b0;
    end else begin
      state <= state_next;
      if (state == ST_IDLE && start) begin
        mode <= mode_in;
        stop <= 1'b0;
      end
      if (state == ST_INIT) bit_cnt <= '0;
      else if (state == ST_SHIFT) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == LAST_BIT) stop <= 1'b1;
      end
      if (state == ST_ADD_WAIT) wait_cnt <= wait_cnt + 1'b1;
      else                      wait_cnt <= '0;
    end
  end

  always_comb begin
    load_cmd  = (state == ST_INIT);
    add_cmd   = (state == ST_ADD);
    shift_cmd = (state == ST_SHIFT);
  end

  // At most one command per cycle.
  a_one_cmd: assert property (@(posedge clk) disable iff (reset)
    $onehot0({load_cmd, add_cmd, shift_cmd}));

endmodule
