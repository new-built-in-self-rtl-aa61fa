// tap_fsm: the sixteen-state IEEE 1149.1 TAP controller state machine.
//
// The state moves on every rising edge of TCK under the single control
// input TMS, following the standard state diagram.  TRST_n (optional pin)
// forces Test-Logic-Reset asynchronously; five rising edges with TMS high
// reach Test-Logic-Reset from any state as well.  The state register uses
// the four-bit assignment of the decoder tables (see bist_bs_pkg), so the
// decoder can read it directly.  next_state is the state after the coming
// rising edge; the decoder uses it for the two signals that must be
// latched on the rising edge (IR_Update, BSR_Update).
module tap_fsm
  import bist_bs_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output tap_state_e next_state
);

  always_comb begin
    unique case (state)
      TEST_RESET: next_state = tms ? TEST_RESET : RUN_IDLE;
      RUN_IDLE:   next_state = tms ? SELECT_DR  : RUN_IDLE;
      SELECT_DR:  next_state = tms ? SELECT_IR  : CAPTURE_DR;
      CAPTURE_DR: next_state = tms ? EXIT1_DR   : SHIFT_DR;
      SHIFT_DR:   next_state = tms ? EXIT1_DR   : SHIFT_DR;
      EXIT1_DR:   next_state = tms ? UPDATE_DR  : PAUSE_DR;
      PAUSE_DR:   next_state = tms ? EXIT2_DR   : PAUSE_DR;
      EXIT2_DR:   next_state = tms ? UPDATE_DR  : SHIFT_DR;
      UPDATE_DR:  next_state = tms ? SELECT_DR  : RUN_IDLE;
      SELECT_IR:  next_state = tms ? TEST_RESET : CAPTURE_IR;
      CAPTURE_IR: next_state = tms ? EXIT1_IR   : SHIFT_IR;
      SHIFT_IR:   next_state = tms ? EXIT1_IR   : SHIFT_IR;
      EXIT1_IR:   next_state = tms ? UPDATE_IR  : PAUSE_IR;
      PAUSE_IR:   next_state = tms ? EXIT2_IR   : PAUSE_IR;
      EXIT2_IR:   next_state = tms ? UPDATE_IR  : SHIFT_IR;
      UPDATE_IR:  next_state = tms ? SELECT_DR  : RUN_IDLE;
      default:    next_state = TEST_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_RESET;
    else         state <= next_state;
  end

endmodule
