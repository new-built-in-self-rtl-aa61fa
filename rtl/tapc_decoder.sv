// tapc_decoder: the TAP controller decoder and its output latches.
//
// Inputs are the four state bits of the TAP state machine and the
// three-bit operation field of the instruction register; outputs are the
// nineteen control signals of the decoder tables (bist_bs_pkg::tap_ctrl_t).
// The decoding below is written as rules that reproduce those tables:
//  * RESET is low only in Test-Logic-Reset; Enable (active low TDO enable)
//    is low only in Shift-DR and Shift-IR; Select is high in the IR column
//    of the state diagram plus Run-Test/Idle and Test-Logic-Reset.
//  * IR_Cap/IR_Cap_Shf/IR_Update drive the instruction register in
//    Capture-IR, Shift-IR and Update-IR for every instruction.
//  * The BSR is clocked in Capture-DR and Shift-DR for SAMPLE/PRELOAD,
//    EXTEST and INTEST.  For BIST-BSR it is not clocked in Capture-DR, so
//    the signature survives on its way to Shift-DR.  For BIST-BSR, BFT and
//    BST the BSR is clocked in shift mode in Run-Test/Idle, where BIST_mode
//    turns its cells into TPG and MISR.
//  * The bypass register is clocked in Capture-DR/Shift-DR under BYPASS.
//  * Mode_Test (pin permission) is high for EXTEST, INTEST, BIST-BSR, BFT,
//    BST and SYNC; BIST_Inst_enable for BIST-BSR, BFT and BST; Enable_Sync
//    for SYNC; all of them are low in Test-Logic-Reset.
//  * Under BFT/BST the BILBO controls are (B1,B2,HOLD) = (1,1,0) scan in
//    Shift-DR, (1,1,1) hold elsewhere, and in Run-Test/Idle (1,0,0) for BFT
//    or (0,1,0) for BST.  Normal mode (0,0,0) otherwise.
// Timing: every output except IR_Update and BSR_Update is latched on the
// falling edge of TCK, so it is stable around the next rising edge, the
// one that leaves the state it was decoded from.  IR_Update and BSR_Update
// are latched on the rising edge of TCK from the state being entered, so
// they are high for the whole Update-IR / Update-DR state and the
// update stages, clocked on the falling edge, see them settled.
// TRST_n clears the latches to their Test-Logic-Reset values.
module tapc_decoder
  import bist_bs_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  tap_state_e state,
  input  tap_state_e next_state,
  input  opcode_e    op,
  output tap_ctrl_t  ctrl
);

  tap_ctrl_t dec;          // combinational decode of (state, op)
  tap_ctrl_t reset_value;  // decode of Test-Logic-Reset

  function automatic tap_ctrl_t decode(tap_state_e s, opcode_e o);
    tap_ctrl_t c;
    logic bist_inst;
    c = '0;
    bist_inst = o inside {OP_BISTBSR, OP_BFT, OP_BST};
    c.rst_n    = (s != TEST_RESET);
    c.tdo_en_n = !(s == SHIFT_DR || s == SHIFT_IR);
    c.sel_ir   = s[3] || (s == SELECT_IR);
    c.run_test_idle = (s == RUN_IDLE);
    // Instruction register
    c.ir_cap    = (s == CAPTURE_IR);
    c.ir_capshf = (s == CAPTURE_IR) || (s == SHIFT_IR);
    c.ir_update = (s == UPDATE_IR);
    if (s != TEST_RESET) begin
      c.enable_sync      = (o == OP_SYNC);
      c.mode_test        = is_pin_permission(o);
      c.bist_inst_enable = bist_inst;
      // Boundary-scan register
      if (selects_bsr(o)) begin
        c.bsr_capshf = (s == SHIFT_DR) || (s == CAPTURE_DR && o != OP_BISTBSR);
        c.bsr_shf    = (s == SHIFT_DR);
        c.bsr_update = (s == UPDATE_DR);
      end
      if (bist_inst && s == RUN_IDLE) begin
        c.bist_mode  = 1'b1;
        c.bsr_capshf = 1'b1;
        c.bsr_shf    = 1'b1;
      end
      // Bypass register
      if (o == OP_BYPASS) begin
        c.byp_capshf = (s == CAPTURE_DR) || (s == SHIFT_DR);
        c.byp_shf    = (s == SHIFT_DR);
      end
      // BILBO register
      if (selects_bilbo(o)) begin
        if (s == RUN_IDLE) begin
          c.b1_bilbo   = (o == OP_BFT);
          c.b2_bilbo   = (o == OP_BST);
          c.hold_bilbo = 1'b0;
        end else begin
          c.b1_bilbo   = 1'b1;
          c.b2_bilbo   = 1'b1;
          c.hold_bilbo = (s != SHIFT_DR);
        end
      end
    end
    return c;
  endfunction

  assign dec         = decode(state, op);
  assign reset_value = decode(TEST_RESET, op);

  // Falling-edge latches (all outputs except the two update strobes).
  tap_ctrl_t neg_q;
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) neg_q <= reset_value;
    else         neg_q <= dec;
  end

  // Rising-edge latches for IR_Update and BSR_Update.
  logic ir_update_q, bsr_update_q;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_update_q  <= 1'b0;
      bsr_update_q <= 1'b0;
    end else begin
      ir_update_q  <= (next_state == UPDATE_IR);
      bsr_update_q <= (next_state == UPDATE_DR) && selects_bsr(op);
    end
  end

  always_comb begin
    ctrl            = neg_q;
    ctrl.ir_update  = ir_update_q;
    ctrl.bsr_update = bsr_update_q;
  end

endmodule
