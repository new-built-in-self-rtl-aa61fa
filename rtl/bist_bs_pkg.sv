// bist_bs_pkg: types and constants shared by the BIST boundary-scan blocks.
//
// The TAP state encoding is the four-bit assignment used by the TAP
// controller decoder tables (Exit2-DR = 0000 ... Test-Logic-Reset = 1111).
// The instruction word is seven bits: a three-bit operation field followed
// by a four-bit address field.  Only the operation field selects the
// behaviour; the address field carries the sequential depth code of the
// SYNC instruction (P3..P0) and otherwise names the data register.
// The control struct bundles the nineteen decoder outputs in the order the
// decoder tables list them; RESET and Enable are active low there and keep
// that polarity here (rst_n, tdo_en_n).
package bist_bs_pkg;

  typedef enum logic [3:0] {
    EXIT2_DR   = 4'h0,
    EXIT1_DR   = 4'h1,
    SHIFT_DR   = 4'h2,
    PAUSE_DR   = 4'h3,
    SELECT_IR  = 4'h4,
    UPDATE_DR  = 4'h5,
    CAPTURE_DR = 4'h6,
    SELECT_DR  = 4'h7,
    EXIT2_IR   = 4'h8,
    EXIT1_IR   = 4'h9,
    SHIFT_IR   = 4'hA,
    PAUSE_IR   = 4'hB,
    RUN_IDLE   = 4'hC,
    UPDATE_IR  = 4'hD,
    CAPTURE_IR = 4'hE,
    TEST_RESET = 4'hF
  } tap_state_e;

  // Operation field of the instruction word.
  typedef enum logic [2:0] {
    OP_SAMPLE  = 3'b000,  // SAMPLE/PRELOAD
    OP_EXTEST  = 3'b001,
    OP_BISTBSR = 3'b010,  // BIST-BSR
    OP_BFT     = 3'b011,  // BIST-BILBO, first test session
    OP_BST     = 3'b100,  // BIST-BILBO, second test session
    OP_SYNC    = 3'b101,  // SYNC, address field = P3..P0
    OP_INTEST  = 3'b110,
    OP_BYPASS  = 3'b111
  } opcode_e;

  localparam int unsigned IR_LEN   = 7;
  localparam int unsigned OP_LEN   = 3;
  localparam int unsigned ADDR_LEN = 4;

  // Full seven-bit codes (don't-care address bits set to 0, except BYPASS,
  // which is all ones as IEEE 1149.1 requires).
  localparam logic [IR_LEN-1:0] INSTR_SAMPLE  = 7'b000_0000;
  localparam logic [IR_LEN-1:0] INSTR_EXTEST  = 7'b001_0000;
  localparam logic [IR_LEN-1:0] INSTR_BISTBSR = 7'b010_0000;
  localparam logic [IR_LEN-1:0] INSTR_BFT     = 7'b011_0001;
  localparam logic [IR_LEN-1:0] INSTR_BST     = 7'b100_0001;
  localparam logic [IR_LEN-1:0] INSTR_SYNC    = 7'b101_0000;  // OR in P3..P0
  localparam logic [IR_LEN-1:0] INSTR_INTEST  = 7'b110_0000;
  localparam logic [IR_LEN-1:0] INSTR_BYPASS  = 7'b111_1111;  // 111XX11, all ones

  // Value the IR capture stage loads in Capture-IR (two LSBs "01").
  localparam logic [IR_LEN-1:0] IR_CAPTURE_VALUE = 7'b000_0001;

  // Decoder outputs, in the order of the decoder tables.
  typedef struct packed {
    logic rst_n;            // RESET (low in Test-Logic-Reset)
    logic tdo_en_n;         // Enable (low while TDO is driven)
    logic sel_ir;           // Select: 1 = IR path to TDO, 0 = DR path
    logic enable_sync;      // Enable_Sync
    logic ir_cap;           // IR_Cap: 1 = capture, 0 = shift
    logic ir_capshf;        // IR_Cap_Shf: IR shift stage clock enable
    logic ir_update;        // IR_Update
    logic bsr_capshf;       // BSR_CapShf: BSR CAP flip-flop clock enable
    logic bsr_shf;          // BSR_Shf: 1 = shift, 0 = capture
    logic bsr_update;       // BSR_Update
    logic byp_shf;          // BYP_Shf
    logic byp_capshf;       // BYP_CapShf
    logic mode_test;        // Mode_Test: pin permission
    logic bist_mode;        // BIST_mode
    logic bist_inst_enable; // BIST_Inst_enable
    logic hold_bilbo;       // Hold_BILBO
    logic b1_bilbo;         // B1_BILBO
    logic b2_bilbo;         // B2_BILBO
    logic run_test_idle;    // Run-Test-Idle
  } tap_ctrl_t;

  // Instructions that are pin-permission (Mode_Test high).
  function automatic logic is_pin_permission(opcode_e op);
    return op inside {OP_EXTEST, OP_INTEST, OP_BISTBSR, OP_BFT, OP_BST, OP_SYNC};
  endfunction

  // Instructions that put the BSR between TDI and TDO.
  function automatic logic selects_bsr(opcode_e op);
    return op inside {OP_SAMPLE, OP_EXTEST, OP_INTEST, OP_BISTBSR};
  endfunction

  // Instructions that put the BILBO (user-defined) register between TDI and TDO.
  function automatic logic selects_bilbo(opcode_e op);
    return op inside {OP_BFT, OP_BST};
  endfunction

endpackage
