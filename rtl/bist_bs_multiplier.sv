// bist_bs_multiplier: testable 16-bit parallel pipelined multiplier with a
// BIST boundary-scan architecture (IEEE 1149.1 TAP plus built-in self-test).
//
// Parts and wiring:
//  * TAP controller = tap_fsm (TCK, TMS, TRST_n) + tapc_decoder, which
//    turns the state and the instruction's operation field into the
//    control signals of all test registers.
//  * instruction_register (7 bits: operation + address field), the
//    bypass_register, the BIST-BSR (bist_bsr: 32 input cells for the
//    operands A and B, 32 output cells for the product P), and a
//    user-defined data register made of two BILBO groups G1 and G2
//    (bilbo_register, G1 first in the scan chain).
//  * pcu: SYNC instruction, programmable counter and clock multiplexer M1;
//    the core registers and the BILBO registers are clocked by its cut_ck
//    (Chip_CK in normal operation, TCK after SYNC).
//  * Core: pipelined_multiplier (16 stages, result sixteen clocks after
//    the operands).  Input cell k feeds A[k] (k < 16) or B[k-16]; output
//    cell k observes P[k].
// TDI -> selected register -> TDO.  The IR is selected in the IR column of
// the state diagram; otherwise the BSR for SAMPLE/PRELOAD, EXTEST, INTEST
// and BIST-BSR, the BILBO chain for BFT and BST, the bypass register for
// BYPASS and SYNC.  TDO is re-timed on the falling edge of TCK and
// tdo_oe_n (the decoder's active-low Enable) marks when it is driven.
// The combinational blocks around G1/G2 (C1 feeding G2, C2 from G2 to G1,
// C3 from G1) are outside this design: the BILBO parallel inputs and
// outputs and BIST_Inst_enable, which cuts those paths in BIST, are ports.
// Main BIST flow (single test session): PRELOAD a seed into the BSR, load
// SYNC with P = 0000 (d = 16), load BIST-BSR, stay in Run-Test/Idle for
// the test length, then shift the signature out of the BSR under BIST-BSR.
module bist_bs_multiplier
  import bist_bs_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,   // multiplier operand width
  parameter int unsigned BILBO_W = 8     // width of each BILBO group
) (
  // Test access port
  input  logic                 tck,
  input  logic                 tms,
  input  logic                 tdi,
  input  logic                 trst_n,
  output logic                 tdo,
  output logic                 tdo_oe_n,
  // System clock and reset
  input  logic                 chip_ck,
  input  logic                 chip_rst_n,
  // Multiplier pins
  input  logic [WIDTH-1:0]     a_pin,
  input  logic [WIDTH-1:0]     b_pin,
  output logic [2*WIDTH-1:0]   p_pin,
  // BILBO user-defined register, system side
  input  logic [BILBO_W-1:0]   g1_d,     // from C2
  output logic [BILBO_W-1:0]   g1_q,     // to C3
  input  logic [BILBO_W-1:0]   g2_d,     // from C1
  output logic [BILBO_W-1:0]   g2_q,     // to C2
  output logic                 bist_inst_enable,
  // Observation
  output logic                 cut_ck,
  output logic                 enable_sync,
  output logic                 bist_mode,
  output logic                 div_run,     // core clock switched to TCK
  output logic                 pcu_carry    // PCU carry: one capture in d cycles
);

  localparam int unsigned N_IN  = 2 * WIDTH;
  localparam int unsigned N_OUT = 2 * WIDTH;

  tap_state_e state, next_state;
  tap_ctrl_t  ctrl;
  opcode_e    op;
  logic [ADDR_LEN-1:0] addr;
  logic [IR_LEN-1:0]   instr;    // full instruction, kept for observation in simulation

  logic ir_so, byr_so, bsr_so, g1_so, g2_so, dr_so;
  logic dr_capshf, dr_shf, bist_mode_o, bist_mode_i, hold_bilbo_in;
  logic sy_enable;   // internal flag, DivRun follows it half a cycle later

  logic [N_IN-1:0]  cin;
  logic [N_OUT-1:0] cout, pout;

  tap_fsm u_fsm (
    .tck, .trst_n, .tms,
    .state, .next_state
  );

  tapc_decoder u_dec (
    .tck, .trst_n,
    .state, .next_state, .op,
    .ctrl
  );

  instruction_register u_ir (
    .tck, .trst_n,
    .rst_n     (ctrl.rst_n),
    .tdi,
    .ir_cap    (ctrl.ir_cap),
    .ir_capshf (ctrl.ir_capshf),
    .ir_update (ctrl.ir_update),
    .so        (ir_so),
    .instr, .op, .addr
  );

  bypass_register u_byr (
    .tck, .trst_n, .tdi,
    .byp_capshf (ctrl.byp_capshf),
    .byp_shf    (ctrl.byp_shf),
    .so         (byr_so)
  );

  pcu u_pcu (
    .tck, .trst_n, .chip_ck,
    .rst_n         (ctrl.rst_n),
    .enable_sync   (ctrl.enable_sync),
    .run_test_idle (ctrl.run_test_idle),
    .bist_mode     (ctrl.bist_mode),
    .p             (addr),
    .bsr_capshf    (ctrl.bsr_capshf),
    .bsr_shf       (ctrl.bsr_shf),
    .hold_bilbo    (ctrl.hold_bilbo),
    .cut_ck,
    .dr_capshf, .dr_shf, .bist_mode_o, .bist_mode_i, .hold_bilbo_in,
    .sy_enable, .div_run,
    .carry         (pcu_carry)
  );

  bist_bsr #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .tck, .trst_n, .tdi,
    .pin_in      ({b_pin, a_pin}),
    .cin,
    .cout,
    .pout,
    .capshf      (dr_capshf),
    .shf         (dr_shf),
    .update      (ctrl.bsr_update),
    .mode        (ctrl.mode_test),
    .bist_mode_i,
    .bist_mode_o,
    .so          (bsr_so)
  );

  pipelined_multiplier #(.WIDTH(WIDTH)) u_core (
    .clk   (cut_ck),
    .rst_n (chip_rst_n),
    .a     (cin[WIDTH-1:0]),
    .b     (cin[N_IN-1:WIDTH]),
    .p     (cout)
  );

  assign p_pin = pout;

  // BILBO groups: G1 takes (B1,B2), G2 the permuted pair (B2,B1).
  bilbo_register #(.W(BILBO_W)) u_g1 (
    .clk  (cut_ck), .rst_n (chip_rst_n),
    .b1   (ctrl.b1_bilbo), .b2 (ctrl.b2_bilbo), .hold (hold_bilbo_in),
    .sin  (tdi),
    .d    (g1_d), .q (g1_q), .so (g1_so)
  );

  bilbo_register #(.W(BILBO_W)) u_g2 (
    .clk  (cut_ck), .rst_n (chip_rst_n),
    .b1   (ctrl.b2_bilbo), .b2 (ctrl.b1_bilbo), .hold (hold_bilbo_in),
    .sin  (g1_so),
    .d    (g2_d), .q (g2_q), .so (g2_so)
  );

  // TDO multiplexer and falling-edge re-timing
  always_comb begin
    if (selects_bsr(op))        dr_so = bsr_so;
    else if (selects_bilbo(op)) dr_so = g2_so;
    else                        dr_so = byr_so;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= ctrl.sel_ir ? ir_so : dr_so;
  end

  assign tdo_oe_n         = ctrl.tdo_en_n;
  assign bist_inst_enable = ctrl.bist_inst_enable;
  assign enable_sync      = ctrl.enable_sync;
  assign bist_mode        = ctrl.bist_mode;

endmodule
