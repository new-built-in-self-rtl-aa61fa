// pcu: programmable control unit of the single-clock test approach.
//
// It lets the BIST boundary-scan register test a pipelined core as one
// combinational block: each test pattern is held, and each response
// captured, only once every d TCK cycles, d being the core's sequential
// depth, so every pattern reaches the core outputs before it is compacted.
//  * SYNC: while Enable_Sync and Run-Test-Idle are both high, the address
//    field P3..P0 of the SYNC instruction (P = ~(d-1), so P = 0000 gives
//    d = 16) is stored and loaded into the four-bit programmable counter
//    PC.  Enable_Sync also sets the SyEnable flag on the rising edge of
//    TCK, and SyEnable sets DivRun on the following falling edge.  DivRun
//    switches the clock multiplexer M1 from Chip_CK to TCK, so the core
//    registers run on TCK.  Both flags stay set until RESET (Test-Logic-
//    Reset) or TRST_n.
//  * While SyEnable and BIST_mode are high, PC counts up on every rising
//    edge of TCK; its carry (PC = 1111) is high one cycle in d, after which
//    PC reloads P.  DR_CapShf, DR_Shf and BIST_mode_O pass the decoder's
//    BSR_CapShf, BSR_Shf and BIST_mode only in the carry cycle, and
//    HOLD_BILBO_in holds the BILBO registers in the other d-1 cycles.
//    Without SYNC these signals pass unchanged.
//  * BIST_mode_I is BIST_mode_O registered on the rising edge of TCK, half a
//    cycle after the falling-edge decoder latch; the input cells' UPD
//    flip-flops, clocked on the falling edge, therefore advance the pattern
//    half a cycle after each capture.
// M1 is written as a plain clock multiplexer (behaviour of the switch, no
// glitch-free switching logic, which the design leaves open).
module pcu (
  input  logic       tck,
  input  logic       trst_n,
  input  logic       chip_ck,
  input  logic       rst_n,           // RESET from the decoder
  input  logic       enable_sync,
  input  logic       run_test_idle,
  input  logic       bist_mode,
  input  logic [3:0] p,               // P3..P0 from the instruction address field
  input  logic       bsr_capshf,
  input  logic       bsr_shf,
  input  logic       hold_bilbo,
  output logic       cut_ck,          // clock of the core registers
  output logic       dr_capshf,
  output logic       dr_shf,
  output logic       bist_mode_o,
  output logic       bist_mode_i,
  output logic       hold_bilbo_in,
  output logic       sy_enable,
  output logic       div_run,
  output logic       carry
);

  logic [3:0] p_q, pc_q;
  logic       pass;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)           sy_enable <= 1'b0;
    else if (!rst_n)       sy_enable <= 1'b0;
    else if (enable_sync)  sy_enable <= 1'b1;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)      div_run <= 1'b0;
    else if (!rst_n)  div_run <= 1'b0;
    else              div_run <= sy_enable;
  end

  assign cut_ck = div_run ? tck : chip_ck;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      p_q  <= 4'h0;
      pc_q <= 4'h0;
    end else if (enable_sync && run_test_idle) begin
      p_q  <= p;
      pc_q <= p;
    end else if (sy_enable && bist_mode) begin
      pc_q <= carry ? p_q : pc_q + 4'd1;
    end
  end

  assign carry = (pc_q == 4'hF);
  assign pass  = !sy_enable || carry;

  assign dr_capshf     = bsr_capshf & (pass | !bist_mode);
  assign dr_shf        = bsr_shf    & (pass | !bist_mode);
  assign bist_mode_o   = bist_mode  & pass;
  assign hold_bilbo_in = hold_bilbo | (bist_mode & !pass);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) bist_mode_i <= 1'b0;
    else         bist_mode_i <= bist_mode_o;
  end

endmodule
