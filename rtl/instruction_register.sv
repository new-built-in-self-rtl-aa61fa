// instruction_register: seven-bit IEEE 1149.1 instruction register.
//
// A shift stage and a shadow (latched) stage.  The shift stage is clocked
// on the rising edge of TCK when IR_Cap_Shf is high: with IR_Cap high it
// loads the capture value (two LSBs 01), otherwise it shifts towards TDO,
// TDI entering the MSB and the LSB leaving on so.  The shadow stage loads
// the shift stage on the falling edge of TCK while IR_Update is high, and
// is reset to BYPASS (all ones) by TRST_n or by RESET (low in
// Test-Logic-Reset) on a falling edge.  The shadow output is split into the
// three-bit operation field (decoder input) and the four-bit address field
// (P3..P0 for SYNC).
module instruction_register
  import bist_bs_pkg::*;
(
  input  logic                  tck,
  input  logic                  trst_n,
  input  logic                  rst_n,      // RESET from the decoder
  input  logic                  tdi,
  input  logic                  ir_cap,
  input  logic                  ir_capshf,
  input  logic                  ir_update,
  output logic                  so,
  output logic [IR_LEN-1:0]     instr,
  output opcode_e               op,
  output logic [ADDR_LEN-1:0]   addr
);

  logic [IR_LEN-1:0] shift_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)        shift_q <= IR_CAPTURE_VALUE;
    else if (ir_capshf) shift_q <= ir_cap ? IR_CAPTURE_VALUE : {tdi, shift_q[IR_LEN-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)        instr <= INSTR_BYPASS;
    else if (!rst_n)    instr <= INSTR_BYPASS;
    else if (ir_update) instr <= shift_q;
  end

  assign so   = shift_q[0];
  assign op   = opcode_e'(instr[IR_LEN-1 -: OP_LEN]);
  assign addr = instr[ADDR_LEN-1:0];

endmodule
