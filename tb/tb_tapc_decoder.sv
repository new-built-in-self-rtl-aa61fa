// tb_tapc_decoder: self-checking test of the TAP controller decoder.
// For every instruction (operation field) and every one of the sixteen
// states it presents (state, next_state, op) for one TCK cycle and compares
// the latched control bus, just before the following rising edge, with the
// decoder truth table.  The table is written here column by column in the
// signal order RESET, Enable, Select, Enable_Sync | IR_Cap, IR_Cap_Shf,
// IR_Update | BSR_CapShf, BSR_Shf, BSR_Update | BYP_Shf, BYP_CapShf |
// Mode_Test, BIST_mode, BIST_Inst_enable | Hold, B1, B2 | Run-Test-Idle,
// with "x" for don't care.  It also checks that TRST_n clears the latches.
module tb_tapc_decoder;
  import bist_bs_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1;
  tap_state_e state = TEST_RESET, next_state = TEST_RESET;
  opcode_e op = OP_BYPASS;
  tap_ctrl_t ctrl;
  // Test-Logic-Reset row, the same for every instruction
  localparam string TLR_ROW = "011000000000000x000";

  tapc_decoder dut (.*);
  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected row: 19 characters '0', '1' or 'x'.
  function automatic string row(opcode_e o, int s);
    string g, ir, bsr, byp, mt, bilbo, rti;
    bit bsr_sel  = o inside {OP_SAMPLE, OP_EXTEST, OP_INTEST, OP_BISTBSR};
    bit bist     = o inside {OP_BISTBSR, OP_BFT, OP_BST};
    bit pinperm  = !(o inside {OP_SAMPLE, OP_BYPASS});
    if (s == 15) return TLR_ROW;
    // RESET Enable Select Enable_Sync
    g = (s == 2) ? "10" : (s == 10) ? "10" : "11";
    g = {g, (s >= 8 || s == 4) ? "1" : "0", (o == OP_SYNC) ? "1" : "0"};
    ir = (s == 14) ? "110" : (s == 10) ? "010" : (s == 13) ? "001" : "000";
    bsr = "000";
    if (bsr_sel && s == 2) bsr = "110";
    if (bsr_sel && s == 6 && o != OP_BISTBSR) bsr = "100";
    if (bsr_sel && s == 5) bsr = "001";
    if (bist && s == 12) bsr = "110";
    byp = "00";
    if (o == OP_BYPASS && s == 2) byp = "11";
    if (o == OP_BYPASS && s == 6) byp = "01";
    mt = {pinperm ? "1" : "0", (bist && s == 12) ? "1" : "0", bist ? "1" : "0"};
    if (o == OP_BFT || o == OP_BST) begin
      if (s == 12)     bilbo = (o == OP_BFT) ? "010" : "001";
      else if (s == 2) bilbo = "011";
      else             bilbo = "111";
    end else bilbo = "x00";
    rti = (s == 12) ? "1" : "0";
    return {g, ir, bsr, byp, mt, bilbo, rti};
  endfunction

  task automatic compare(string exp, string what);
    logic [18:0] got;
    got = ctrl;
    checks++;
    for (int i = 0; i < 19; i++) begin
      if (exp[i] != "x" && (exp[i] == "1") != got[18-i]) begin
        failures++;
        $display("FAIL %s: bit %0d got %b expected %s", what, i, got, exp);
        break;
      end
    end
  endtask

  initial begin
    string e;
    #1 trst_n = 0;
    #1;
    compare(TLR_ROW, "trst");
    #1 trst_n = 1;
    for (int o = 0; o < 8; o++) begin
      for (int s = 0; s < 16; s++) begin
        // before the rising edge: the state being entered
        @(negedge tck); #4;
        next_state = tap_state_e'(s);
        op = opcode_e'(o);
        @(posedge tck); #1;
        state = tap_state_e'(s);
        @(negedge tck); #4;   // just before the next rising edge
        e = row(opcode_e'(o), s);
        compare(e, $sformatf("op=%0d state=%0d", o, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
