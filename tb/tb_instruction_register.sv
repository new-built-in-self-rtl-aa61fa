// tb_instruction_register: self-checking test of the 7-bit instruction register.
// Checks the BYPASS reset value, the capture value 0000001 shifted out LSB
// first, shifting of random instructions (TDI into the MSB), that the
// shadow stage changes only on IR_Update, the split into operation and
// address fields, and the reset by RESET low.
module tb_instruction_register;
  import bist_bs_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, rst_n = 1, tdi = 0;
  logic ir_cap = 0, ir_capshf = 0, ir_update = 0, so;
  logic [IR_LEN-1:0] instr;
  opcode_e op;
  logic [ADDR_LEN-1:0] addr;

  instruction_register dut (.*);
  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [6:0] v, outv, prev;
    #1 trst_n = 0; #1 trst_n = 1;
    chk(instr, 7'h7F, "reset value BYPASS");
    for (int n = 0; n < 40; n++) begin
      v = 7'($urandom);
      prev = instr;
      // capture
      @(negedge tck); ir_cap = 1; ir_capshf = 1;
      @(negedge tck); ir_cap = 0;
      // shift 7 bits: collect so before each rising edge
      for (int i = 0; i < 7; i++) begin
        tdi = v[i];
        #4 outv[i] = so;
        @(negedge tck);
      end
      ir_capshf = 0;
      chk(outv, 7'b0000001, "captured value shifted out");
      chk(instr, prev, "shadow holds while shifting");
      ir_update = 1;
      @(negedge tck); #1 ir_update = 0;
      chk(instr, v, "updated instruction");
      chk(op, v[6:4], "operation field");
      chk(addr, v[3:0], "address field");
    end
    rst_n = 0; @(negedge tck); #1 rst_n = 1;
    chk(instr, 7'h7F, "RESET low gives BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
