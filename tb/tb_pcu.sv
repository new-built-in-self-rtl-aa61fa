// tb_pcu: self-checking test of the programmable control unit.
// Checks: Chip_CK reaches the core until SYNC; SyEnable rises on the TCK
// rising edge after Enable_Sync, DivRun on the following falling edge, and
// the core clock then follows TCK; for every d = 1..16 (P = ~(d-1)) the
// carry and the gated DR_CapShf / BIST_mode_O pulse exactly once every d
// cycles while BIST_mode is high, HOLD_BILBO_in is high in the other d-1,
// BIST_mode_I follows BIST_mode_O half a cycle later; without SYNC the
// controls pass unchanged; RESET clears the flags.
module tb_pcu;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, chip_ck = 0, rst_n = 1;
  logic enable_sync = 0, run_test_idle = 0, bist_mode = 0;
  logic [3:0] p = '0;
  logic bsr_capshf = 0, bsr_shf = 0, hold_bilbo = 0;
  logic cut_ck, dr_capshf, dr_shf, bist_mode_o, bist_mode_i, hold_bilbo_in;
  logic sy_enable, div_run, carry;

  pcu dut (.*);
  always #5 tck = ~tck;
  always #3.5 chip_ck = ~chip_ck;

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int pulses, holds, mis_i;
    #1 trst_n = 0; #1 trst_n = 1;
    // before SYNC: controls pass, core on chip clock
    @(negedge tck); bist_mode = 1; bsr_capshf = 1; bsr_shf = 1;
    repeat (3) begin
      #1 chk({dr_capshf, dr_shf, bist_mode_o, hold_bilbo_in}, 4'b1110, "pass-through");
      chk(cut_ck, chip_ck, "chip clock to core");
      #2 chk(cut_ck, chip_ck, "chip clock to core");
      @(negedge tck);
    end
    bist_mode = 0;
    for (int d = 1; d <= 16; d++) begin
      // SYNC in Run-Test/Idle with P = ~(d-1)
      @(negedge tck); enable_sync = 1; run_test_idle = 1; p = ~4'(d - 1);
      @(posedge tck); #1;
      chk(sy_enable, 1, "SyEnable after rising edge");
      @(negedge tck); #1;
      chk(div_run, 1, "DivRun after falling edge");
      enable_sync = 0; run_test_idle = 0;
      #1 chk(cut_ck, tck, "TCK to core (low)");
      #5 chk(cut_ck, tck, "TCK to core (high)");
      // BIST run of 5*d cycles
      @(negedge tck); bist_mode = 1; hold_bilbo = 0;
      pulses = 0; holds = 0; mis_i = 0;
      for (int c = 0; c < 5 * d; c++) begin
        #4;   // just before the rising edge
        if (dr_capshf) pulses++;
        if (hold_bilbo_in) holds++;
        checks++;
        if ((dr_capshf !== bist_mode_o) || (dr_capshf !== carry) || (dr_shf !== carry) || (hold_bilbo_in === carry)) begin
          failures++; $display("FAIL gating d=%0d cycle %0d", d, c);
        end
        // carry exactly at cycles d-1, 2d-1, ...
        checks++;
        if (carry !== ((c % d) == d - 1)) begin failures++; $display("FAIL carry d=%0d cycle %0d", d, c); end
        @(posedge tck); #1;
        if (bist_mode_i !== ((c % d) == d - 1)) mis_i++;
        @(negedge tck);
      end
      chk(pulses, 5, $sformatf("capture pulses for d=%0d", d));
      chk(holds, 5 * (d - 1), $sformatf("hold cycles for d=%0d", d));
      chk(mis_i, 0, "BIST_mode_I half a cycle after BIST_mode_O");
      bist_mode = 0;
    end
    // RESET clears the flags
    @(negedge tck); rst_n = 0;
    @(posedge tck); @(negedge tck); #1 rst_n = 1;
    chk({sy_enable, div_run}, 0, "RESET clears SyEnable and DivRun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
