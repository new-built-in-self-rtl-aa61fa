// tb_bypass_register: self-checking test of the one-bit bypass register.
// Capture loads 0; shifting delays TDI by exactly one TCK cycle; with
// BYP_CapShf low the register holds.
module tb_bypass_register;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, tdi = 0, byp_capshf = 0, byp_shf = 0, so;
  bypass_register dut (.*);
  always #5 tck = ~tck;

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic prev, held;
    #1 trst_n = 0; #1 trst_n = 1;
    for (int n = 0; n < 20; n++) begin
      // load a 1 through shift, then capture must clear it
      @(negedge tck); byp_capshf = 1; byp_shf = 1; tdi = 1;
      @(negedge tck); chk(so, 1'b1, "shift in 1");
      byp_shf = 0;
      @(negedge tck); chk(so, 1'b0, "capture 0");
      byp_shf = 1;
      prev = 0;
      for (int i = 0; i < 16; i++) begin
        tdi = 1'($urandom);
        @(negedge tck);
        chk(so, tdi, "one-cycle delay");
      end
      held = so;
      byp_capshf = 0; tdi = ~held;
      repeat (3) @(negedge tck);
      chk(so, held, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
