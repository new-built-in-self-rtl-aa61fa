// tb_tap_fsm: self-checking test of the TAP state machine.
// Drives 2000 random TMS values and compares every state with a reference
// transition table written out independently (IEEE 1149.1 diagram, state
// codes 0..15), then checks that five TMS=1 clocks reach Test-Logic-Reset
// from every state and that TRST_n resets asynchronously.
module tb_tap_fsm;
  import bist_bs_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state, next_state;
  // reference: {next if tms=0, next if tms=1}, indexed by state code
  int ref0 [16] = '{2, 3, 2, 3, 14, 12, 2, 6, 10, 11, 10, 11, 12, 12, 10, 12};
  int ref1 [16] = '{5, 5, 1, 0, 15, 7, 1, 4, 13, 13, 9, 8, 7, 7, 9, 15};
  // note: ref0/ref1 entry k is the next state code from state k
  int exp_state;

  tap_fsm dut (.*);
  always #5 tck = ~tck;

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int e, string what);
    checks++;
    if (int'(state) !== e) begin
      failures++;
      $display("FAIL %s: state=%0d expected=%0d", what, state, e);
    end
  endtask

  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    check(15, "after trst");
    exp_state = 15;
    for (int i = 0; i < 2000; i++) begin
      @(negedge tck);
      tms = 1'($urandom);
      exp_state = tms ? ref1[exp_state] : ref0[exp_state];
      @(posedge tck); #1;
      check(exp_state, "random walk");
    end
    for (int s = 0; s < 16; s++) begin
      // walk to a state with the reference table, then 5x TMS=1
      for (int j = 0; j < 5; j++) begin
        @(negedge tck);
        tms = 1;
        exp_state = ref1[exp_state];
        @(posedge tck);
      end
      #1 check(15, "five TMS=1");
      for (int j = 0; j < s + 1; j++) begin
        @(negedge tck);
        tms = 1'($urandom);
        exp_state = tms ? ref1[exp_state] : ref0[exp_state];
        @(posedge tck);
      end
    end
    // asynchronous reset in the middle of a cycle
    @(negedge tck); tms = 0;
    @(posedge tck); @(posedge tck); #2;
    trst_n = 0; #1;
    check(15, "async trst");
    trst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
