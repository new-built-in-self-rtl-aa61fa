// tb_bsr_output_cell: self-checking test of the BIST boundary-scan output cell.
// Random control and data each cycle; a reference model predicts so
// (CAP: capture, shift, or MISR stage si^cout) and pout.
module tb_bsr_output_cell;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1;
  logic cout = 0, si = 0, capshf = 0, shf = 0, update = 0, mode = 0, bist_mode_o = 0;
  logic so, pout;
  logic cap_m = 0, upd_m = 0;

  bsr_output_cell dut (.*);
  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 trst_n = 0; #1 trst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      cout = 1'($urandom); si = 1'($urandom);
      capshf = 1'($urandom); shf = 1'($urandom); update = 1'($urandom);
      mode = 1'($urandom); bist_mode_o = 1'($urandom);
      #1;
      checks++;
      if (pout !== (mode ? upd_m : cout)) begin failures++; $display("FAIL pout at %0d", n); end
      @(posedge tck);
      if (capshf) cap_m = bist_mode_o ? (si ^ cout) : (shf ? si : cout);
      #1;
      checks++;
      if (so !== cap_m) begin failures++; $display("FAIL so at %0d", n); end
      @(negedge tck);
      if (update) upd_m = cap_m;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
