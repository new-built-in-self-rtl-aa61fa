// tb_bsr_input_cell: self-checking test of the BIST boundary-scan input cell.
// Random control and data each cycle; a reference model of the cell
// (CAP on the rising edge, UPD on the falling edge, output multiplexer)
// predicts so and cin.
module tb_bsr_input_cell;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1;
  logic pin = 0, si = 0, cin_p = 0, capshf = 0, shf = 0, update = 0, mode = 0, bist_mode_i = 0;
  logic so, cin;
  logic cap_m = 0, upd_m = 0;
  int n_tpg = 0;

  bsr_input_cell dut (.*);
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
      // drive new inputs mid low phase (after the falling edge)
      pin = 1'($urandom); si = 1'($urandom); cin_p = 1'($urandom);
      capshf = 1'($urandom); shf = 1'($urandom); update = 1'($urandom);
      mode = 1'($urandom); bist_mode_i = 1'($urandom);
      @(posedge tck);
      if (capshf) cap_m = shf ? si : pin;
      #1;
      checks++;
      if (so !== cap_m) begin failures++; $display("FAIL so at %0d", n); end
      @(negedge tck);
      if (bist_mode_i) begin upd_m = cin_p; n_tpg++; end
      else if (update) upd_m = cap_m;
      #1;
      checks++;
      if (cin !== (mode ? upd_m : pin)) begin failures++; $display("FAIL cin at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
