// tb_bilbo_register: self-checking test of the 8-bit BILBO register.
// Random (B1, B2, HOLD) and data every cycle; a vector-level model of the
// five modes (hold, normal, scan, LFSR pattern generation, MISR) predicts
// q and so after every rising edge.  Each mode must occur at least once.
module tb_bilbo_register;
  localparam int W = 8;
  localparam logic [W-1:0] TAPS = 8'hB8;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};
  logic clk = 0, rst_n = 1, b1 = 0, b2 = 0, hold = 0, sin = 0;
  logic [W-1:0] d = '0, q, q_m = '0;
  logic so;

  bilbo_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      b1 = 1'($urandom); b2 = 1'($urandom); hold = ($urandom % 4) == 0;
      sin = 1'($urandom); d = W'($urandom);
      @(posedge clk);
      if (hold)            begin seen[0]++; end
      else if (!b1 && !b2) begin seen[1]++; q_m = d; end
      else if (b1 && b2)   begin seen[2]++; q_m = {q_m[W-2:0], sin}; end
      else if (b1)         begin seen[3]++; q_m = {q_m[W-2:0], ^(q_m & TAPS)}; end
      else                 begin seen[4]++; q_m = {q_m[W-2:0], ^(q_m & TAPS)} ^ d; end
      #1;
      checks++;
      if (q !== q_m || so !== q_m[W-1]) begin
        failures++;
        $display("FAIL cycle %0d mode b1=%b b2=%b hold=%b: q=%h expected %h", n, b1, b2, hold, q, q_m);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL mode %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
