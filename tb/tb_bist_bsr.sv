// tb_bist_bsr: self-checking test of the 64-cell BIST boundary-scan register.
// The TAP control signals are driven directly.  Checks, against a model of
// the chain written here:
//  * shift: 64 random bits in at TDI come out at so 64 cycles later;
//  * capture: pins and core outputs captured and shifted out in chain order;
//  * update with Mode_Test: the shifted pattern appears on cin and pout;
//  * BIST: with a combinational stand-in core (cout = product of the two
//    16-bit halves of cin), N_CYC cycles of TPG (input UPD LFSR, falling
//    edge) and MISR (all CAP flip-flops, rising edge) give the signature
//    predicted by a vector-level LFSR/MISR model, and the TPG visits
//    N_CYC distinct patterns.
module tb_bist_bsr;
  localparam int N_IN = 32, N_OUT = 32, N = 64, N_CYC = 300;
  localparam logic [31:0] TPG_TAPS  = 32'h8020_0003;
  localparam logic [63:0] MISR_TAPS = 64'h8000_0000_0000_000D;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, tdi = 0;
  logic [N_IN-1:0] pin_in = '0, cin;
  logic [N_OUT-1:0] cout, pout;
  logic capshf = 0, shf = 0, update = 0, mode = 0, bist_mode_i = 0, bist_mode_o = 0, so;

  bist_bsr dut (.*);
  always #5 tck = ~tck;
  assign cout = cin[15:0] * cin[31:16];   // stand-in core

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // shift the whole chain: load 'in' (bit 0 first), return what came out
  task automatic shift_chain(input logic [63:0] in, output logic [63:0] out);
    capshf = 1; shf = 1;
    for (int i = 0; i < N; i++) begin
      tdi = in[i];
      #4 out[i] = so;        // so before the rising edge
      @(negedge tck);
    end
    capshf = 0; shf = 0;
  endtask

  initial begin
    logic [63:0] a, b, got, chain_m, fb_in;
    logic [31:0] tpg_m, prod;
    int distinct;
    #1 trst_n = 0; #1 trst_n = 1;
    @(negedge tck);
    // shift test
    a = {$urandom, $urandom}; b = {$urandom, $urandom};
    shift_chain(a, got);
    shift_chain(b, got);
    chk(got, a, "shift through 64 cells");
    // capture test
    pin_in = $urandom;
    @(negedge tck); capshf = 1; shf = 0;
    @(negedge tck); capshf = 0;
    chain_m = {cout, pin_in};
    a = {$urandom, $urandom};
    shift_chain(a, got);
    // first bit out is the last cell
    for (int i = 0; i < N; i++) fb_in[i] = chain_m[N-1-i];
    chk(got, fb_in, "capture then shift out");
    // the chain now holds a reversed: cell k holds a[N-1-k]
    for (int i = 0; i < N; i++) chain_m[i] = a[N-1-i];
    update = 1; @(negedge tck); update = 0;
    mode = 1; #1;
    chk(cin, chain_m[31:0], "update drives core inputs");
    chk(pout, chain_m[63:32], "update drives output pins");
    // BIST session
    tpg_m = chain_m[31:0];
    distinct = 0;
    bist_mode_o = 1; capshf = 1; shf = 1;
    for (int c = 0; c < N_CYC; c++) begin
      @(posedge tck);
      #1 bist_mode_i = 1;
      prod = tpg_m[15:0] * tpg_m[31:16];
      begin
        logic [63:0] nx;
        nx[0] = ^(chain_m & MISR_TAPS);
        for (int k = 1; k < N; k++) nx[k] = chain_m[k-1];
        nx[63:32] = nx[63:32] ^ prod;
        chain_m = nx;
      end
      @(negedge tck);
      tpg_m = {tpg_m[30:0], ^(tpg_m & TPG_TAPS)};
      #1;
      checks++;
      if (cin !== tpg_m) begin failures++; $display("FAIL TPG step %0d", c); end
      else distinct++;
    end
    bist_mode_o = 0; bist_mode_i = 0; capshf = 0; shf = 0;
    shift_chain('0, got);
    for (int i = 0; i < N; i++) fb_in[i] = chain_m[N-1-i];
    chk(got, fb_in, "BIST signature");
    chk(64'(distinct), 64'(N_CYC), "TPG steps seen");
    $display("signature %h", chain_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
