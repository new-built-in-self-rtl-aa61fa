// tb_bist_bs_multiplier: end-to-end test of the testable multiplier through
// its test access port, at the default sizes (16-bit multiplier, 64 BSR
// cells, two 8-bit BILBO groups).  The testbench plays the external test
// master: it drives TRST_n, TMS, TCK, TDI and Chip_CK and reads TDO.
// Sequence and what is checked:
//   1. normal mode: 1D1C x 009C = 0011BD10 on the product pins sixteen
//      Chip_CK clocks after the operands, then random operand pairs;
//   2. IR capture value 0000001 and BYPASS (one-bit TDI->TDO delay);
//   3. SAMPLE/PRELOAD: pins and core outputs captured and read out;
//   4. EXTEST: shifted values driven onto the product pins;
//   5. INTEST: an operand pair applied from the BSR, the core clocked by
//      Chip_CK, the product captured and read out;
//   6. single-clock BIST, run twice (8 patterns = 128 clocks, then N_PAT):
//      PRELOAD seed, SYNC with d = 16, BIST-BSR twice,
//      16 TCK cycles per pattern in Run-Test/Idle, signature read out and
//      compared with a vector model of TPG, core and MISR; the output pins
//      must hold their safe preload values, the core clock must follow
//      TCK and the PCU carry must pulse once every 16 cycles;
//   7. BILBO sessions: SYNC with d = 1, BFT (G1 pattern generator, G2
//      compactor), then BST with the roles swapped; G1/G2 signatures are
//      read out and compared with a model.  The combinational blocks around
//      the BILBO groups are stand-ins written here (C1 constant-driven,
//      C2 = 3*x + 1).
// Each mechanism is counted; one that never happened counts as a failure.
module tb_bist_bs_multiplier;
  import bist_bs_pkg::*;
  localparam int WIDTH = 16, BW = 8, NBSR = 4 * WIDTH;
  localparam int N_PAT = 200;
  localparam logic [31:0] TPG_TAPS  = 32'h8020_0003;
  localparam logic [63:0] MISR_TAPS = 64'h8000_0000_0000_000D;
  localparam logic [7:0]  BTAPS = 8'hB8;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_normal = 0, n_bypass = 0, n_ircap = 0, n_sample = 0, n_extest = 0, n_intest = 0;
  int n_sync = 0, n_carry = 0, n_bist_bsr = 0, n_bft = 0, n_bst = 0, n_safe = 0;

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, chip_ck = 0, chip_rst_n = 1;
  logic tdo, tdo_oe_n;
  logic [WIDTH-1:0] a_pin = '0, b_pin = '0;
  logic [2*WIDTH-1:0] p_pin;
  logic [BW-1:0] g1_d, g1_q, g2_d, g2_q;
  logic bist_inst_enable, cut_ck, enable_sync, bist_mode, div_run, pcu_carry;
  logic chip_run = 1;

  bist_bs_multiplier dut (.*);

  always #10 tck = ~tck;
  always #7 if (chip_run) chip_ck = ~chip_ck;

  // stand-in combinational blocks around the BILBO groups
  logic [BW-1:0] c1_in = 8'h5A;
  assign g2_d = c1_in ^ {c1_in[3:0], c1_in[7:4]};   // C1
  assign g1_d = g2_q * 8'd3 + 8'd1;                  // C2

  always @(negedge tck) #5 if (pcu_carry && bist_mode) n_carry++;

  initial begin
    repeat (200000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // one TCK cycle: TMS/TDI set after the falling edge, TDO read before the rising edge
  task automatic tick(input logic tms_v, input logic tdi_v, output logic tdo_v);
    @(negedge tck);
    #1 tms = tms_v; tdi = tdi_v;
    #5 tdo_v = tdo;
    @(posedge tck);
  endtask

  task automatic idle(int n);
    logic dummy;
    for (int i = 0; i < n; i++) tick(0, 0, dummy);
  endtask

  // from Run-Test/Idle: load the IR, return the captured bits; end in Run-Test/Idle
  task automatic load_ir(input logic [6:0] v, output logic [6:0] cap);
    logic t;
    tick(1, 0, t); tick(1, 0, t); tick(0, 0, t); tick(0, 0, t);
    for (int i = 0; i < 7; i++) begin
      tick(i == 6, v[i], t);
      cap[i] = t;
    end
    tick(1, 0, t); tick(0, 0, t);
  endtask

  // from Run-Test/Idle: shift n bits of 'in' (bit 0 first); end in Run-Test/Idle
  task automatic shift_dr(input int n, input logic [127:0] in, output logic [127:0] out);
    logic t;
    out = '0;
    tick(1, 0, t); tick(0, 0, t); tick(0, 0, t);
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, in[i], t);
      out[i] = t;
    end
    tick(1, 0, t); tick(0, 0, t);
  endtask

  // bit-reverse the first n bits (the chain's last cell comes out first)
  function automatic logic [127:0] rev(logic [127:0] v, int n);
    logic [127:0] r = '0;
    for (int i = 0; i < n; i++) r[i] = v[n-1-i];
    return r;
  endfunction

  function automatic logic [7:0] lfsr8(logic [7:0] q);
    return {q[6:0], ^(q & BTAPS)};
  endfunction

  // One single-clock BIST run, from Run-Test/Idle back to Run-Test/Idle:
  // PRELOAD the seed, SYNC with d = 16, BIST-BSR twice, n_pat*16 cycles in
  // Run-Test/Idle, read the signature and compare it with a vector model.
  task automatic bist_bsr_session(input int n_pat, input logic [63:0] chain_m);
    logic [6:0] cap;
    logic [127:0] o, expv;
    logic t;
    load_ir(INSTR_SAMPLE, cap);           // PRELOAD
    shift_dr(NBSR, rev(128'(chain_m), NBSR), o);
    load_ir(INSTR_SYNC | 7'b000_0000, cap);   // P = 0000: d = 16
    idle(4);
    checks++;
    if (!(enable_sync && div_run)) begin failures++; $display("FAIL SYNC did not switch the clock"); end
    for (int i = 0; i < 10; i++) begin
      #3;
      checks++;
      if (cut_ck !== tck) begin failures++; $display("FAIL core clock is not TCK"); end
      @(negedge tck);
    end
    n_sync++;
    load_ir(INSTR_BISTBSR, cap);
    load_ir(INSTR_BISTBSR, cap);          // let the seed response settle
    // Run-Test/Idle for n_pat*16 cycles (the last one leaves the state)
    n_carry = 0;
    for (int i = 0; i < n_pat * 16 - 1; i++) begin
      tick(0, 0, t);
      if (i % 97 == 5) begin
        checks++;
        if (p_pin !== chain_m[63:32]) begin failures++; $display("FAIL output pins not held during BIST"); end
        else n_safe++;
      end
    end
    // model: capture j (j = 1..n_pat) compacts the product of pattern max(j-2, 0)
    begin
      logic [63:0] m;
      logic [31:0] pat;
      m = chain_m;
      pat = chain_m[31:0];
      for (int j = 1; j <= n_pat; j++) begin
        logic [63:0] nx;
        logic [31:0] resp;
        if (j >= 3) pat = {pat[30:0], ^(pat & TPG_TAPS)};
        resp = 32'(pat[15:0]) * 32'(pat[31:16]);
        nx[0] = ^(m & MISR_TAPS);
        for (int k = 1; k < 64; k++) nx[k] = m[k-1];
        nx[63:32] ^= resp;
        m = nx;
      end
      expv = 128'(m);
    end
    shift_dr(NBSR, '0, o);        // leaves Run-Test/Idle here, via Capture-DR
    chk(o[63:0], rev(expv, NBSR), $sformatf("BIST-BSR signature after %0d patterns", n_pat));
    chk(n_carry, n_pat, "PCU carry pulses, one per 16 cycles");
    n_bist_bsr++;
    $display("BIST-BSR signature after %0d patterns: %h", n_pat, o[63:0]);
  endtask

  initial begin
    logic [6:0] cap;
    logic [127:0] o, seed, expv;
    logic [7:0] g1_m, g2_m;
    logic t;

    // reset
    #1 trst_n = 0; chip_rst_n = 0;
    #20 trst_n = 1; chip_rst_n = 1;
    for (int i = 0; i < 5; i++) tick(1, 0, t);
    tick(0, 0, t);   // Run-Test/Idle

    // 1. normal mode
    @(negedge chip_ck); a_pin = 16'h1D1C; b_pin = 16'h009C;
    @(negedge chip_ck); a_pin = 16'h0000; b_pin = 16'h0000;
    repeat (15) @(negedge chip_ck);
    chk(p_pin, 32'h0011BD10, "normal mode 1D1C x 009C after 16 clocks");
    n_normal++;
    for (int i = 0; i < 20; i++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom);
      @(negedge chip_ck); a_pin = x; b_pin = y;
      @(negedge chip_ck);
      repeat (15) @(negedge chip_ck);
      chk(p_pin, 32'(x) * 32'(y), "normal mode product");
      n_normal++;
    end

    // 2. IR capture and BYPASS
    load_ir(INSTR_BYPASS, cap);
    chk(cap, 7'b0000001, "IR capture value");
    n_ircap++;
    seed = {$urandom, $urandom, $urandom, $urandom};
    shift_dr(40, seed, o);
    chk(o[39:1], seed[38:0], "BYPASS one-bit delay");
    chk(o[0], 0, "BYPASS captures 0");
    n_bypass++;

    // 3. SAMPLE: capture pins and core outputs while the core runs
    a_pin = 16'h1234; b_pin = 16'h00FF;
    repeat (20) @(negedge chip_ck);
    chip_run = 0;                   // freeze the core so the capture is exact
    load_ir(INSTR_SAMPLE, cap);
    shift_dr(NBSR, '0, o);
    expv = {64'h0, 32'(32'h1234 * 32'h00FF), b_pin, a_pin};
    chk(o[63:0], rev(expv, NBSR), "SAMPLE capture");
    n_sample++;

    // 4. EXTEST: drive the product pins from the BSR
    load_ir(INSTR_EXTEST, cap);
    seed = rev({64'h0, 32'hCAFE_F00D, 32'h0}, NBSR);
    shift_dr(NBSR, seed, o);     // cell k receives seed bit N-1-k
    chk(p_pin, 32'hCAFE_F00D, "EXTEST drives output pins");
    n_extest++;

    // 5. INTEST: apply operands from the BSR, clock the core by Chip_CK
    load_ir(INSTR_INTEST, cap);
    seed = rev({64'h0, 32'h0, 16'h009C, 16'h1D1C}, NBSR);
    shift_dr(NBSR, seed, o);
    chip_run = 1;
    repeat (20) @(negedge chip_ck);
    chip_run = 0;
    shift_dr(NBSR, '0, o);
    chk(rev(o, NBSR) >> 32, 32'h0011BD10, "INTEST product captured");
    chk(p_pin, 32'h0, "INTEST output pins held");
    n_intest++;
    chip_run = 1;

    // 6. single-clock BIST of the multiplier as one combinational block:
    //    first the short run of 128 clocks in Run-Test/Idle (8 patterns),
    //    then a long run of N_PAT patterns from another seed
    bist_bsr_session(8, {32'h0000_0400, 32'h0000_0001});
    bist_bsr_session(N_PAT, {32'h0F0F_3C3C, 32'h9D1C_A09C});

    // 7. BILBO sessions (SYNC with d = 1 so the BILBO groups run on TCK every cycle)
    for (int i = 0; i < 5; i++) tick(1, 0, t);
    tick(0, 0, t);
    load_ir(INSTR_SYNC | 7'b000_1111, cap);
    idle(3);
    load_ir(INSTR_BFT, cap);
    @(negedge tck); #2;        // decoder latch has seen the new instruction
    checks++;
    if (!bist_inst_enable) begin failures++; $display("FAIL BIST_Inst_enable low under BFT"); end
    // TDI enters G1 stage 0 and moves on to G2: after 16 shifts G2 holds the
    // first 8 bits (bit i in stage 7-i), G1 the last 8.
    shift_dr(2 * BW, 128'h3CA5, o);
    g2_m = 8'(rev(128'(8'hA5), 8));
    g1_m = 8'(rev(128'(8'h3C), 8));
    chk({g2_q, g1_q}, {g2_m, g1_m}, "BILBO seeds");
    // session 1: G1 pattern generator, G2 compactor of C1, 100 cycles
    for (int i = 0; i < 99; i++) tick(0, 0, t);
    for (int i = 0; i < 100; i++) begin
      g2_m = lfsr8(g2_m) ^ (c1_in ^ {c1_in[3:0], c1_in[7:4]});
      g1_m = lfsr8(g1_m);
    end
    shift_dr(2 * BW, 128'h5AC3, o);
    chk(o[15:0], rev({g2_m, g1_m}, 16), "BFT signature (G2 then G1)");
    n_bft++;
    g2_m = 8'(rev(128'(8'hC3), 8));
    g1_m = 8'(rev(128'(8'h5A), 8));
    // the rising edge that leaves Run-Test/Idle for the IR scan still runs
    // one BFT step on the new seeds
    g2_m = lfsr8(g2_m) ^ (c1_in ^ {c1_in[3:0], c1_in[7:4]});
    g1_m = lfsr8(g1_m);
    // session 2: BST, G2 pattern generator, G1 compactor of C2
    load_ir(INSTR_BST, cap);
    for (int i = 0; i < 99; i++) tick(0, 0, t);
    for (int i = 0; i < 100; i++) begin
      logic [7:0] c2;
      c2 = g2_m * 8'd3 + 8'd1;
      g1_m = lfsr8(g1_m) ^ c2;
      g2_m = lfsr8(g2_m);
    end
    shift_dr(2 * BW, '0, o);
    chk(o[15:0], rev({g2_m, g1_m}, 16), "BST signature (G2 then G1)");
    n_bst++;

    // every mechanism must have happened
    begin
      int cnt [12];
      string nm [12] = '{"normal", "bypass", "ir_capture", "sample", "extest", "intest",
                         "sync_clock_switch", "pcu_carry", "bist_bsr", "bft", "bst", "safe_outputs"};
      cnt = '{n_normal, n_bypass, n_ircap, n_sample, n_extest, n_intest, n_sync, n_carry,
              n_bist_bsr, n_bft, n_bst, n_safe};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %s: %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
