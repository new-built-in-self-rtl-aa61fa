// bilbo_register: W-bit built-in logic block observer (BILBO) register.
//
// A row of bilbo_cell flip-flops with its distributed decoder, which turns
// the three control inputs B1, B2 and HOLD into the cell controls:
//   HOLD B1 B2   mode
//    1    x  x   hold (freeze the signature)
//    0    0  0   normal: parallel register d -> q
//    0    1  1   scan: shift register sin -> q[0] -> ... -> q[W-1] = so
//    0    1  0   test pattern generator: autonomous LFSR
//    0    0  1   test response compactor: MISR over d
// In the LFSR and MISR modes the first cell takes the XOR of the stages
// selected by TAPS (bit i = stage i) instead of sin, a Fibonacci
// feedback network.  The default taps are the primitive polynomial
// x^8+x^6+x^5+x^4+1; the width and polynomial are this design's choice.
// All flip-flops clock on the rising edge of clk.
module bilbo_register #(
  parameter int unsigned   W    = 8,
  parameter logic [W-1:0]  TAPS = W'(8'hB8)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         b1,
  input  logic         b2,
  input  logic         hold,
  input  logic         sin,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         so
);

  // Distributed decoder
  logic en, sel_si, xor_d, scan;
  assign en     = !hold;
  assign sel_si = b1 | b2;
  assign xor_d  = b2 & !b1;
  assign scan   = b1 & b2;

  logic [W-1:0] si;
  assign si[0] = scan ? sin : ^(q & TAPS);
  for (genvar k = 1; k < W; k++) begin : g_si
    assign si[k] = q[k-1];
  end

  for (genvar k = 0; k < W; k++) begin : g_cell
    bilbo_cell u_cell (
      .clk, .rst_n,
      .d      (d[k]),
      .si     (si[k]),
      .en, .sel_si, .xor_d,
      .q      (q[k])
    );
  end

  assign so = q[W-1];

endmodule
