// bist_bsr: the BIST boundary-scan register (BIST-BSR).
//
// N_IN input cells and N_OUT output cells joined into one serial chain:
// TDI -> input cell 0 ... input cell N_IN-1 -> output cell 0 ... output
// cell N_OUT-1 -> so (towards TDO).
// In the normal boundary-scan instructions it is a standard BSR: capture
// (capshf=1, shf=0), shift (capshf=1, shf=1), update (update=1) and pin
// permission (mode=1).
// In BIST mode it becomes the chip's own tester:
//  * Test pattern generator: the UPD flip-flops of the input cells, with
//    bist_mode_i high, shift on each falling edge of TCK from cell i-1 to
//    cell i; cell 0 takes the XOR of the UPD stages selected by TPG_TAPS.
//    That is a Fibonacci LFSR whose pattern drives the core inputs (cin).
//  * Response compactor: with bist_mode_o, capshf and shf high, the CAP
//    flip-flops of all cells shift on each rising edge of TCK, the output
//    cells XOR the core outputs (cout) into the chain, and the first cell
//    takes the XOR of the CAP stages selected by MISR_TAPS instead of TDI.
//    That is an (N_IN+N_OUT)-bit MISR; its contents, the signature, are
//    shifted out through TDO afterwards.
// TPG_TAPS bit i selects UPD stage i; MISR_TAPS bit j selects chain stage
// j (input cells first).  The defaults are primitive polynomials
// x^32+x^22+x^2+x+1 and x^64+x^4+x^3+x+1.  The feedback networks for TPG
// and MISR and their polynomials are this design's choice.
module bist_bsr #(
  parameter int unsigned N_IN  = 32,
  parameter int unsigned N_OUT = 32,
  parameter logic [N_IN-1:0]        TPG_TAPS  = N_IN'(32'h8020_0003),
  parameter logic [N_IN+N_OUT-1:0]  MISR_TAPS = (N_IN+N_OUT)'(64'h8000_0000_0000_000D)
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tdi,
  input  logic [N_IN-1:0]  pin_in,   // chip input pins
  output logic [N_IN-1:0]  cin,      // to the core inputs
  input  logic [N_OUT-1:0] cout,     // from the core outputs
  output logic [N_OUT-1:0] pout,     // chip output pins
  input  logic             capshf,
  input  logic             shf,
  input  logic             update,
  input  logic             mode,
  input  logic             bist_mode_i,
  input  logic             bist_mode_o,
  output logic             so
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0]    chain;   // CAP flip-flop of every cell, in chain order
  logic [N-1:0]    si;
  logic [N_IN-1:0] cin_p;

  assign si[0] = bist_mode_o ? ^(chain & MISR_TAPS) : tdi;
  for (genvar k = 1; k < N; k++) begin : g_si
    assign si[k] = chain[k-1];
  end

  assign cin_p[0] = ^(cin & TPG_TAPS);
  for (genvar k = 1; k < N_IN; k++) begin : g_cinp
    assign cin_p[k] = cin[k-1];
  end

  for (genvar k = 0; k < N_IN; k++) begin : g_in
    bsr_input_cell u_cell (
      .tck, .trst_n,
      .pin         (pin_in[k]),
      .si          (si[k]),
      .cin_p       (cin_p[k]),
      .capshf, .shf, .update, .mode, .bist_mode_i,
      .so          (chain[k]),
      .cin         (cin[k])
    );
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    bsr_output_cell u_cell (
      .tck, .trst_n,
      .cout        (cout[k]),
      .si          (si[N_IN+k]),
      .capshf, .shf, .update, .mode, .bist_mode_o,
      .so          (chain[N_IN+k]),
      .pout        (pout[k])
    );
  end

  assign so = chain[N-1];

endmodule
