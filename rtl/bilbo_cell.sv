// bilbo_cell: one flip-flop of a BILBO register (BILBO cell1 type).
//
// The cell takes three control signals already decoded by its register's
// distributed decoder:  en (low = hold), sel_si (take the serial input
// rather than the parallel input d) and xor_d (XOR d into the serial
// input, the MISR stage).  Rising-edge flip-flop with asynchronous reset.
//   en sel_si xor_d   q+
//    0   x      x     q          hold
//    1   0      x     d          normal register
//    1   1      0     si         scan / pattern generation
//    1   1      1     si ^ d     signature compaction
module bilbo_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic si,
  input  logic en,
  input  logic sel_si,
  input  logic xor_d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= sel_si ? (si ^ (xor_d & d)) : d;
  end

endmodule
