// pipelined_multiplier: WIDTH x WIDTH unsigned parallel pipelined multiplier.
//
// WIDTH mult_stage blocks (M-16x1) in a chain.  Stage i adds a*b[i]*2^i
// to the running sum and passes a, b and the sum to stage i+1 through
// its registers, so the product of the operands presented before a rising
// edge of clk appears on p WIDTH rising edges later (sixteen clocks for
// the default WIDTH = 16), and a new operand pair can enter on every
// edge.  Unsigned operands, full 2*WIDTH-bit product, asynchronous reset.
module pipelined_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  logic [WIDTH-1:0]   a_s   [WIDTH+1];
  logic [WIDTH-1:0]   b_s   [WIDTH+1];
  logic [2*WIDTH-1:0] acc_s [WIDTH+1];

  assign a_s[0]   = a;
  assign b_s[0]   = b;
  assign acc_s[0] = '0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    mult_stage #(.WIDTH(WIDTH), .STAGE(i)) u_stage (
      .clk, .rst_n,
      .a     (a_s[i]),
      .b     (b_s[i]),
      .acc   (acc_s[i]),
      .a_q   (a_s[i+1]),
      .b_q   (b_s[i+1]),
      .acc_q (acc_s[i+1])
    );
  end

  assign p = acc_s[WIDTH];

endmodule
