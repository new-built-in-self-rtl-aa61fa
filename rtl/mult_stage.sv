// mult_stage: one M-16x1 stage of the parallel pipelined multiplier.
//
// Stage STAGE forms the partial product a AND b[STAGE] (the 16x1
// multiplier cell), adds it with a WIDTH-bit adder to bits
// [STAGE+WIDTH-1:STAGE] of the running sum, the carry going to bit
// STAGE+WIDTH, and registers the result together with a and b (the two
// WIDTH-bit register cells) on the rising edge of clk.  Bits of the
// running sum above STAGE+WIDTH-1 are still zero on entry, so the narrow
// adder is exact.  One stage = one clock of latency.
module mult_stage #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned STAGE = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [2*WIDTH-1:0] acc,
  output logic [WIDTH-1:0]   a_q,
  output logic [WIDTH-1:0]   b_q,
  output logic [2*WIDTH-1:0] acc_q
);

  logic [WIDTH-1:0]   pp;
  logic [WIDTH:0]     sum;
  logic [2*WIDTH-1:0] acc_next;

  assign pp  = a & {WIDTH{b[STAGE]}};
  assign sum = {1'b0, acc[STAGE +: WIDTH]} + {1'b0, pp};

  always_comb begin
    acc_next = acc;
    acc_next[STAGE +: WIDTH+1] = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      acc_q <= '0;
    end else begin
      a_q   <= a;
      b_q   <= b;
      acc_q <= acc_next;
    end
  end

endmodule
