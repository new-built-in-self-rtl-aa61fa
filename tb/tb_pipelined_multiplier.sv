// tb_pipelined_multiplier: self-checking test of the 16-bit pipelined multiplier.
// First the example 1D1C x 009C = 0011BD10, which must appear exactly
// sixteen clocks after the operands; then a new random operand pair every
// clock (including the extreme values), each product checked sixteen
// clocks later.
module tb_pipelined_multiplier;
  localparam int WIDTH = 16, LAT = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [WIDTH-1:0] a = '0, b = '0;
  logic [2*WIDTH-1:0] p;
  logic [2*WIDTH-1:0] expq [$];

  pipelined_multiplier dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    #1 rst_n = 0; #1 rst_n = 1;
    // latency check with the worked example, zeros around it
    @(negedge clk); a = 16'h1D1C; b = 16'h009C;
    @(negedge clk); a = '0; b = '0;
    lat = 1;
    while (p != 32'h0011BD10 && lat < 40) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d, expected %0d", lat, LAT); end
    checks++;
    if (p !== 32'h0011BD10) begin failures++; $display("FAIL example product %h", p); end
    // streaming
    for (int n = 0; n < 2000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if (p !== expq[0]) begin failures++; $display("FAIL product %0d: %h expected %h", n, p, expq[0]); end
        void'(expq.pop_front());
      end
      case (n % 50)
        0: begin a = '1; b = '1; end
        1: begin a = '1; b = 16'h0001; end
        default: begin a = WIDTH'($urandom); b = WIDTH'($urandom); end
      endcase
      expq.push_back(32'(a) * 32'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
