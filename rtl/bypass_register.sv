// bypass_register: the single-bit bypass register (BYR).
//
// Clocked on the rising edge of TCK while BYP_CapShf is high: with BYP_Shf
// low it captures 0 (Capture-DR), with BYP_Shf high it takes TDI
// (Shift-DR).  It gives a one-bit path from TDI to TDO under BYPASS.
module bypass_register (
  input  logic tck,
  input  logic trst_n,
  input  logic tdi,
  input  logic byp_capshf,
  input  logic byp_shf,
  output logic so
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)         so <= 1'b0;
    else if (byp_capshf) so <= byp_shf & tdi;
  end

endmodule
