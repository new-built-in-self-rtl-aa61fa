// bsr_output_cell: BIST boundary-scan cell for a primary output pin.
//
// A standard output cell with a multiplexer and an XOR gate added in front
// of the CAP flip-flop.
//  * CAP (rising edge of TCK, enabled by capshf): with bist_mode_o high it
//    loads si XOR cout, one stage of the multiple-input signature register
//    (MISR); otherwise it loads cout when shf is low (Capture-DR) or si
//    when shf is high (Shift-DR).  so = CAP.
//  * UPD (falling edge of TCK): loads CAP while update is high
//    (Update-DR); it holds the safe pin value during BIST.
//  * pout, the pin value, is UPD when mode (Mode_Test) is high and the core
//    output cout otherwise.
module bsr_output_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic cout,
  input  logic si,
  input  logic capshf,
  input  logic shf,
  input  logic update,
  input  logic mode,
  input  logic bist_mode_o,
  output logic so,
  output logic pout
);

  logic cap_q, upd_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)          cap_q <= 1'b0;
    else if (capshf) begin
      if (bist_mode_o)    cap_q <= si ^ cout;
      else                cap_q <= shf ? si : cout;
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)     upd_q <= 1'b0;
    else if (update) upd_q <= cap_q;
  end

  assign so   = cap_q;
  assign pout = mode ? upd_q : cout;

endmodule
