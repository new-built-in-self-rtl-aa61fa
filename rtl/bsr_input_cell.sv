// bsr_input_cell: BIST boundary-scan cell for a primary input pin.
//
// A standard input cell (CAP flip-flop, UPD flip-flop, output multiplexer)
// with one added multiplexer in front of the UPD flip-flop.
//  * CAP (rising edge of TCK, enabled by capshf): loads the pin value when
//    shf is low (Capture-DR) or the serial input si when shf is high
//    (Shift-DR, and the BIST shift of the MISR chain).  so = CAP.
//  * UPD (falling edge of TCK): with bist_mode_i high it loads cin_p, the
//    core-side value of the previous input cell, so the UPD flip-flops of
//    all input cells form the shift register of the test pattern
//    generator; otherwise it loads CAP while update is high (Update-DR).
//  * cin, the value fed to the core, is UPD when mode (Mode_Test) is high
//    and the pin otherwise.  cin also goes to cin_p of the next cell.
module bsr_input_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic pin,
  input  logic si,
  input  logic cin_p,
  input  logic capshf,
  input  logic shf,
  input  logic update,
  input  logic mode,
  input  logic bist_mode_i,
  output logic so,
  output logic cin
);

  logic cap_q, upd_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)     cap_q <= 1'b0;
    else if (capshf) cap_q <= shf ? si : pin;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)          upd_q <= 1'b0;
    else if (bist_mode_i) upd_q <= cin_p;
    else if (update)      upd_q <= cap_q;
  end

  assign so  = cap_q;
  assign cin = mode ? upd_q : pin;

endmodule
