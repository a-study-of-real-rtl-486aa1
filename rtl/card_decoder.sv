// card_decoder -- card select decoder of one MAC card (chip B15).
//
// A 3-to-8 line decoder (74138 type) sees the system address bus through the
// card's inverting bus receivers.  Its three enables come from AB23..AB21
// and decode only the pattern 011; its select inputs are the inverted AB18
// and AB19 with the third select input held high, so the four cards' codes
// appear on outputs Y7 (pin 7), Y6 (pin 9), Y5 (pin 10) and Y4 (pin 11):
//   AB19 AB18 = 00 -> card 0, 01 -> card 1, 10 -> card 2, 11 -> card 3.
// Each card uses the output of its own number; CARD_ID picks it.  All
// outputs are active low and purely combinational.  The enable pattern,
// the AB18/AB19 coding and the pin numbers are the card's; wiring the third
// select input high is inferred from those pin numbers.
module card_decoder #(
  parameter logic [1:0] CARD_ID = 2'd0
) (
  input  logic [23:0] ab,        // system address bus, active high
  output logic [7:0]  dec_l,     // decoder outputs Y0..Y7, active low
  output logic        card_sel_l // this card addressed, active low
);

  logic       g1, g2a_l, g2b_l;  // decoder enables after the bus receivers
  logic [2:0] sel;               // C B A select inputs

  always_comb begin
    g1    = ~ab[23];
    g2a_l = ~ab[22];
    g2b_l = ~ab[21];
    sel   = {1'b1, ~ab[19], ~ab[18]};
    dec_l = '1;
    if (g1 && !g2a_l && !g2b_l) dec_l[sel] = 1'b0;
  end

  // card n answers on output 7 - n
  assign card_sel_l = dec_l[3'd7 - {1'b0, CARD_ID}];

endmodule
