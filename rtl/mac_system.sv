// mac_system -- four Multiplier Accumulator Cards on the system buses.
//
// The display system holds four MAC cards that share the 24-bit address
// bus, the 32-bit data bus and the system function bus (Reset, Clock,
// F3..F0).  AB19..AB18 pick the card and AB23..AB21 = 011 enables the card
// decoders, so the host loads, starts and reads each card separately and
// the four can compute at the same time.  On the real bus the selected
// card's tri-state transceivers drive the data bus; here the cards'
// outputs are merged by their output enables (only the addressed card can
// enable), giving db_out / db_oe.  busy has one bit per card, the card
// busy lines.  All timing is that of mac_card.  The four cards and the
// shared buses are the document's; the merge of the data bus is this
// design's stand-in for the tri-state bus.
module mac_system #(
  parameter int unsigned N_CARDS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [23:0]        ab,
  input  logic [3:0]         f,
  input  logic [31:0]        db_in,
  output logic [31:0]        db_out,
  output logic               db_oe,
  output logic [N_CARDS-1:0] busy
);

  logic [31:0]        card_db [N_CARDS];
  logic [N_CARDS-1:0] card_oe;

  for (genvar c = 0; c < N_CARDS; c++) begin : g_card
    mac_card #(.CARD_ID(2'(c))) u_card (
      .clk(clk), .rst(rst), .ab(ab), .f(f), .db_in(db_in),
      .db_out(card_db[c]), .db_oe(card_oe[c]), .busy(busy[c])
    );
  end

  always_comb begin
    db_out = '0;
    for (int c = 0; c < N_CARDS; c++)
      if (card_oe[c]) db_out = db_out | card_db[c];
  end
  assign db_oe = |card_oe;

  a_one_driver : assert property (@(posedge clk) disable iff (rst) $onehot0(card_oe));

endmodule
