// ucode_rom -- 256 x 32 microprogram memory of the MAC card.
//
// The card builds this memory from four 256 x 8 bipolar PROMs addressed in
// parallel by the microprogram counter; its output word drives every
// control line of the card (see mac_pkg::uword_t).  Here the contents are
// computed at elaboration as a constant by mac_pkg::ucode_image, so the table itself
// appears nowhere as data.  Read is asynchronous, as in the PROMs: the word
// follows the address within the same clock cycle.
module ucode_rom
  import mac_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,
  output uword_t             word
);

  localparam ucode_t ROM = ucode_image();

  assign word = uword_t'(ROM[addr]);

endmodule
