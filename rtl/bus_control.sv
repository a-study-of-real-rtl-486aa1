// bus_control -- host command decoder of one MAC card.
//
// The host talks to a card through the system function bus (F3..F0), the
// address bus bits AB16 and AB8, and the card select from card_decoder.
// During a clock cycle in which the card is selected, this block decodes
// one of three operations:
//   F3 = 0, AB16 = 0, F2..F0 = 111   write the data bus into the X (AB8 = 0)
//                                     or Y (AB8 = 1) input memory at AB7..0;
//                                     WRIM selects the address bus for X/Y.
//   F3 = 0, AB16 = 1                  start function F2..F0: MPLOD latches
//                                     the starting addresses from the data
//                                     bus and loads the microprogram counter.
//   F3 = 1, F2..F0 = 000              read the Z output memory at AB7..0 onto
//                                     the data bus (RDIM).
// The decode follows the card's flow chart of read and write operations.
// The flow chart tests "card busy" only before a start; this design also
// ignores writes and reads while the card is busy, because the X, Y and Z
// address selectors are then in use by the microprogram.  Purely
// combinational; the strobes act at the next rising clock edge of the
// blocks they drive.
module bus_control (
  input  logic       card_sel_l,  // card addressed, active low
  input  logic [3:0] f,           // system function bus F3..F0
  input  logic       ab16,        // start / latch control
  input  logic       ab8,         // 0 = X memory, 1 = Y memory
  input  logic       busy,        // microprogram running (RUN-H)
  output logic       wrim,        // X/Y memories addressed by the address bus
  output logic       xwren,       // write X memory this cycle
  output logic       ywren,       // write Y memory this cycle
  output logic       mplod,       // latch starting addresses, start function
  output logic       rdim         // Z addressed by the bus, Z drives data bus
);

  logic sel;
  assign sel = !card_sel_l && !busy;

  always_comb begin
    wrim  = sel && !f[3] && !ab16 && (f[2:0] == 3'b111);
    xwren = wrim && !ab8;
    ywren = wrim && ab8;
    mplod = sel && !f[3] && ab16;
    rdim  = sel && f[3] && (f[2:0] == 3'b000);
  end

endmodule
