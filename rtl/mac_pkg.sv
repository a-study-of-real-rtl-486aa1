// mac_pkg -- types, constants and microprogram contents shared by the
// Multiplier Accumulator Card (MAC).
//
// The card is microprogrammed: a 256 x 32 microprogram memory drives every
// control line of the datapath, one microword per 100 ns clock.  The
// microword fields and their order are those of the card's microcode
// tables: byte 0 holds RUN-H, TRILEN-H, MULCKEN-H, MULAEN-H, XLINC-H,
// XLLOD-L, XHINC-H, XHLOD-L (bit 0 first); byte 1 holds the Y and Z counter
// controls in the same pattern; byte 2 holds ALUF0-3, ALUC0-L, ALUM0,
// ZWRITE-H and ZLAEN-H.  Byte 3 is unused.  Signals named -L are active low.
//
// The microprogram itself is computed by ucode_image() from a description
// of each subroutine's address walk.  Each multiply-accumulate term takes
// two microwords:
//   word A  TRILEN/MULCKEN: X and Y operands are clocked into the
//           multiplier; the X and Y counters step to the next term; the
//           previous term's ALU result is written to Z (ZWRITE) and, if that
//           term closed a Z element, the Z counter steps.
//   word B  MULAEN/ZLAEN: the product is clocked into the product latch and
//           the current Z word into the Z latch.
// A routine is one load word (all LOD-L low), two words per term, and one
// closing word that writes the last result; it then falls into a halt
// word (RUN-H low), where the counter stops.  Address 0, where reset leaves
// the counter, is a halt word too.  An 8-row by 4-term routine is thus 66
// words, i.e. 6.6 us plus the command cycle = 6.7 us at 100 ns, and the
// 4 x 4 vector transformation 34 words (3.5 us), matching the card's
// published times.  The word layout and timing rhythm follow the card's
// tables; the exact microprogram is this design's own.
package mac_pkg;

  localparam int unsigned UADDR_W = 8;    // 256-word microprogram memory
  localparam int unsigned UWORD_W = 32;   // four 256 x 8 PROMs
  localparam int unsigned MEM_AW  = 8;    // 256-word X, Y and Z memories
  localparam int unsigned XY_W    = 16;   // X and Y memories are 256 x 16
  localparam int unsigned Z_W     = 32;   // Z memory is 256 x 32

  // Microword, declared MSB first so that bit 0 is RUN-H.
  typedef struct packed {
    logic [7:0] spare;      // bits 31..24, unused PROM byte
    logic zlaen_h;          // 23 latch Z output for the ALU
    logic zwrite_h;         // 22 write the ALU output into Z
    logic alum0;            // 21 ALU mode, 1 = logic
    logic aluc0_l;          // 20 ALU carry in, active low
    logic [3:0] aluf;       // 19..16 ALUF3..ALUF0
    logic zhlod_l;          // 15
    logic zhinc_h;          // 14
    logic zllod_l;          // 13
    logic zlinc_h;          // 12
    logic yhlod_l;          // 11
    logic yhinc_h;          // 10
    logic yllod_l;          // 9
    logic ylinc_h;          // 8
    logic xhlod_l;          // 7
    logic xhinc_h;          // 6
    logic xllod_l;          // 5
    logic xlinc_h;          // 4
    logic mulaen_h;         // 3 clock product into the product latch
    logic mulcken_h;        // 2 clock X and Y into the multiplier
    logic trilen_h;         // 1 multiplier LSP pins used as Y input
    logic run_h;            // 0 microprogram counter counts
  } uword_t;

  // Function codes F2..F0 for a started function.
  typedef enum logic [2:0] {
    FN_DOT   = 3'd0,  // eight 4-term dot products
    FN_PERSP = 3'd1,  // sixteen pairs of products
    FN_WSUM  = 3'd2,  // two 4 x 4 weighted sums
    FN_XFORM = 3'd3   // 1x4 vector times 4x4 matrix
  } func_e;

  // 74S181 select codes used by the microprogram (M = 0, no carry).
  localparam logic [3:0] ALU_PASS_A = 4'b0000;  // F = A
  localparam logic [3:0] ALU_A_PLUS_B = 4'b1001;  // F = A plus B

  // One counter nibble action.
  typedef enum logic [1:0] {
    CNT_HOLD = 2'd0,
    CNT_INC  = 2'd1,
    CNT_LOD  = 2'd2
  } cnt_e;

  typedef struct packed {
    cnt_e hi;
    cnt_e lo;
  } step_t;

  localparam step_t STEP_NONE = '{hi: CNT_HOLD, lo: CNT_HOLD};

  // Entry addresses of the four routines.  Address 0 is the halt word, and
  // a halt word follows each routine (one spare address between routines).
  localparam int unsigned TERMS_DOT   = 32;
  localparam int unsigned TERMS_PERSP = 32;
  localparam int unsigned TERMS_WSUM  = 32;
  localparam int unsigned TERMS_XFORM = 16;
  localparam int unsigned ENTRY_DOT   = 1;
  localparam int unsigned ENTRY_PERSP = ENTRY_DOT + 2 * TERMS_DOT + 3;
  localparam int unsigned ENTRY_WSUM  = ENTRY_PERSP + 2 * TERMS_PERSP + 3;
  localparam int unsigned ENTRY_XFORM = ENTRY_WSUM + 2 * TERMS_WSUM + 3;

  // Clock cycles from the start command to the card going idle.
  function automatic int unsigned run_cycles(func_e f);
    case (f)
      FN_XFORM: return 2 * TERMS_XFORM + 3;
      default:  return 2 * TERMS_DOT + 3;
    endcase
  endfunction

  function automatic int unsigned n_terms(func_e f);
    case (f)
      FN_DOT:   return TERMS_DOT;
      FN_PERSP: return TERMS_PERSP;
      FN_WSUM:  return TERMS_WSUM;
      default:  return TERMS_XFORM;
    endcase
  endfunction

  // Address walk of term k of routine f: how the X and Y counters move after
  // it, how the Z counter moves after its result is written, and whether it
  // opens a new Z element (ALU passes the product instead of accumulating).
  typedef struct packed {
    step_t xs;
    step_t ys;
    step_t zs;
    logic  first;
  } walk_t;

  function automatic walk_t term_walk(func_e f, int unsigned k);
    int unsigned j, i;
    step_t xs, ys, zs;
    logic first;
    xs = STEP_NONE;
    ys = STEP_NONE;
    zs = STEP_NONE;
    first = 1'b0;
    case (f)
      // Z(r,0) = sum_j X(r,j) * Y(j,0), r = 0..7, j = 0..3
      FN_DOT: begin
        j = k % 4;
        first = (j == 0);
        if (j < 3) begin
          xs.lo = CNT_INC;
          ys.hi = CNT_INC;
        end else begin
          xs.hi = CNT_INC;
          xs.lo = CNT_LOD;
          ys.hi = CNT_LOD;
          zs.hi = CNT_INC;
        end
      end
      // Z(i,c) = X(i,c) * Y(i,0), i = 0..15, c = 0..1
      FN_PERSP: begin
        first = 1'b1;
        if (k % 2 == 0) begin
          xs.lo = CNT_INC;
          zs.lo = CNT_INC;
        end else begin
          xs.hi = CNT_INC;
          xs.lo = CNT_LOD;
          ys.hi = CNT_INC;
          zs.hi = CNT_INC;
          zs.lo = CNT_LOD;
        end
      end
      // Z(s,0) = sum_i sum_j X(i,j) * Y(4s+i,j), s = 0..1, i, j = 0..3
      FN_WSUM: begin
        j = k % 4;
        i = (k / 4) % 4;
        first = (k % 16 == 0);
        if (j < 3) begin
          xs.lo = CNT_INC;
          ys.lo = CNT_INC;
        end else begin
          xs.lo = CNT_LOD;
          ys.lo = CNT_LOD;
          xs.hi = (i < 3) ? CNT_INC : CNT_LOD;
          ys.hi = CNT_INC;
          if (i == 3) zs.hi = CNT_INC;
        end
      end
      // Z(0,c) = sum_j X(0,j) * Y(j,c), c = 0..3, j = 0..3
      default: begin
        j = k % 4;
        first = (j == 0);
        if (j < 3) begin
          xs.lo = CNT_INC;
          ys.hi = CNT_INC;
        end else begin
          xs.lo = CNT_LOD;
          ys.hi = CNT_LOD;
          ys.lo = CNT_INC;
          zs.lo = CNT_INC;
        end
      end
    endcase
    return '{xs: xs, ys: ys, zs: zs, first: first};
  endfunction

  function automatic uword_t idle_word();
    uword_t w;
    w = '0;
    w.xllod_l = 1'b1;
    w.xhlod_l = 1'b1;
    w.yllod_l = 1'b1;
    w.yhlod_l = 1'b1;
    w.zllod_l = 1'b1;
    w.zhlod_l = 1'b1;
    w.aluc0_l = 1'b1;
    return w;
  endfunction

  function automatic uword_t apply_x(uword_t w_in, step_t s);
    uword_t w;
    w = w_in;
    w.xhinc_h = (s.hi == CNT_INC);
    w.xhlod_l = (s.hi != CNT_LOD);
    w.xlinc_h = (s.lo == CNT_INC);
    w.xllod_l = (s.lo != CNT_LOD);
    return w;
  endfunction

  function automatic uword_t apply_y(uword_t w_in, step_t s);
    uword_t w;
    w = w_in;
    w.yhinc_h = (s.hi == CNT_INC);
    w.yhlod_l = (s.hi != CNT_LOD);
    w.ylinc_h = (s.lo == CNT_INC);
    w.yllod_l = (s.lo != CNT_LOD);
    return w;
  endfunction

  function automatic uword_t apply_z(uword_t w_in, step_t s);
    uword_t w;
    w = w_in;
    w.zhinc_h = (s.hi == CNT_INC);
    w.zhlod_l = (s.hi != CNT_LOD);
    w.zlinc_h = (s.lo == CNT_INC);
    w.zllod_l = (s.lo != CNT_LOD);
    return w;
  endfunction

  // Write word for a finished term: ZWRITE with the term's ALU function and
  // its Z step.
  function automatic uword_t add_write(uword_t w_in, logic first, step_t zs);
    uword_t w;
    w = w_in;
    w.zwrite_h = 1'b1;
    w.aluf = first ? ALU_PASS_A : ALU_A_PLUS_B;
    return apply_z(w, zs);
  endfunction

  typedef logic [UWORD_W-1:0] ucode_t [2**UADDR_W];

  // Lays out one routine from address 'base' over the image 'rom_in'.
  function automatic ucode_t emit_routine(ucode_t rom_in, func_e f, int unsigned base);
    ucode_t rom;
    uword_t w;
    walk_t t;
    step_t pzs;
    logic pfirst;
    int unsigned a;
    rom = rom_in;
    a = base;
    // load word: every counter takes its starting address
    w = idle_word();
    w.run_h = 1'b1;
    w.xllod_l = 1'b0;
    w.xhlod_l = 1'b0;
    w.yllod_l = 1'b0;
    w.yhlod_l = 1'b0;
    w.zllod_l = 1'b0;
    w.zhlod_l = 1'b0;
    rom[a] = w;
    a++;
    pzs = STEP_NONE;
    pfirst = 1'b0;
    for (int unsigned k = 0; k < n_terms(f); k++) begin
      t = term_walk(f, k);
      // word A
      w = idle_word();
      w.run_h = 1'b1;
      w.trilen_h = 1'b1;
      w.mulcken_h = 1'b1;
      w = apply_x(w, t.xs);
      w = apply_y(w, t.ys);
      if (k != 0) w = add_write(w, pfirst, pzs);
      rom[a] = w;
      a++;
      // word B
      w = idle_word();
      w.run_h = 1'b1;
      w.mulaen_h = 1'b1;
      w.zlaen_h = 1'b1;
      rom[a] = w;
      a++;
      pzs = t.zs;
      pfirst = t.first;
    end
    // closing word writes the last term; the next word is the halt word
    w = idle_word();
    w.run_h = 1'b1;
    rom[a] = add_write(w, pfirst, pzs);
    return rom;
  endfunction

  // Full microprogram memory image.  Address 0 and every word after a
  // routine's closing word is the halt word, so the counter stops there.
  function automatic ucode_t ucode_image();
    ucode_t rom;
    for (int unsigned a = 0; a < 2**UADDR_W; a++) rom[a] = idle_word();
    rom = emit_routine(rom, FN_DOT, ENTRY_DOT);
    rom = emit_routine(rom, FN_PERSP, ENTRY_PERSP);
    rom = emit_routine(rom, FN_WSUM, ENTRY_WSUM);
    rom = emit_routine(rom, FN_XFORM, ENTRY_XFORM);
    return rom;
  endfunction

  // Function-code PROM (C12): F2..F0 to entry address.  Unused codes point
  // at the halt word.
  function automatic logic [UADDR_W-1:0] entry_of(logic [2:0] f);
    case (f)
      3'd0:    return UADDR_W'(ENTRY_DOT);
      3'd1:    return UADDR_W'(ENTRY_PERSP);
      3'd2:    return UADDR_W'(ENTRY_WSUM);
      3'd3:    return UADDR_W'(ENTRY_XFORM);
      default: return '0;
    endcase
  endfunction

endpackage
