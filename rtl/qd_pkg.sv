// Shared types and constants of the quadrature decoder/counter interface.
//
// COUNT_W is the width of the position counter and latch (16 bits, read as
// two bytes), BUS_W the width of the processor data bus (8 bits). The two
// state enums carry the state encodings of the filter's recognizer FSM and of
// the read-inhibit FSM; the encodings are the ones of their state tables, so
// the excitation equations derived from those tables apply bit for bit.
package qd_pkg;

  localparam int unsigned COUNT_W = 16;
  localparam int unsigned BUS_W   = 8;

  // Recognizer states {y2,y1,y0}. S1/S3/S5: one, two, three-or-more zeros
  // sampled in a row; S2/S4/S6: the same for ones; S0: nothing sampled yet.
  typedef enum logic [2:0] {
    REC_S0 = 3'b000,
    REC_S1 = 3'b001,
    REC_S2 = 3'b010,
    REC_S3 = 3'b011,
    REC_S4 = 3'b100,
    REC_S5 = 3'b101,
    REC_S6 = 3'b110
  } rec_state_e;

  // Inhibit states {y1,y0}. IDLE: latch free; HIGH_RD: a high-byte read has
  // started; LOW_RD: the low byte is being read. The inh output equals y0.
  typedef enum logic [1:0] {
    INH_IDLE    = 2'b00,
    INH_HIGH_RD = 2'b01,
    INH_LOW_RD  = 2'b11
  } inh_state_e;

endpackage
