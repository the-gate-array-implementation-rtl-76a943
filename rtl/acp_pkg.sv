// acp_pkg - shared widths, select encodings and control bundle of the area
// calculation pipeline (ACP).
//
// Number formats used throughout:
//   * An area is an unsigned binary fraction. The final areas A, B, C and the
//     intermediate areas AI, BI are AREA_W = 8 bits wide, so the largest area,
//     ".FF", stands for one pixel.
//   * Inside the accumulating part of section 1 an area is SUM_W = 12 bits
//     wide: the same fraction with SUM_W - AREA_W extra low-order bits.
//   * The initial areas AS, AA (and BS, BA) are INIT_W = 5 bits wide and are
//     the most significant bits of the 12-bit area, the low bits being zero.
//   * The increments DAJ, DBJ are DELTA_W = 15-bit two's complement numbers
//     whose top SUM_W bits line up with the 12-bit area; the 3 extra low bits
//     keep precision when the increment is multiplied by 2, 3 or 4.
// The widths are the document's; the fraction/sign interpretation is this
// design's reading of them.
package acp_pkg;

  localparam int unsigned AREA_W  = 8;   // AI, BI, A, B, C
  localparam int unsigned SUM_W   = 12;  // AM, SA, adder of NAREA
  localparam int unsigned INIT_W  = 5;   // AS, AA, BS, BA
  localparam int unsigned DELTA_W = 15;  // DAJ, DBJ, DS, D

  // {MSAR, MSBR}: which value the AREAMUX passes on.
  typedef enum logic [1:0] {
    AREA_SA     = 2'b00,  // last value of the area (accumulate)
    AREA_AA_OLD = 2'b01,  // AA registered one clock earlier
    AREA_AA_NEW = 2'b10,  // AA of this clock
    AREA_AS     = 2'b11   // AS of this clock
  } area_sel_e;

  // {ALUS0R, ALUS2R}: which multiple of DS the NDELTA passes on.
  typedef enum logic [1:0] {
    MULT_X1 = 2'b00,
    MULT_X2 = 2'b01,
    MULT_X3 = 2'b10,
    MULT_X4 = 2'b11
  } mult_sel_e;

  // Control inputs shared by both area calculation modules. They are presented
  // one clock ahead of the data they steer and registered inside DELTA.
  typedef struct packed {
    logic msa;    // area select, high bit
    logic msb;    // area select, low bit
    logic msd;    // 1: new DAJ/ABF, 0: DAJ/ABF of the previous clock
    logic alus0;  // multiple select, high bit
    logic alus2;  // multiple select, low bit
  } ctrl_t;

endpackage
