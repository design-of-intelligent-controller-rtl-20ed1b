// fuzzy_pkg: shared sizes and term names of the fuzzy temperature controller.
//
// The controller works on 4-bit crisp values and 3-bit fuzzy labels. Each
// universe of discourse (error, change of error, control output) is split
// into seven linguistic terms, described by a 21-bit membership word: seven
// 3-bit fields, field k in bits [3k+2:3k], each the width of term k in
// input steps. The terms tile the universe from 0 upwards in label order.
// The 4-bit data, 3-bit label and 21-bit membership sizes follow the
// controller's published port list; the seven-term split and the width
// coding of the membership word are this design's choice.
package fuzzy_pkg;

  localparam int unsigned DATA_W  = 4;   // crisp data width
  localparam int unsigned NTERMS  = 7;   // linguistic terms per universe
  localparam int unsigned FIELD_W = 3;   // bits per term width field
  localparam int unsigned LABEL_W = 3;   // fuzzy label width
  localparam int unsigned MEMB_W  = NTERMS * FIELD_W;  // 21

  // Linguistic terms, in the order they tile a universe.
  typedef enum logic [LABEL_W-1:0] {
    NB = 3'd0,  // negative big
    NM = 3'd1,  // negative medium
    NS = 3'd2,  // negative small
    ZE = 3'd3,  // zero
    PS = 3'd4,  // positive small
    PM = 3'd5,  // positive medium
    PB = 3'd6   // positive big
  } term_e;

  // A symmetric 16-step partition: widths 2,2,2,4,2,2,2 (term 0 in the
  // low field). ZE covers codes 6..9, centred on the offset zero code 8.
  localparam logic [MEMB_W-1:0] MEMB_DEFAULT =
    {3'd2, 3'd2, 3'd2, 3'd4, 3'd2, 3'd2, 3'd2};

endpackage
