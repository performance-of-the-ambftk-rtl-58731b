// am_pkg: constants and types shared by the associative memory board.
// The layer count (8), the width of one layer word (18 cells), the pattern
// count of one chip (8000) and the 16-bit payload of a link word follow the
// design description. The link word's extra control flag (standing for the
// link's control characters) and the road word layout are choices of this
// design.
package am_pkg;
  localparam int unsigned NLAYER      = 8;
  localparam int unsigned SS_W        = 18;
  localparam int unsigned NPATT_CHIP  = 8000;
  localparam int unsigned LINK_DATA_W = 16;

  // Superstrip word of one layer and a full pattern (one word per layer).
  typedef logic [SS_W-1:0]   ss_t;
  typedef ss_t [NLAYER-1:0]  pattern_t;

  // Word on a link at 100 MHz: 16 data bits plus a control flag.
  // ctrl=1 with data=EOE_CODE marks the end of an event.
  typedef struct packed {
    logic                   ctrl;
    logic [LINK_DATA_W-1:0] data;
  } link_word_t;

  localparam logic [LINK_DATA_W-1:0] EOE_CODE = 16'hE0E0;

  function automatic link_word_t eoe_word();
    link_word_t w;
    w.ctrl = 1'b1;
    w.data = EOE_CODE;
    return w;
  endfunction

  function automatic logic is_eoe(link_word_t w);
    return w.ctrl && (w.data == EOE_CODE);
  endfunction
endpackage
