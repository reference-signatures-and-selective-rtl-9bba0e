// bist_pkg: types and constants shared by the low-power BIST blocks.
//
// The BIST applies 8-bit test patterns to a circuit under test (CUT) that
// answers with a 3-bit response; both widths follow the design description.
// Every pattern is classified as redundant (RD, never applied) or
// non-redundant (NRD, applied and checked against a reference signature).
// The table entry that carries this classification, the controller state
// encoding and the tap mask of the pattern generator are this design's own
// choices.
package bist_pkg;

  // Test pattern and test response widths.
  localparam int unsigned PAT_W_DEF  = 8;
  localparam int unsigned RESP_W_DEF = 3;

  // Feedback taps of the 8-bit pattern generator: x^8 + x^6 + x^5 + x^4 + 1,
  // bit i of the mask selects register bit i.
  localparam logic [7:0] TPG_TAPS_DEF = 8'hB8;

  // Test Controller states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for start
    ST_RUN  = 2'd1,  // patterns are classified, NRD ones applied and checked
    ST_PASS = 2'd2,  // every NRD pattern matched its reference signature
    ST_FAIL = 2'd3   // a response differed: the test was discontinued
  } ctrl_state_e;

endpackage
