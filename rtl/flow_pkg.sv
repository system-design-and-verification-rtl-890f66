// flow_pkg: types and widths shared by the trigger slice.
//
// A word travelling through a 3D-Flow stack ("flow word") is either an input
// datum that some processor will fetch, or a result that a processor has put
// back into the flow.  Each word carries the bunch-crossing number (tag) of the
// event it belongs to, so that results can still be attributed to an event
// after data reduction.  The 16-bit data width and the 12-bit tag are choices
// of this design; the flow of words and results follows the 3D-Flow scheme.
package flow_pkg;
  localparam int unsigned DATA_W = 16;  // processor word width
  localparam int unsigned TAG_W  = 12;  // bunch-crossing number width

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [TAG_W-1:0]  tag_t;

  // One word on a top or bottom port of a 3D-Flow processor.
  typedef struct packed {
    logic  valid;      // a word is present this cycle
    logic  is_result;  // 1: a result, 0: an input datum
    tag_t  tag;        // bunch crossing of the event
    data_t data;
  } flow_word_t;

  localparam flow_word_t FLOW_IDLE = '0;

  // Candidate leaving the pyramid towards the global decision unit.
  localparam int unsigned SRC_W = 2;  // which of the four inputs of a 4:1 merge
  typedef struct packed {
    logic               valid;
    logic [SRC_W-1:0]   src;
    tag_t               tag;
    data_t              data;
  } cand_t;
endpackage
