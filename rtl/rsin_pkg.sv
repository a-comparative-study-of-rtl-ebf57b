// rsin_pkg: types shared by the resource sharing interconnection networks (RSINs).
// A task is what a processor hands to one or more resources: an identifying tag and
// the number of data beats it takes to transmit. A beat is one word on a bus or a
// network link; the last beat of a task is flagged so that the receiving side knows
// when transmission ends and the connection may be broken. Widths are this design's
// choice; the networks themselves carry any width.
package rsin_pkg;
  localparam int unsigned TAG_W = 8;  // task tag width
  localparam int unsigned LEN_W = 8;  // task length (beats) width

  typedef struct packed {
    logic             valid;  // a beat is on the wire this cycle
    logic             last;   // final beat of the task
    logic [TAG_W-1:0] tag;    // payload: the task tag
  } beat_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [LEN_W-1:0] len;    // beats to transmit, at least 1
  } task_t;

  // Crossbar operating mode: request or reset (one line in the hardware)
  typedef enum logic {MODE_REQ = 1'b0, MODE_RST = 1'b1} mode_e;

  function automatic beat_t beat_or(beat_t a, beat_t b);
    return beat_t'(a | b);
  endfunction
endpackage
