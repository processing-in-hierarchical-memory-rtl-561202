// Shared types and constants of the Pyramid ANNS accelerator.
//
// Node, neighbour and cluster indices are 4-byte words and distances are
// truncated to 4 bytes, as in the SIFT case study the design is sized for
// (128-dimensional features of 1-byte elements). The query-ID width (8 bits,
// enough for a batch of 100) and the "no neighbour" code are this design's own
// choices.
package pyr_pkg;

  localparam int ID_W   = 32;   // node / neighbour / cluster index
  localparam int DIST_W = 32;   // squared-L2 distance, truncated to 4 bytes
  localparam int QID_W  = 8;    // query identifier
  localparam int ELEM_W = 8;    // one feature element (1 byte)

  // Empty slot of a fixed-size neighbour list.
  localparam logic [ID_W-1:0] NID_NONE = '1;

  // One result of a distance calculation, as held in a distance FIFO:
  // query ID, neighbour index and distance.
  typedef struct packed {
    logic [QID_W-1:0]  qid;
    logic [ID_W-1:0]   nid;
    logic [DIST_W-1:0] d2;
  } dist_rec_t;

  // One register of the Top-K priority queue. `expd` marks a node whose
  // neighbours have already been fetched (used only by the graph search).
  typedef struct packed {
    logic              vld;
    logic              expd;
    logic [ID_W-1:0]   id;
    logic [DIST_W-1:0] d2;
  } pq_entry_t;

endpackage
