// tcam_pkg: types and constants shared by the partitioned TCAM lookup engine.
//
// KEY_W is the search word width: 32 bits for an IPv4 destination address, as in
// the design this follows. TAG_W (a request identifier returned with every
// result) and ADDR_W (the global entry address width, enough for 65536 entries)
// are this design's own choices.
package tcam_pkg;

  localparam int unsigned KEY_W  = 32;
  localparam int unsigned TAG_W  = 8;
  localparam int unsigned ADDR_W = 16;

  // One entry write: global entry address, stored value, care mask
  // (1 = compare the bit, 0 = don't care) and entry valid (0 deletes it).
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [KEY_W-1:0]  value;
    logic [KEY_W-1:0]  care;
    logic              valid;
  } tcam_wr_t;

  // A search word travelling down the partitions.
  typedef struct packed {
    logic             valid;
    logic [KEY_W-1:0] key;
    logic [TAG_W-1:0] tag;
  } search_t;

  // A lookup result: hit and global address of the highest-priority
  // (lowest-address, i.e. longest-prefix) matching entry.
  typedef struct packed {
    logic              valid;
    logic              hit;
    logic [ADDR_W-1:0] addr;
    logic [TAG_W-1:0]  tag;
  } result_t;

  // Input selection of a configurable sub-partition.
  typedef enum logic [1:0] {
    SRC_PREV = 2'd0,  // word of the segment above (same partition)
    SRC_BUF1 = 2'd1,  // Buffer-1: first segment of partition 2
    SRC_BUF2 = 2'd2   // Buffer-2: first segment of partition 3
  } src_sel_e;

endpackage
