// hc_pkg: constants and types shared by the HotCluster TSV link.
//
// A router's vertical (up) link carries one 44-bit flit. The link is split
// into NCL = 4 TSV clusters of CW = 11 bits, one at each border of the router;
// a router may also own one internal redundant cluster (physical index 4).
// Lanes are the logical 11-bit slices of a flit; the cluster map decides which
// physical cluster (own, redundant or a neighbour's) carries each lane.
// The flit width and cluster count follow the paper's configuration; the even
// 11-bit split, direction codes and map encodings are this design's choices.
package hc_pkg;

  localparam int unsigned FLIT_W = 44;          // 2 x SECDED(22,16) flit
  localparam int unsigned NCL    = 4;           // original clusters per router
  localparam int unsigned NPHY   = NCL + 1;     // + internal redundant cluster
  localparam int unsigned CW     = FLIT_W / NCL;
  localparam int unsigned RED    = 4;           // physical index of the redundant cluster
  localparam int unsigned WW     = 5;           // router weight width
  localparam int unsigned IDW    = 4;           // router id width used for tie-breaking
  localparam int unsigned KW     = WW + IDW;    // ordering key {weight, id}

  // Directions of the four neighbours (and of the four border clusters).
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Operating mode of a router's vertical link (Fig. 3).
  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd0,   // four lanes, one beat per flit
    MODE_VIRTUAL  = 3'd1,   // four lanes, some time-shared with a borrower
    MODE_SERIAL2  = 3'd2,   // two lanes, two beats per flit
    MODE_SERIAL4  = 3'd3,   // one lane, four beats per flit
    MODE_DISABLED = 3'd4    // no lane: fault-tolerant routing must avoid it
  } link_mode_e;

  // Where a logical lane is carried.
  typedef enum logic [1:0] {
    SRC_NONE    = 2'd0,
    SRC_OWN     = 2'd1,     // idx = own physical cluster 0..4
    SRC_BORROW  = 2'd2,     // idx = direction of the lending neighbour
    SRC_VIRTUAL = 2'd3      // idx = direction of the borrower we lent to
  } lane_src_e;

  typedef struct packed {
    lane_src_e  src;
    logic [2:0] idx;
  } lane_map_t;

  // Who uses one of the router's own physical clusters.
  typedef struct packed {
    logic       used;       // carries data
    logic       lent;       // lent to neighbour idx[1:0], else lane idx[1:0]
    logic [1:0] idx;
  } phys_map_t;

  typedef logic [CW-1:0] chunk_t;

  function automatic logic [1:0] opp(input logic [1:0] d);
    return d ^ 2'd2;
  endfunction

endpackage
