// fwd_pkg: types and constants shared by the IPv4 forwarding engine.
//
// The engine pairs a Multizone Pipelined Cache (MPC) with a longest-prefix
// lookup table built on a pipelined TCAM. The constants below fix the IPv4
// address split used everywhere: the cache works on two 16-bit halves of the
// address, the lookup table on a 17-bit and a 15-bit slice. The next-hop
// (output port) width is this design's own choice; the split widths follow
// the architecture.
package fwd_pkg;

  localparam int unsigned IP_W   = 32;  // IPv4 destination address
  localparam int unsigned HALF_W = 16;  // CAM1 / CAM2 / prefix-zone key width
  localparam int unsigned NH_W   = 8;   // next-hop (output port id) width

  // A lookup-table answer as it travels to the cache. A short prefix
  // (16 bits or fewer) goes to the prefix zone as value + care mask over the
  // upper half of the address; anything longer is cached as the full address.
  typedef struct packed {
    logic              found;      // the table held a matching prefix
    logic              is_prefix;  // 1: short prefix, 0: full address
    logic [IP_W-1:0]   addr;       // looked-up address (prefix bits valid)
    logic [HALF_W-1:0] care;       // care mask of the prefix over addr[31:16]
    logic [NH_W-1:0]   nexthop;    // output port
  } route_update_t;

  // Where a cache answer came from.
  typedef enum logic [1:0] {
    SRC_FULL   = 2'd0,  // hit in the full-address zone (CAM1 + CAM2)
    SRC_PREFIX = 2'd1,  // hit in the prefix zone
    SRC_PUR    = 2'd2,  // miss in the arrays, forwarded from the pending update register
    SRC_MISS   = 2'd3   // miss, parked in the outstanding miss buffer
  } hit_src_t;

endpackage
