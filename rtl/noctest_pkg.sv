// noctest_pkg: types and constants shared by the NoC test-delivery logic.
//
// Every block moves 32-bit flits, one per clock, as in the evaluated network
// (two adjacent routers move one 32-bit flit per cycle). A flit travels with two
// framing bits, head and tail. The layout of the header flit and of the chain
// flits that carry the multicast tree is this design's own choice:
//
//   header flit  [31:29] packet type   [28:21] destination node
//                [20:13] chain length  [12:5]  source node   [4:0] zero
//   chain flits  ceil(length/2) flits, two 16-bit entries each, entry 2j in
//                bits [15:0] of flit j. An entry holds the node that takes part
//                in the multicast and, for router testing, the router under
//                test that this node serves in the last unicast step.
//   payload      scan data: each payload flit is one shift of up to 32 scan
//                inputs.
//
// A node address is {x[3:0], y[3:0]}, so integer order of addresses is the
// dimension order (x compared first, then y) and meshes up to 16x16 fit.
package noctest_pkg;

  localparam int FLIT_W = 32;
  localparam int ADDR_W = 8;
  localparam int NPORT  = 4;          // x+, x-, y+, y- (router ports of Fig. 7)

  typedef enum logic [2:0] {
    PT_OPER      = 3'd0,  // operational packet for the processor
    PT_CORE_TEST = 3'd1,  // core test packet, multicast over the whole network
    PT_RT_MCAST  = 3'd2,  // router test packet, multicast among fault-free routers
    PT_RT_FINAL  = 3'd3,  // router test packet, last unicast step into the router under test
    PT_RESP      = 3'd4   // compacted response (MISR signature) back to the tester
  } ptype_e;

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    ptype_e      ptype;
    addr_t       dest;
    logic [7:0]  nchain;
    addr_t       src;
    logic [4:0]  rsvd;
  } hdr_t;

  typedef struct packed {
    addr_t rut;   // router under test served by this node (router testing only)
    addr_t node;  // node taking part in the multicast
  } entry_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  function automatic addr_t mk_addr(input int x, input int y);
    return addr_t'((x << 4) | y);
  endfunction

  function automatic logic [FLIT_W-1:0] mk_hdr(input ptype_e t, input addr_t dest,
                                               input logic [7:0] n, input addr_t src);
    hdr_t h;
    h.ptype  = t;
    h.dest   = dest;
    h.nchain = n;
    h.src    = src;
    h.rsvd   = '0;
    return h;
  endfunction

endpackage
