// smcb_pkg: types and constants shared by the shared-memory crosspoint
// buffered (SMCB) switch.
//
// A cell is the fixed-length unit switched in one time slot. It carries its
// traffic class, source port, destination port and a payload word; the payload stands for the
// cell body, whose length the design does not fix. Port fields are PORT_W bits
// wide so one set of types serves every switch size up to 2**PORT_W ports.
//
// uplink_t is what one line card sends to the buffered crossbar in one slot: at
// most one cell (granted earlier by the input-access scheduler) plus at most one
// request, the notice that a new cell has arrived in a VOQ (with its class). downlink_t is what
// the crossbar sends back: at most one departing cell for that port's output
// and at most one grant that tells the line card which VOQ to serve next.
package smcb_pkg;

  localparam int PORT_W    = 8;   // port index field, up to 256 ports
  localparam int PAYLOAD_W = 32;  // payload word carried by every cell
  localparam int PRIO_W    = 2;   // traffic-class field, up to 4 classes

  typedef logic [PORT_W-1:0] port_t;
  typedef logic [PRIO_W-1:0] prio_t;

  typedef struct packed {
    prio_t                 prio;     // traffic class, 0 = highest priority
    port_t                 src;
    port_t                 dst;
    logic [PAYLOAD_W-1:0]  payload;
  } cell_t;

  typedef struct packed {
    logic   cell_v;   // a granted cell rides the link
    cell_t  cdata;
    logic   req_v;    // arrival notice for VOQ(src, req_dst, req_prio)
    port_t  req_dst;
    prio_t  req_prio;
  } uplink_t;

  typedef struct packed {
    logic   cell_v;   // cell leaving the switch through this port
    cell_t  cdata;
    logic   gnt_v;    // grant: send the head cell of VOQ(this port, gnt_dst, gnt_prio)
    port_t  gnt_dst;
    prio_t  gnt_prio;
  } downlink_t;

  localparam int UPLINK_W   = $bits(uplink_t);
  localparam int DOWNLINK_W = $bits(downlink_t);

endpackage
