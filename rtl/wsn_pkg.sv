// wsn_pkg: types and constants shared by the sensor-network blocks.
//
// The 24-bit data packet carries, from MSB to LSB, a 4-bit source address,
// a 2-bit request id, a 4-bit destination address, 12 bits of data and a
// 2-bit end signal. The field order and widths follow the packet format of
// the design. The request codes 00 (forward data along a known route) and 01
// (ask the coordinator for a route) are the design's; the struct and the
// route-reply bundle are this implementation's own packaging.
package wsn_pkg;

  localparam int unsigned ADDR_W = 4;
  localparam int unsigned REQ_W  = 2;
  localparam int unsigned DATA_W = 12;
  localparam int unsigned END_W  = 2;
  localparam int unsigned PKT_W  = ADDR_W + REQ_W + ADDR_W + DATA_W + END_W;  // 24

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [REQ_W-1:0]  req_t;

  typedef struct packed {
    addr_t                src;
    req_t                 req_id;
    addr_t                dst;
    logic [DATA_W-1:0]    data;
    logic [END_W-1:0]     endsig;
  } packet_t;

  // Request codes used by a sensor node.
  localparam req_t REQ_DATA  = 2'b00;  // destination known, data forwarded
  localparam req_t REQ_ROUTE = 2'b01;  // destination unknown, route requested

  // Route reply from the coordinator to one sensor node.
  typedef struct packed {
    logic  valid;
    addr_t node;   // node that asked
    addr_t dst;    // destination the route is for
    addr_t next;   // next hop towards dst
  } route_reply_t;

endpackage
