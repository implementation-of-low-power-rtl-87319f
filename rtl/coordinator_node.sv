// coordinator_node: the central controller of the sensor network.
//
// When `send` is seen while the node is idle, it assembles a 24-bit data
// packet from its source-address register (SRC_ADDR, loaded at reset), its
// 2-bit request-id counter, the destination code `dcode`, the 12-bit `data`
// and the 2-bit end signal `endsig`, stores it in the packet register and
// increments the counter. It then looks up the first hop towards `dcode` in
// its route LUT (the destination itself when the LUT has no entry), says
// hello to that hop and sends the packet once the hop acknowledges, trying the
// neighbours in NEIGHBORS when it does not (see hello_forwarder).
// The coordinator also serves route requests: a request with code 01 from
// node `rreq_src` for destination `rreq_dst` is answered one cycle later on
// `route_reply` with the next hop from the LUT. When the LUT has no entry,
// or its entry names the asking node itself (the coordinator's own route
// runs through that node), the reply names the destination as the next hop.
// The LUT is filled through the `cfg_*` port.
// The packet layout, the source-address register, the request-id counter, the
// packet register and the route requests come from the design; the hello
// exchange follows its flowchart. The start strobe, the LUT fallback and the
// configuration port are this implementation's choices.
module coordinator_node
  import wsn_pkg::*;
#(
  parameter addr_t       SRC_ADDR    = 4'h0,
  parameter int unsigned ACK_TIMEOUT = 4,
  parameter int unsigned NUM_NB      = 2,
  parameter addr_t [NUM_NB-1:0] NEIGHBORS = '0
) (
  input  logic              clk,
  input  logic              rst,
  // packet generation
  input  logic              send,
  input  logic [DATA_W-1:0] data,
  input  addr_t             dcode,
  input  logic [END_W-1:0]  endsig,
  output packet_t           data_packet,
  output logic              busy,
  // hello / acknowledgment
  output logic              hello_valid,
  output addr_t             hello_addr,
  input  logic              ack_in,
  // packet out
  output logic              pkt_valid,
  output packet_t           pkt_out,
  output addr_t             pkt_addr,
  output logic              dropped,
  // route requests from sensor nodes and replies
  input  logic              rreq_valid,
  input  req_t              req,
  input  addr_t             rreq_src,
  input  addr_t             rreq_dst,
  output route_reply_t      route_reply,
  // route table configuration
  input  logic              cfg_we,
  input  addr_t             cfg_dst,
  input  addr_t             cfg_next
);

  addr_t   source_code_q;
  req_t    id_counter_q;
  packet_t packet_q;
  logic    fwd_busy, fwd_start;
  logic    hit_send, hit_req;
  addr_t   next_send, next_req;

  assign fwd_start = send && !fwd_busy;

  // source address register and request-id counter
  always_ff @(posedge clk) begin
    if (rst) begin
      source_code_q <= SRC_ADDR;
      id_counter_q  <= '0;
      packet_q      <= '0;
    end else if (fwd_start) begin
      packet_q     <= '{src: source_code_q, req_id: id_counter_q, dst: dcode,
                        data: data, endsig: endsig};
      id_counter_q <= id_counter_q + 1'b1;
    end
  end

  assign data_packet = packet_q;

  route_lut u_lut (
    .clk      (clk),
    .rst      (rst),
    .we       (cfg_we),
    .wr_dst   (cfg_dst),
    .wr_next  (cfg_next),
    .inv      (1'b0),
    .inv_dst  ('0),
    .rd_dst_a (dcode),
    .hit_a    (hit_send),
    .next_a   (next_send),
    .rd_dst_b (rreq_dst),
    .hit_b    (hit_req),
    .next_b   (next_req)
  );

  hello_forwarder #(
    .ACK_TIMEOUT (ACK_TIMEOUT),
    .NUM_NB      (NUM_NB),
    .NEIGHBORS   (NEIGHBORS)
  ) u_fwd (
    .clk         (clk),
    .rst         (rst),
    .start       (fwd_start),
    .first_hop   (hit_send ? next_send : dcode),
    .pkt_in      ('{src: source_code_q, req_id: id_counter_q, dst: dcode,
                    data: data, endsig: endsig}),
    .busy        (fwd_busy),
    .hello_valid (hello_valid),
    .hello_addr  (hello_addr),
    .ack         (ack_in),
    .pkt_valid   (pkt_valid),
    .pkt_out     (pkt_out),
    .pkt_addr    (pkt_addr),
    .done        (),
    .dropped     (dropped)
  );

  assign busy = fwd_busy;

  // route service: answer one cycle after the request
  always_ff @(posedge clk) begin
    if (rst) begin
      route_reply <= '0;
    end else begin
      route_reply.valid <= rreq_valid && (req == REQ_ROUTE);
      route_reply.node  <= rreq_src;
      route_reply.dst   <= rreq_dst;
      route_reply.next  <= (hit_req && next_req != rreq_src) ? next_req : rreq_dst;
    end
  end

endmodule
