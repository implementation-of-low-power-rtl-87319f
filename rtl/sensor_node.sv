// sensor_node: a routing sensor node with a sleep mode.
//
// The node sleeps (`awake` low) until a hello addressed to MY_ADDR arrives.
// It answers with a one-cycle `ack_out`, wakes and waits up to RX_TIMEOUT
// cycles for the packet, which it captures in its packet register. A
// comparator then checks the packet's destination against MY_ADDR:
//  * destination is this node: the packet is delivered on `rx_pkt` with a
//    one-cycle `rx_valid`;
//  * destination found in the route LUT: the request field is set to 00 and
//    the packet is handed to the next hop through the hello/response/send
//    sequence (hello_forwarder), `req` shows 00;
//  * destination unknown: the node raises `rreq_valid` for one cycle with
//    `req` = 01 and the destination on `rreq_dst`, waits up to RX_TIMEOUT
//    cycles for the coordinator's route reply addressed to it, stores the
//    route in its LUT and looks again.
// When neither the next hop nor any neighbour answers, the packet is dropped
// and the route is removed from the LUT, so that the next packet for that
// destination asks the coordinator for a new route.
// After delivering, forwarding, or giving up, it returns to sleep.
// The LUT, the comparator, the request codes 00/01 and the sleep-after-
// processing behaviour come from the design, as does asking the coordinator
// again when a path has changed; the hello/ack handshake follows
// its flowchart. Registers stand where the design shows D-latches. The
// timeouts, the local-delivery output and the route-reply bundle are this
// implementation's choices.
module sensor_node
  import wsn_pkg::*;
#(
  parameter addr_t       MY_ADDR     = 4'h1,
  parameter int unsigned RX_TIMEOUT  = 8,
  parameter int unsigned ACK_TIMEOUT = 4,
  parameter int unsigned NUM_NB      = 2,
  parameter addr_t [NUM_NB-1:0] NEIGHBORS = '0
) (
  input  logic         clk,
  input  logic         rst,
  output logic         awake,
  // incoming hello and packet
  input  logic         hello_in_valid,
  input  addr_t        hello_in_addr,
  output logic         ack_out,
  input  logic         pkt_in_valid,
  input  packet_t      pkt_in,
  // local delivery
  output logic         rx_valid,
  output packet_t      rx_pkt,
  // onward hello / response / packet
  output logic         hello_out_valid,
  output addr_t        hello_out_addr,
  input  logic         ack_in,
  output logic         pkt_out_valid,
  output packet_t      wout,
  output addr_t        pkt_out_addr,
  output logic         dropped,
  // route request to the coordinator and its reply
  output req_t         req,
  output logic         rreq_valid,
  output addr_t        rreq_dst,
  input  route_reply_t route_reply
);

  typedef enum logic [2:0] {S_SLEEP, S_RX, S_CHECK, S_FWD, S_ROUTE} state_t;

  localparam int unsigned TW = $clog2(RX_TIMEOUT + 1);

  state_t        state_q;
  packet_t       pkt_q;
  req_t          req_q;
  logic [TW-1:0] timer_q;
  logic          ack_q, rx_valid_q, rreq_q, give_up_q;

  logic    lut_hit;
  addr_t   lut_next;
  logic    route_for_me, for_me;
  logic    fwd_start, fwd_busy, fwd_done, fwd_dropped;
  packet_t fwd_pkt;

  assign route_for_me = route_reply.valid && (route_reply.node == MY_ADDR);
  assign for_me       = (pkt_q.dst == MY_ADDR);             // comparator
  assign fwd_start    = (state_q == S_CHECK) && !for_me && lut_hit;

  always_comb begin
    fwd_pkt        = pkt_q;
    fwd_pkt.req_id = REQ_DATA;
  end

  route_lut u_lut (
    .clk      (clk),
    .rst      (rst),
    .we       (route_for_me),
    .wr_dst   (route_reply.dst),
    .wr_next  (route_reply.next),
    .inv      (fwd_dropped),
    .inv_dst  (pkt_q.dst),
    .rd_dst_a (pkt_q.dst),
    .hit_a    (lut_hit),
    .next_a   (lut_next),
    .rd_dst_b (pkt_q.dst),
    .hit_b    (),
    .next_b   ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_SLEEP;
      pkt_q      <= '0;
      req_q      <= REQ_DATA;
      timer_q    <= '0;
      ack_q      <= 1'b0;
      rx_valid_q <= 1'b0;
      rreq_q     <= 1'b0;
      give_up_q  <= 1'b0;
    end else begin
      ack_q      <= 1'b0;
      rx_valid_q <= 1'b0;
      rreq_q     <= 1'b0;
      give_up_q  <= 1'b0;
      unique case (state_q)
        S_SLEEP: if (hello_in_valid && hello_in_addr == MY_ADDR) begin
          ack_q   <= 1'b1;
          timer_q <= '0;
          state_q <= S_RX;
        end
        S_RX: begin
          if (pkt_in_valid) begin
            pkt_q   <= pkt_in;
            state_q <= S_CHECK;
          end else if (timer_q == TW'(RX_TIMEOUT - 1)) begin
            state_q <= S_SLEEP;
          end else begin
            timer_q <= timer_q + 1'b1;
          end
        end
        S_CHECK: begin
          timer_q <= '0;
          if (for_me) begin
            rx_valid_q <= 1'b1;
            state_q    <= S_SLEEP;
          end else if (lut_hit) begin
            req_q   <= REQ_DATA;
            state_q <= S_FWD;
          end else begin
            req_q   <= REQ_ROUTE;
            rreq_q  <= 1'b1;
            state_q <= S_ROUTE;
          end
        end
        S_FWD: if (fwd_done || fwd_dropped) state_q <= S_SLEEP;
        S_ROUTE: begin
          if (route_for_me && route_reply.dst == pkt_q.dst) begin
            state_q <= S_CHECK;
          end else if (timer_q == TW'(RX_TIMEOUT - 1)) begin
            give_up_q <= 1'b1;
            state_q   <= S_SLEEP;
          end else begin
            timer_q <= timer_q + 1'b1;
          end
        end
        default: state_q <= S_SLEEP;
      endcase
    end
  end

  hello_forwarder #(
    .ACK_TIMEOUT (ACK_TIMEOUT),
    .NUM_NB      (NUM_NB),
    .NEIGHBORS   (NEIGHBORS)
  ) u_fwd (
    .clk         (clk),
    .rst         (rst),
    .start       (fwd_start),
    .first_hop   (lut_next),
    .pkt_in      (fwd_pkt),
    .busy        (fwd_busy),
    .hello_valid (hello_out_valid),
    .hello_addr  (hello_out_addr),
    .ack         (ack_in),
    .pkt_valid   (pkt_out_valid),
    .pkt_out     (wout),
    .pkt_addr    (pkt_out_addr),
    .done        (fwd_done),
    .dropped     (fwd_dropped)
  );

  assign awake      = (state_q != S_SLEEP) || fwd_busy;
  assign ack_out    = ack_q;
  assign rx_valid   = rx_valid_q;
  assign rx_pkt     = pkt_q;
  assign req        = req_q;
  assign rreq_valid = rreq_q;
  assign rreq_dst   = pkt_q.dst;
  assign dropped    = fwd_dropped || give_up_q;

  // Handshake rules: acknowledge only a hello addressed to this node, and
  // only from sleep; a route request always carries request code 01.
  a_ack_own_hello: assert property (@(posedge clk) disable iff (rst)
    ack_out |-> $past(hello_in_valid && hello_in_addr == MY_ADDR && state_q == S_SLEEP));
  a_rreq_code: assert property (@(posedge clk) disable iff (rst)
    rreq_valid |-> req == REQ_ROUTE);

endmodule
