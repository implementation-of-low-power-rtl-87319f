// wsn_top: a coordinator, one sensor node and the two error-control codecs.
//
// The coordinator builds a 24-bit packet, says hello to the sensor node and,
// once acknowledged, sends the packet over a Hamming-protected link: the
// packet is encoded into a 29-bit code word, `ham_noise` is XORed onto it to
// model the radio channel, and the decoder corrects any single flipped bit
// before the sensor node captures the packet. The sensor node delivers the
// packet locally, forwards it to its next hop (brought out on the `next_*`
// ports, where a further node or the radio would connect), or asks the
// coordinator for a route and retries. Hello, acknowledgment and route
// request/reply travel on their own wires, uncoded. The `link_*` and
// `node_rreq_valid` outputs show the traffic between coordinator and node.
// Beside this, a CRC-16 link (encoder, `crc_noise` XORed onto the 32-bit
// frame, decoder) carries 16-bit words with single-bit correction and
// multi-bit detection.
// How the blocks connect follows the design's network diagram (coordinator
// -> data packet -> sensor node -> next node). Putting the Hamming codec on
// the coordinator-to-node link and leaving the CRC codec as a separate link
// are this implementation's choices: the design describes both codecs as
// companions of the node without saying where each one sits.
module wsn_top
  import wsn_pkg::*;
#(
  parameter addr_t       COORD_ADDR  = 4'h0,
  parameter addr_t       NODE_ADDR   = 4'h1,
  parameter int unsigned ACK_TIMEOUT = 4,
  parameter int unsigned RX_TIMEOUT  = 8,
  parameter int unsigned NUM_NB      = 2,
  parameter addr_t [NUM_NB-1:0] COORD_NEIGHBORS = {4'h3, 4'h2},
  parameter addr_t [NUM_NB-1:0] NODE_NEIGHBORS  = {4'h5, 4'h4},
  parameter int unsigned HAM_DATA_W  = PKT_W,
  parameter int unsigned HAM_PAR_W   = hamming_pkg::par_bits(HAM_DATA_W),
  parameter int unsigned CRC_DATA_W  = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  // coordinator: packet request and route-table configuration
  input  logic                  send,
  input  logic [DATA_W-1:0]     data,
  input  addr_t                 dcode,
  input  logic [END_W-1:0]      endsig,
  output packet_t               data_packet,
  output logic                  coord_busy,
  output logic                  coord_dropped,
  input  logic                  cfg_we,
  input  addr_t                 cfg_dst,
  input  addr_t                 cfg_next,
  // channel noise on the coordinator -> node link
  input  logic [HAM_DATA_W+HAM_PAR_W-1:0] ham_noise,
  output logic [HAM_PAR_W-1:0]  ham_syndrome,
  output logic                  ham_err,
  output logic                  ham_uncorrectable,
  // coordinator -> node link activity
  output logic                  link_hello_valid,
  output addr_t                 link_hello_addr,
  output logic                  link_ack,
  output logic                  link_pkt_valid,
  output logic                  node_rreq_valid,
  // sensor node status and local delivery
  output logic                  node_awake,
  output req_t                  node_req,
  output logic                  node_rx_valid,
  output packet_t               node_rx_pkt,
  output logic                  node_dropped,
  // sensor node -> next node
  output logic                  next_hello_valid,
  output addr_t                 next_hello_addr,
  input  logic                  next_ack,
  output logic                  next_pkt_valid,
  output packet_t               next_pkt,
  output addr_t                 next_pkt_addr,
  // CRC-16 link
  input  logic [CRC_DATA_W-1:0] crc_dtr,
  input  logic [CRC_DATA_W+crc16_pkg::CRC_W-1:0] crc_noise,
  output logic [CRC_DATA_W-1:0] crc_data,
  output logic [5:0]            crc_pos,
  output logic                  crc_err,
  output logic                  crc_corrected,
  output logic                  crc_uncorrectable
);

  localparam int unsigned HAM_CW = HAM_DATA_W + HAM_PAR_W;

  // coordinator <-> node wires
  logic         c_hello_valid, c_pkt_valid, n_ack, n_rreq_valid;
  addr_t        c_hello_addr, c_pkt_addr, n_rreq_dst;
  packet_t      c_pkt;
  route_reply_t route_reply;

  // Hamming link
  logic [HAM_CW-1:0]     ham_enc, ham_rx, ham_fixed;
  logic [HAM_PAR_W-1:0]  ham_red;
  logic [HAM_DATA_W-1:0] ham_out;

  coordinator_node #(
    .SRC_ADDR    (COORD_ADDR),
    .ACK_TIMEOUT (ACK_TIMEOUT),
    .NUM_NB      (NUM_NB),
    .NEIGHBORS   (COORD_NEIGHBORS)
  ) u_coord (
    .clk         (clk),
    .rst         (rst),
    .send        (send),
    .data        (data),
    .dcode       (dcode),
    .endsig      (endsig),
    .data_packet (data_packet),
    .busy        (coord_busy),
    .hello_valid (c_hello_valid),
    .hello_addr  (c_hello_addr),
    .ack_in      (n_ack),
    .pkt_valid   (c_pkt_valid),
    .pkt_out     (c_pkt),
    .pkt_addr    (c_pkt_addr),
    .dropped     (coord_dropped),
    .rreq_valid  (n_rreq_valid),
    .req         (node_req),
    .rreq_src    (NODE_ADDR),
    .rreq_dst    (n_rreq_dst),
    .route_reply (route_reply),
    .cfg_we      (cfg_we),
    .cfg_dst     (cfg_dst),
    .cfg_next    (cfg_next)
  );

  assign link_hello_valid = c_hello_valid;
  assign link_hello_addr  = c_hello_addr;
  assign link_ack         = n_ack;
  assign link_pkt_valid   = c_pkt_valid;
  assign node_rreq_valid  = n_rreq_valid;

  hamming_encoder #(.DATA_W(HAM_DATA_W)) u_ham_enc (
    .data (c_pkt),
    .enc  (ham_enc),
    .red  (ham_red)
  );

  assign ham_rx = ham_enc ^ ham_noise;

  hamming_decoder #(.DATA_W(HAM_DATA_W)) u_ham_dec (
    .enc           (ham_rx),
    .red1          (ham_syndrome),
    .c             (ham_fixed),
    .out           (ham_out),
    .err           (ham_err),
    .uncorrectable (ham_uncorrectable)
  );

  sensor_node #(
    .MY_ADDR     (NODE_ADDR),
    .RX_TIMEOUT  (RX_TIMEOUT),
    .ACK_TIMEOUT (ACK_TIMEOUT),
    .NUM_NB      (NUM_NB),
    .NEIGHBORS   (NODE_NEIGHBORS)
  ) u_node (
    .clk             (clk),
    .rst             (rst),
    .awake           (node_awake),
    .hello_in_valid  (c_hello_valid),
    .hello_in_addr   (c_hello_addr),
    .ack_out         (n_ack),
    .pkt_in_valid    (c_pkt_valid && c_pkt_addr == NODE_ADDR),
    .pkt_in          (packet_t'(ham_out)),
    .rx_valid        (node_rx_valid),
    .rx_pkt          (node_rx_pkt),
    .hello_out_valid (next_hello_valid),
    .hello_out_addr  (next_hello_addr),
    .ack_in          (next_ack),
    .pkt_out_valid   (next_pkt_valid),
    .wout            (next_pkt),
    .pkt_out_addr    (next_pkt_addr),
    .dropped         (node_dropped),
    .req             (node_req),
    .rreq_valid      (n_rreq_valid),
    .rreq_dst        (n_rreq_dst),
    .route_reply     (route_reply)
  );

  // CRC-16 link
  logic [CRC_DATA_W+crc16_pkg::CRC_W-1:0] crc_ftr;
  logic [crc16_pkg::CRC_W-1:0]            crc_ctr, crc_cre, crc_ccal, crc_a;
  logic [CRC_DATA_W-1:0]                  crc_dre;

  crc16_encoder #(.DATA_W(CRC_DATA_W)) u_crc_enc (
    .dtr (crc_dtr),
    .ctr (crc_ctr),
    .ftr (crc_ftr)
  );

  crc16_decoder #(.DATA_W(CRC_DATA_W), .POS_W(6)) u_crc_dec (
    .fre           (crc_ftr ^ crc_noise),
    .dre           (crc_dre),
    .cre           (crc_cre),
    .ccal          (crc_ccal),
    .a             (crc_a),
    .c             (crc_pos),
    .data          (crc_data),
    .err           (crc_err),
    .corrected     (crc_corrected),
    .uncorrectable (crc_uncorrectable)
  );

endmodule
