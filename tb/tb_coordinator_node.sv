// tb_coordinator_node: self-checking test of coordinator_node.
//
// Checks, against values worked out here:
//  * packet assembly: {source, request id, destination, data, end signal}
//    appears in `data_packet` one cycle after `send`, and the 2-bit request
//    id counts up with every packet (and wraps after four);
//  * first hop taken from the route LUT, or the destination itself when the
//    LUT has no entry;
//  * hello one cycle after `send`, packet one cycle after the acknowledgment;
//  * with no acknowledgment: hello to the first hop, then to each neighbour
//    after ACK_TIMEOUT cycles each, then `dropped`;
//  * a route request (code 01) is answered one cycle later, code 00 is not;
//    a LUT hop that is the asking node itself is answered as direct.
module tb_coordinator_node;
  import wsn_pkg::*;

  localparam int unsigned ACK_TIMEOUT = 4;
  localparam addr_t [1:0] NB = {4'h3, 4'h2};
  localparam addr_t SRC = 4'hA;

  logic clk = 0, rst;
  logic send, ack_in, pkt_valid, hello_valid, busy, dropped;
  logic [DATA_W-1:0] data;
  addr_t dcode, hello_addr, pkt_addr, rreq_src, rreq_dst, cfg_dst, cfg_next;
  logic [END_W-1:0] endsig;
  packet_t data_packet, pkt_out;
  logic rreq_valid, cfg_we;
  req_t req;
  route_reply_t route_reply;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coordinator_node #(.SRC_ADDR(SRC), .ACK_TIMEOUT(ACK_TIMEOUT), .NUM_NB(2),
                     .NEIGHBORS(NB)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  // issue one packet; returns the number of cycles from send to hello
  task automatic do_send(input addr_t dst, input logic [11:0] d, input logic [1:0] e,
                         input int ack_delay, input addr_t exp_hop, input req_t exp_id);
    packet_t exp;
    int n;
    exp = '{src: SRC, req_id: exp_id, dst: dst, data: d, endsig: e};
    dcode = dst; data = d; endsig = e; send = 1;
    tick();
    send = 0;
    check("data_packet assembled", data_packet == exp);
    check("hello one cycle after send", hello_valid && hello_addr == exp_hop);
    tick();
    n = 0;
    while (n < ack_delay) begin
      check("no packet before ack", !pkt_valid);
      tick(); n++;
    end
    ack_in = 1;
    tick();
    ack_in = 0;
    check("packet one cycle after ack", pkt_valid && pkt_out == exp && pkt_addr == exp_hop);
    tick();
    check("idle again", !busy);
  endtask

  initial begin
    rst = 1; send = 0; ack_in = 0; rreq_valid = 0; cfg_we = 0;
    data = '0; dcode = '0; endsig = '0; req = REQ_DATA; rreq_src = '0; rreq_dst = '0;
    cfg_dst = '0; cfg_next = '0;
    tick(); tick();
    rst = 0;
    check("reset packet", data_packet == '0 && !busy && !route_reply.valid);
    // route table: 5 -> via 1, 7 -> via 6
    cfg_we = 1; cfg_dst = 4'h5; cfg_next = 4'h1; tick();
    cfg_dst = 4'h7; cfg_next = 4'h6; tick();
    cfg_we = 0;

    do_send(4'h5, 12'h321, 2'b00, 0, 4'h1, 2'd0);
    do_send(4'h7, 12'hABC, 2'b11, 2, 4'h6, 2'd1);
    do_send(4'h9, 12'h00F, 2'b01, 3, 4'h9, 2'd2);   // not in LUT: direct
    do_send(4'h5, 12'h800, 2'b10, 1, 4'h1, 2'd3);
    do_send(4'h5, 12'h001, 2'b00, 0, 4'h1, 2'd0);   // counter wraps

    // no acknowledgment at all: first hop, neighbour 2, neighbour 3, drop
    begin
      addr_t seen [$];
      int cycles = 0;
      logic got_drop = 0;
      dcode = 4'h5; data = 12'h555; endsig = 0; send = 1;
      tick(); send = 0;
      while (!got_drop && cycles < 100) begin
        if (hello_valid) seen.push_back(hello_addr);
        if (dropped) got_drop = 1;
        check("no packet without ack", !pkt_valid);
        tick(); cycles++;
      end
      check("dropped after all neighbours", got_drop);
      check("three hellos", seen.size() == 3);
      if (seen.size() == 3)
        check("hello order", seen[0] == 4'h1 && seen[1] == 4'h2 && seen[2] == 4'h3);
      // 3 tries x (1 hello + ACK_TIMEOUT wait + 1 next) cycles
      check("drop timing", cycles == 3 * (ACK_TIMEOUT + 2));
    end

    // ack arrives on the second neighbour
    begin
      int cycles = 0;
      dcode = 4'h7; data = 12'h777; send = 1;
      tick(); send = 0;
      while (!(hello_valid && hello_addr == 4'h2) && cycles < 50) begin tick(); cycles++; end
      tick(); ack_in = 1; tick(); ack_in = 0;
      check("packet to neighbour after retry", pkt_valid && pkt_addr == 4'h2 &&
            pkt_out.data == 12'h777);
      tick();
    end

    // route requests
    rreq_valid = 1; req = REQ_ROUTE; rreq_src = 4'h1; rreq_dst = 4'h7; tick();
    rreq_valid = 0;
    check("route reply", route_reply.valid && route_reply.node == 4'h1 &&
          route_reply.dst == 4'h7 && route_reply.next == 4'h6);
    rreq_valid = 1; rreq_dst = 4'hC; tick();
    rreq_valid = 0;
    check("route reply unknown -> direct", route_reply.valid && route_reply.next == 4'hC);
    rreq_valid = 1; rreq_src = 4'h1; rreq_dst = 4'h5; tick();
    rreq_valid = 0;
    check("route through the asker -> direct", route_reply.valid && route_reply.next == 4'h5);
    rreq_valid = 1; req = REQ_DATA; tick();
    rreq_valid = 0;
    check("code 00 is not a route request", !route_reply.valid);
    tick();
    check("reply is one cycle", !route_reply.valid);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
