// tb_sensor_node: self-checking test of sensor_node (address 1).
//
// Checks, against values worked out here:
//  * the node sleeps after reset, ignores packets and hellos for other
//    addresses while asleep, and answers a hello for itself with a one-cycle
//    ack on the next cycle;
//  * a packet for this node is delivered locally;
//  * a packet for an unknown destination raises a route request with request
//    code 01, the route reply fills the LUT, and the packet is then forwarded
//    to the next hop with request code 00 and otherwise unchanged;
//  * a second packet for that destination is forwarded with no request;
//  * when that route breaks (nobody answers) the packet is dropped and the
//    next packet for the destination asks for a new route;
//  * a missing route reply and a missing packet both end in sleep, the first
//    with `dropped`;
//  * a route reply addressed to another node is not taken.
module tb_sensor_node;
  import wsn_pkg::*;

  localparam addr_t ME = 4'h1;
  localparam int unsigned RX_TIMEOUT = 8;

  logic clk = 0, rst;
  logic awake, hello_in_valid, ack_out, pkt_in_valid, rx_valid;
  logic hello_out_valid, ack_in, pkt_out_valid, dropped, rreq_valid;
  addr_t hello_in_addr, hello_out_addr, pkt_out_addr, rreq_dst;
  packet_t pkt_in, rx_pkt, wout;
  req_t req;
  route_reply_t route_reply;
  int checks = 0, failures = 0;
  int n_rreq = 0;

  always #5 clk = ~clk;
  always @(negedge clk) if (rreq_valid) n_rreq++;

  sensor_node #(.MY_ADDR(ME), .RX_TIMEOUT(RX_TIMEOUT), .ACK_TIMEOUT(4), .NUM_NB(2),
                .NEIGHBORS({4'h5, 4'h4})) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
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

  task automatic hello(input addr_t a);
    hello_in_valid = 1; hello_in_addr = a; tick(); hello_in_valid = 0;
  endtask

  task automatic give_pkt(input packet_t p);
    pkt_in_valid = 1; pkt_in = p; tick(); pkt_in_valid = 0;
  endtask

  // wait for an onward hello to `hop`, acknowledge it, return the packet sent
  task automatic expect_forward(input addr_t hop, input packet_t sent, input int exp_wait);
    int n = 0;
    packet_t exp;
    while (!hello_out_valid && n < 20) begin tick(); n++; end
    check("onward hello", hello_out_valid && hello_out_addr == hop);
    if (exp_wait >= 0) check("onward hello timing", n == exp_wait);
    check("awake while forwarding", awake);
    tick();
    ack_in = 1; tick(); ack_in = 0;
    exp = sent;
    exp.req_id = REQ_DATA;
    check("forwarded packet", pkt_out_valid && wout == exp && pkt_out_addr == hop);
    check("request 00 shown", req == REQ_DATA);
    tick();
    check("asleep after forwarding", !awake);
  endtask

  initial begin
    packet_t p;
    rst = 1; hello_in_valid = 0; hello_in_addr = '0; pkt_in_valid = 0; pkt_in = '0;
    ack_in = 0; route_reply = '0;
    tick(); tick(); rst = 0;
    check("asleep after reset", !awake && !ack_out);

    give_pkt('{src: 0, req_id: 2, dst: ME, data: 12'h111, endsig: 0});
    check("packet ignored while asleep", !rx_valid && !awake);
    hello(4'h3);
    check("hello for other node ignored", !ack_out && !awake);

    // local delivery
    hello(ME);
    check("ack one cycle after hello", ack_out && awake);
    check("no forwarding or delivery yet", !rx_valid && !hello_out_valid && !rreq_valid);
    tick();
    check("ack lasts one cycle", !ack_out);
    p = '{src: 0, req_id: 2, dst: ME, data: 12'h321, endsig: 2'b01};
    give_pkt(p);
    tick();
    check("local delivery", rx_valid && rx_pkt == p);
    tick();
    check("asleep after delivery", !awake && !rx_valid);

    // unknown destination -> route request -> forward
    hello(ME); tick();
    p = '{src: 0, req_id: 3, dst: 4'h9, data: 12'hABC, endsig: 2'b10};
    give_pkt(p);
    tick();
    check("route request raised", rreq_valid && rreq_dst == 4'h9 && req == REQ_ROUTE);
    tick(); tick();
    check("awake while waiting for a route", awake && !pkt_out_valid && !hello_out_valid);
    route_reply = '{valid: 1, node: 4'h2, dst: 4'h9, next: 4'h7};  // not for me
    tick();
    check("reply for another node not taken", !hello_out_valid && awake);
    route_reply = '{valid: 1, node: ME, dst: 4'h9, next: 4'h6};
    tick();
    route_reply = '0;
    expect_forward(4'h6, p, -1);
    check("one route request so far", n_rreq == 1);

    // destination now known: no request
    hello(ME); tick();
    p = '{src: 0, req_id: 1, dst: 4'h9, data: 12'h0F0, endsig: 2'b11};
    give_pkt(p);
    expect_forward(4'h6, p, 1);
    check("no new route request", n_rreq == 1);

    // the route to 9 breaks: 6 and both neighbours stay silent -> drop,
    // and the next packet for 9 asks for a new route
    hello(ME); tick();
    give_pkt('{src: 0, req_id: 0, dst: 4'h9, data: 12'h123, endsig: 0});
    begin
      int n = 0;
      logic got = 0;
      while (n < 60 && !got) begin
        if (dropped) got = 1;
        check("no packet sent on a broken route", !pkt_out_valid);
        tick(); n++;
      end
      check("dropped on broken route", got);
      check("no route request while the route was known", n_rreq == 1);
    end
    tick();
    hello(ME); tick();
    p = '{src: 0, req_id: 2, dst: 4'h9, data: 12'h456, endsig: 2'b01};
    give_pkt(p);
    tick();
    check("new route requested after the break", rreq_valid && rreq_dst == 4'h9);
    tick();
    route_reply = '{valid: 1, node: ME, dst: 4'h9, next: 4'h8};
    tick();
    route_reply = '0;
    expect_forward(4'h8, p, -1);
    check("two route requests for 9", n_rreq == 2);

    // route reply never comes
    hello(ME); tick();
    give_pkt('{src: 0, req_id: 0, dst: 4'hB, data: 12'h5A5, endsig: 0});
    begin
      int n = 0;
      logic got = 0;
      while (n < 40 && !got) begin
        if (dropped) got = 1;
        tick(); n++;
      end
      check("dropped on missing route", got);
      check("route request for B", n_rreq == 3);
      tick();
      check("asleep after missing route", !awake);
    end

    // packet never comes
    hello(ME);
    repeat (RX_TIMEOUT + 1) tick();
    check("asleep after missing packet", !awake);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
