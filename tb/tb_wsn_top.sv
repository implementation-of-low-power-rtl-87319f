// tb_wsn_top: end-to-end test of wsn_top at its default parameters.
//
// The testbench plays the rest of the network: it acknowledges onward hellos
// from the sensor node for the addresses in `ack_mask` and records the
// packets the node sends on. Scenarios, each checked against expected
// packets worked out here:
//  1. coordinator -> node 1, clean link: local delivery;
//  2. the same with one random bit of the 29-bit code word flipped on every
//     packet: the Hamming decoder restores the packet;
//  3. a packet for 9: the node has no route, asks the coordinator (request
//     01), gets "9 direct", says hello to 9 and forwards with request 00;
//  4. a second packet for 9: forwarded with no route request;
//  5. a packet for B, where B never answers: the node retries its
//     neighbours 4 (silent) and 5 (answers) and forwards to 5;
//  6. a packet for C where nobody answers: the node drops it and forgets the
//     route; once C answers, the next packet asks for the route again;
//  7. a packet from the coordinator to D, which nobody acknowledges: the
//     coordinator tries its neighbours and drops it;
//  8. the CRC-16 link with clean, single-error and double-error frames.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_wsn_top;
  import wsn_pkg::*;

  logic clk = 0, rst;
  logic send, coord_busy, coord_dropped, cfg_we;
  logic [DATA_W-1:0] data;
  addr_t dcode, cfg_dst, cfg_next;
  logic [END_W-1:0] endsig;
  packet_t data_packet;
  logic [28:0] ham_noise;
  logic [4:0]  ham_syndrome;
  logic ham_err, ham_uncorrectable;
  logic node_awake, node_rx_valid, node_dropped;
  req_t node_req;
  packet_t node_rx_pkt;
  logic next_hello_valid, next_ack, next_pkt_valid;
  logic link_hello_valid, link_ack, link_pkt_valid, node_rreq_valid;
  addr_t link_hello_addr;
  addr_t next_hello_addr, next_pkt_addr;
  packet_t next_pkt;
  logic [15:0] crc_dtr, crc_data;
  logic [31:0] crc_noise;
  logic [5:0]  crc_pos;
  logic crc_err, crc_corrected, crc_uncorrectable;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_local = 0, n_ham_fix = 0, n_route_req = 0, n_forward = 0, n_retry = 0;
  int n_node_drop = 0, n_coord_drop = 0, n_wake = 0, n_crc_fix = 0, n_crc_detect = 0;

  logic [15:0] ack_mask;
  packet_t     fwd_q [$];
  addr_t       fwd_addr_q [$];
  logic        unanswered;
  int          n_coord_hello = 0;
  logic        awake_d;

  always #5 clk = ~clk;

  wsn_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  // the rest of the network, and the event counters
  always @(posedge clk) begin
    if (rst) begin
      next_ack   <= 0;
      awake_d    <= 0;
      unanswered <= 0;
    end else begin
      next_ack <= next_hello_valid && ack_mask[next_hello_addr];
      awake_d  <= node_awake;
      if (node_awake && !awake_d) n_wake++;
      // a hello that follows an unanswered one, with no packet or drop
      // between them, is a retry with the next neighbour
      if (next_hello_valid) begin
        if (unanswered) n_retry++;
        unanswered <= !ack_mask[next_hello_addr];
      end
      if (next_pkt_valid || node_dropped) unanswered <= 0;
      if (link_hello_valid) n_coord_hello++;
      if (next_pkt_valid) begin
        fwd_q.push_back(next_pkt);
        fwd_addr_q.push_back(next_pkt_addr);
        n_forward++;
      end
      if (node_rx_valid) n_local++;
      if (node_dropped) n_node_drop++;
      if (coord_dropped) n_coord_drop++;
      if (node_rreq_valid) begin
        n_route_req++;
        check("route request carries code 01", node_req == REQ_ROUTE);
      end
      if (link_pkt_valid && ham_err && !ham_uncorrectable) n_ham_fix++;
    end
  end

  // run one packet from the coordinator and wait for the network to settle
  task automatic run_packet(input addr_t dst, input logic [11:0] d, input logic [1:0] e,
                            input logic flip);
    int n = 0;
    ham_noise = flip ? (29'(1) << $urandom_range(28, 0)) : '0;
    dcode = dst; data = d; endsig = e; send = 1;
    tick(); send = 0;
    while ((coord_busy || node_awake) && n < 500) begin tick(); n++; end
    check("network settles", n < 500);
    tick();
    ham_noise = '0;
  endtask

  function automatic packet_t mk(input addr_t dst, input req_t id, input logic [11:0] d,
                                 input logic [1:0] e);
    return '{src: 4'h0, req_id: id, dst: dst, data: d, endsig: e};
  endfunction

  initial begin
    packet_t exp;
    int local_before;
    req_t id;
    rst = 1; send = 0; cfg_we = 0; cfg_dst = 0; cfg_next = 0; data = 0; dcode = 0;
    endsig = 0; ham_noise = 0; crc_dtr = 0; crc_noise = 0; ack_mask = '0;
    tick(); tick(); rst = 0; tick();
    check("node asleep after reset", !node_awake);

    // coordinator routes: 9, B, C and 1 all through node 1
    cfg_we = 1;
    cfg_dst = 4'h9; cfg_next = 4'h1; tick();
    cfg_dst = 4'hB; tick();
    cfg_dst = 4'hC; tick();
    cfg_we = 0;

    id = '0;
    // 1. local delivery, clean
    for (int i = 0; i < 4; i++) begin
      local_before = n_local;
      exp = mk(4'h1, id, 12'(16'h321 + i), 2'(i));
      fork
        begin
          @(posedge clk iff node_rx_valid); #1;
          check("local packet", node_rx_pkt == exp);
        end
        run_packet(4'h1, 12'(16'h321 + i), 2'(i), 0);
      join
      check("one local delivery", n_local == local_before + 1);
      check("asleep afterwards", !node_awake);
      id++;
    end
    // 2. local delivery through a noisy link
    for (int i = 0; i < 30; i++) begin
      exp = mk(4'h1, id, 12'($urandom), 2'($urandom));
      fork
        begin
          @(posedge clk iff node_rx_valid); #1;
          check("corrected packet", node_rx_pkt == exp);
        end
        run_packet(4'h1, exp.data, exp.endsig, 1);
      join
      id++;
    end
    check("every noisy packet corrected", n_ham_fix == 30);

    // 3. unknown route to 9
    ack_mask = 16'h0200;   // node 9 answers
    exp = mk(4'h9, REQ_DATA, 12'hABC, 2'b10);
    run_packet(4'h9, 12'hABC, 2'b10, 1);
    id++;
    check("route requested once", n_route_req == 1);
    check("forwarded to 9", fwd_q.size() == 1 && fwd_addr_q[0] == 4'h9 &&
          fwd_q[0] == exp);
    // 4. known route to 9
    exp = mk(4'h9, REQ_DATA, 12'h0F0, 2'b01);
    run_packet(4'h9, 12'h0F0, 2'b01, 0);
    id++;
    check("no second route request", n_route_req == 1);
    check("forwarded to 9 again", fwd_q.size() == 2 && fwd_addr_q[1] == 4'h9 &&
          fwd_q[1] == exp);
    // 5. B silent: neighbour 4 silent, neighbour 5 answers
    ack_mask = 16'h0020;
    exp = mk(4'hB, REQ_DATA, 12'h5A5, 2'b11);
    run_packet(4'hB, 12'h5A5, 2'b11, 0);
    id++;
    check("route requested for B", n_route_req == 2);
    check("forwarded to neighbour 5", fwd_q.size() == 3 && fwd_addr_q[2] == 4'h5 &&
          fwd_q[2] == exp);
    // 6. nobody answers for C
    ack_mask = '0;
    run_packet(4'hC, 12'h777, 2'b00, 0);
    id++;
    check("node dropped C", n_node_drop == 1 && fwd_q.size() == 3);
    check("two neighbour retries for B and two for C", n_retry == 4);
    // 6b. C comes up: the node asks again for the route it had to drop
    ack_mask = 16'h1000;
    exp = mk(4'hC, REQ_DATA, 12'h778, 2'b01);
    run_packet(4'hC, 12'h778, 2'b01, 0);
    id++;
    check("route re-requested for C", n_route_req == 4);
    check("forwarded to C", fwd_q.size() == 4 && fwd_addr_q[3] == 4'hC && fwd_q[3] == exp);
    ack_mask = '0;
    // 7. coordinator cannot reach D
    local_before = n_coord_hello;
    run_packet(4'hD, 12'h999, 2'b00, 0);
    check("coordinator said hello to D, 2 and 3", n_coord_hello == local_before + 3);
    check("coordinator dropped D", n_coord_drop == 1);
    check("node stayed asleep for D", n_local == 34 && fwd_q.size() == 4);
    check("packet register holds D", data_packet.dst == 4'hD && data_packet.data == 12'h999);

    // 8. CRC-16 link
    for (int i = 0; i < 200; i++) begin
      int x, y;
      logic [15:0] d;
      d = 16'($urandom);
      crc_dtr = d;
      x = $urandom_range(31, 0);
      y = (x + 1 + $urandom_range(30, 0)) % 32;
      case (i % 3)
        0: crc_noise = '0;
        1: crc_noise = 32'(1) << x;
        default: crc_noise = (32'(1) << x) | (32'(1) << y);
      endcase
      #1;
      if (i % 3 == 0) check("crc clean", !crc_err && crc_data == d);
      if (i % 3 == 1) begin
        check("crc single corrected", crc_corrected && crc_data == d);
        if (crc_corrected) n_crc_fix++;
      end
      if (i % 3 == 2) begin
        check("crc double detected", crc_err);
        if (crc_err) n_crc_detect++;
      end
    end

    $display("mechanisms: local=%0d hamming_fix=%0d route_req=%0d forward=%0d retry=%0d",
             n_local, n_ham_fix, n_route_req, n_forward, n_retry);
    $display("            node_drop=%0d coord_drop=%0d wake=%0d crc_fix=%0d crc_detect=%0d",
             n_node_drop, n_coord_drop, n_wake, n_crc_fix, n_crc_detect);
    check("local delivery happened", n_local > 0);
    check("hamming correction happened", n_ham_fix > 0);
    check("route request happened", n_route_req > 0);
    check("forwarding happened", n_forward > 0);
    check("neighbour retry happened", n_retry > 0);
    check("node drop happened", n_node_drop > 0);
    check("coordinator drop happened", n_coord_drop > 0);
    check("wake-up happened", n_wake > 0);
    check("crc correction happened", n_crc_fix > 0);
    check("crc detection happened", n_crc_detect > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
