// hello_forwarder: the "hello, wait for response, send data" step that both
// the coordinator and a sensor node perform before they hand a packet on.
//
// On `start` the block latches the packet and the first hop and pulses
// `hello_valid` with `hello_addr` set to that hop. It then waits up to
// ACK_TIMEOUT cycles for `ack`. If the acknowledgment comes, the next cycle
// pulses `pkt_valid` with the packet and its hop address on `pkt_addr`, and
// `done` is pulsed. If no acknowledgment comes, it says hello to the next
// neighbour in NEIGHBORS, in order, and after the last one it gives up and
// pulses `dropped`. `busy` is high from `start` until `done` or `dropped`.
// Timing: hello is one cycle after start; with an ack on cycle k of the wait,
// the packet leaves one cycle later.
// The sequence (hello, response check, retry with the next neighbour, send)
// follows the operational flowchart of the design. The timeout length, the
// neighbour list as a parameter and the give-up rule are this
// implementation's choices.
module hello_forwarder
  import wsn_pkg::*;
#(
  parameter int unsigned ACK_TIMEOUT = 4,
  parameter int unsigned NUM_NB      = 2,
  parameter addr_t [NUM_NB-1:0] NEIGHBORS = '0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  addr_t   first_hop,
  input  packet_t pkt_in,
  output logic    busy,
  // hello / response
  output logic    hello_valid,
  output addr_t   hello_addr,
  input  logic    ack,
  // packet out
  output logic    pkt_valid,
  output packet_t pkt_out,
  output addr_t   pkt_addr,
  output logic    done,
  output logic    dropped
);

  typedef enum logic [2:0] {S_IDLE, S_HELLO, S_WAIT, S_SEND, S_NEXT} state_t;

  localparam int unsigned TW = $clog2(ACK_TIMEOUT + 1);
  localparam int unsigned NW = $clog2(NUM_NB + 1);

  state_t          state_q;
  packet_t         pkt_q;
  addr_t           hop_q;
  logic [TW-1:0]   timer_q;
  logic [NW-1:0]   nb_idx_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= S_IDLE;
      pkt_q    <= '0;
      hop_q    <= '0;
      timer_q  <= '0;
      nb_idx_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          pkt_q    <= pkt_in;
          hop_q    <= first_hop;
          nb_idx_q <= '0;
          state_q  <= S_HELLO;
        end
        S_HELLO: begin
          timer_q <= '0;
          state_q <= S_WAIT;
        end
        S_WAIT: begin
          if (ack) begin
            state_q <= S_SEND;
          end else if (timer_q == TW'(ACK_TIMEOUT - 1)) begin
            state_q <= S_NEXT;
          end else begin
            timer_q <= timer_q + 1'b1;
          end
        end
        S_NEXT: begin
          if (nb_idx_q == NW'(NUM_NB)) begin
            state_q <= S_IDLE;
          end else begin
            hop_q    <= NEIGHBORS[nb_idx_q];
            nb_idx_q <= nb_idx_q + 1'b1;
            state_q  <= S_HELLO;
          end
        end
        S_SEND:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state_q != S_IDLE);
    hello_valid = (state_q == S_HELLO);
    hello_addr  = hop_q;
    pkt_valid   = (state_q == S_SEND);
    pkt_out     = pkt_q;
    pkt_addr    = hop_q;
    done        = (state_q == S_SEND);
    dropped     = (state_q == S_NEXT) && (nb_idx_q == NW'(NUM_NB));
  end

  // Handshake rules: a packet leaves only on the cycle after an acknowledged
  // wait, and hello and packet strobes last one cycle.
  a_send_after_ack: assert property (@(posedge clk) disable iff (rst)
    pkt_valid |-> $past(ack && state_q == S_WAIT));
  a_hello_one_cycle: assert property (@(posedge clk) disable iff (rst)
    hello_valid |=> !hello_valid);
  a_pkt_one_cycle: assert property (@(posedge clk) disable iff (rst)
    pkt_valid |=> !pkt_valid);

endmodule
