// route_lut: the routing look-up table held by every node.
//
// One entry per destination address (16 for 4-bit addresses). An entry holds
// a valid bit and the next-hop address towards that destination. Reads are
// combinational on two independent ports, so a node can look up the
// destination of its own packet and answer a route request in the same cycle.
// Writes take effect at the next rising clock edge. `inv` clears the valid
// bit of `inv_dst` (a write to the same entry in the same cycle wins). Reset
// clears every valid bit: a node starts knowing no route and learns them from
// the coordinator, or, for the coordinator, from the configuration port.
// The table itself is the design's; its depth, the valid bit, the two read
// ports and the reset behaviour are this implementation's choices.
module route_lut
  import wsn_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // write port
  input  logic  we,
  input  addr_t wr_dst,
  input  addr_t wr_next,
  // invalidate port
  input  logic  inv,
  input  addr_t inv_dst,
  // read port A
  input  addr_t rd_dst_a,
  output logic  hit_a,
  output addr_t next_a,
  // read port B
  input  addr_t rd_dst_b,
  output logic  hit_b,
  output addr_t next_b
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DEPTH-1:0] valid_q;
  addr_t            next_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
    end else begin
      if (inv) valid_q[inv_dst] <= 1'b0;
      if (we)  valid_q[wr_dst]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) next_q[wr_dst] <= wr_next;
  end

  always_comb begin
    hit_a  = valid_q[rd_dst_a];
    next_a = next_q[rd_dst_a];
    hit_b  = valid_q[rd_dst_b];
    next_b = next_q[rd_dst_b];
  end

endmodule
