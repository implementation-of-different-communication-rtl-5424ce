// tl_buffer - TileLink buffer on a link between two neighbouring tiles.
//
// Every neighbour link passes through one buffer stage in each direction
// (A channel towards the manager, D channel back to the client). The stage
// cuts every combinational path through the link, valid, payload and
// ready alike, so that chains of links between tiles cannot close a
// combinational loop, and it delays a beat by exactly one cycle. Each
// channel is a two-entry FIFO: a beat accepted at one edge is offered on
// the far side from the next cycle, ready on the near side depends only on
// the FIFO's own fill level, and back-to-back beats pass at full rate.
// The buffer and its one-cycle delay follow the design description; the
// two-entry depth is this design's choice.
module tl_buffer
  import gpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // client side (towards the requesting tile)
  input  logic  c_a_valid,
  output logic  c_a_ready,
  input  tl_a_t c_a,
  output logic  c_d_valid,
  input  logic  c_d_ready,
  output tl_d_t c_d,
  // manager side (towards the neighbour's DTIM adapter)
  output logic  m_a_valid,
  input  logic  m_a_ready,
  output tl_a_t m_a,
  input  logic  m_d_valid,
  output logic  m_d_ready,
  input  tl_d_t m_d
);
  tl_fifo2 #(.T(tl_a_t)) u_a (
    .clk, .rst_n,
    .in_valid (c_a_valid), .in_ready (c_a_ready), .in_data (c_a),
    .out_valid(m_a_valid), .out_ready(m_a_ready), .out_data(m_a)
  );
  tl_fifo2 #(.T(tl_d_t)) u_d (
    .clk, .rst_n,
    .in_valid (m_d_valid), .in_ready (m_d_ready), .in_data (m_d),
    .out_valid(c_d_valid), .out_ready(c_d_ready), .out_data(c_d)
  );
endmodule
