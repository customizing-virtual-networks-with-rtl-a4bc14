// output_queues: collects the packets leaving the hardware routers, the CPU
// transceiver and the CPU-to-MAC bypass, and queues each in the FIFO of its
// output port (MAC TX or CPU TX queue).
//
// The N_SRC source streams are merged a packet at a time by a round-robin
// input_arbiter; each packet is written to the queue named by the lowest set
// bit of its one-hot destination, and a packet with no destination is
// discarded. A full queue holds the merged stream (back-pressure), so the
// sources see it as ready low. One beat per cycle in, one beat per cycle out of
// each of the eight queues. The document draws the output queues feeding the
// MAC and CPU TX queues; the merge, the queue depth and the back-pressure
// policy are this design's choices.
module output_queues
  import netvirt_pkg::*;
#(
  parameter int unsigned N_SRC     = 4,
  parameter int unsigned Q_DEPTH   = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_SRC-1:0]     in_valid,
  output logic [N_SRC-1:0]     in_ready,
  input  pkt_beat_t            in_beat [N_SRC],
  output logic [NUM_PORTS-1:0] tx_valid,
  input  logic [NUM_PORTS-1:0] tx_ready,
  output pkt_beat_t            tx_beat [NUM_PORTS],
  output logic [31:0]          drop_count
);
  logic      m_valid, m_ready;
  pkt_beat_t m_beat;
  logic [NUM_PORTS-1:0] q_ready;
  logic [PORT_W-1:0]    port;
  logic                 none;

  input_arbiter #(.N(N_SRC)) u_merge (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_beat,
    .out_valid(m_valid), .out_ready(m_ready), .out_beat(m_beat),
    .grant_idx()
  );

  always_comb begin
    port = '0;
    none = 1'b1;
    for (int p = NUM_PORTS - 1; p >= 0; p--) begin
      if (m_beat.meta.dst_oh[p]) begin
        port = PORT_W'(p);
        none = 1'b0;
      end
    end
  end

  assign m_ready = none ? 1'b1 : q_ready[port];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_q
    pkt_fifo #(.DEPTH(Q_DEPTH)) u_q (
      .clk, .rst_n,
      .in_valid(m_valid && !none && port == PORT_W'(p)), .in_ready(q_ready[p]),
      .in_beat(m_beat),
      .out_valid(tx_valid[p]), .out_ready(tx_ready[p]), .out_beat(tx_beat[p]),
      .almost_full(), .count()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_count <= '0;
    else if (m_valid && none && m_beat.eop) drop_count <= drop_count + 1;
  end

endmodule
