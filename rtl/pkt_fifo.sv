// pkt_fifo: synchronous FIFO of packet beats, used for every RX queue (MAC RX Q,
// CPU RX Q), every per-port output/TX queue, and the packet buffers inside the
// classifier, routers and CPU transceiver.
//
// A plain circular buffer in an array (block RAM style): write on in_valid &&
// in_ready, read on out_valid && out_ready. in_ready is low only when full.
// out_valid rises one cycle after the first write (registered count), so the
// fall-through latency is 1 cycle and the throughput is one beat per cycle.
// almost_full is high when fewer than AF_SLACK entries are free, for senders
// that see back-pressure late (the bus-macro links). The document names the
// queues but not their depth, width or organisation; all are choices here.
module pkt_fifo
  import netvirt_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,  // beats: 2 KB, one maximum-size Ethernet frame
  parameter int unsigned AF_SLACK = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pkt_beat_t in_beat,
  output logic      out_valid,
  input  logic      out_ready,
  output pkt_beat_t out_beat,
  output logic      almost_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  pkt_beat_t      mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic           do_wr, do_rd;

  assign in_ready    = (count != DEPTH[AW:0]);
  assign out_valid   = (count != '0);
  assign out_beat    = mem[rd_ptr];
  assign almost_full = (count > (DEPTH[AW:0] - AF_SLACK[AW:0]));
  assign do_wr       = in_valid && in_ready;
  assign do_rd       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // Handshake rule: a beat offered must stay stable until accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_beat));

endmodule
