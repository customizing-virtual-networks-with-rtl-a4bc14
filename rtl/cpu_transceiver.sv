// cpu_transceiver: hands packets of software virtual routers to the host.
//
// Packets arrive from the classifier with the software router's id in their
// metadata. The transceiver rewrites the layer-2 destination address (bytes
// 0..5 of the first beat) with the MAC address of that router's virtual
// Ethernet interface on the host, and steers the packet to CPU DMA queue
// (id mod 4), i.e. output port 2*(id mod 4)+1. The stream passes straight
// through: no buffering, zero latency, one beat per cycle. MAC addresses are
// written by the host: entry = addr[11:4] (router id), word addr[0]: 0 =
// MAC[47:32], 1 = MAC[31:0]. The layer-2 rewrite before the CPU DMA queues
// follows the document; which address is written and how a queue is chosen
// are this design's choices.
module cpu_transceiver
  import netvirt_pkg::*;
#(
  parameter int unsigned SW_ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_beat_t   in_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_beat_t   out_beat,
  output logic [31:0] pkt_count
);
  localparam int unsigned EW = $clog2(SW_ENTRIES);

  logic [47:0] vmac [SW_ENTRIES];
  logic        first;               // next beat starts a packet
  logic [EW-1:0] sel, rid;

  assign sel = reg_addr[4+EW-1:4];
  assign rid = in_beat.meta.vid[EW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < SW_ENTRIES; e++) vmac[e] <= '0;
    end else if (reg_we && 32'(reg_addr[11:4]) < SW_ENTRIES) begin
      if (reg_addr[0]) vmac[sel][31:0]  <= reg_wdata;
      else             vmac[sel][47:32] <= reg_wdata[15:0];
    end
  end

  assign reg_rdata = reg_addr[0] ? vmac[sel][31:0] : {16'd0, vmac[sel][47:32]};

  always_comb begin
    out_beat             = in_beat;
    out_beat.meta.dst_oh = NUM_PORTS'(1) << {in_beat.meta.vid[1:0], 1'b1};
    if (first) out_beat.data[63:16] = vmac[rid];
  end
  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first     <= 1'b1;
      pkt_count <= '0;
    end else if (in_valid && out_ready) begin
      first <= in_beat.eop;
      if (in_beat.eop) pkt_count <= pkt_count + 1;
    end
  end

endmodule
