// netvirt_pkg: types and constants shared by the virtual-network data plane.
//
// Packets move between blocks as a stream of 64-bit beats with valid/ready
// handshaking. Byte 0 of a beat sits in data[63:56] (network order). Each beat
// carries the packet's sideband metadata (source port, one-hot destination
// ports, virtual-router id), constant over the packet. The 64-bit word, the
// byte-enable "keep" field and the port numbering (even = MAC port, odd = CPU
// DMA port, interleaved as the queues are drawn) are this design's choices;
// the document gives neither a bus width nor a port numbering.
package netvirt_pkg;

  localparam int unsigned DATA_W    = 64;
  localparam int unsigned KEEP_W    = DATA_W / 8;
  localparam int unsigned NUM_PORTS = 8;              // 4 MAC + 4 CPU DMA queues
  localparam int unsigned PORT_W    = $clog2(NUM_PORTS);
  localparam int unsigned VID_W     = 8;

  typedef struct packed {
    logic [PORT_W-1:0]    src_port;  // RX queue the packet arrived on
    logic [NUM_PORTS-1:0] dst_oh;    // one-hot output queue, 0 = not yet known
    logic [VID_W-1:0]     vid;       // virtual router id from the Design Select Table
  } pkt_meta_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [KEEP_W-1:0] keep;         // valid bytes, MSB = byte 0
    logic              eop;          // last beat of the packet
    pkt_meta_t         meta;
  } pkt_beat_t;

  // Design Select Table result.
  typedef enum logic [1:0] {
    VR_NONE = 2'd0,                  // no entry: packet dropped
    VR_HW   = 2'd1,                  // hardware virtual router in a PRR
    VR_SW   = 2'd2                   // software virtual router on the host
  } vr_type_e;

  // Router configurations held by a partially-reconfigurable region.
  typedef enum logic [1:0] {
    CFG_BLANK = 2'd0,                // blank bitstream: region empty
    CFG_DEST  = 2'd1,                // Configuration I: destination-IP routing
    CFG_FLOW  = 2'd2                 // Configuration II: flow (src+dst prefix) routing
  } prr_cfg_e;

  // Host register bus, carried over PCI in the board. Word addresses.
  typedef struct packed {
    logic        valid;
    logic        write;
    logic [23:0] addr;
    logic [31:0] wdata;
  } reg_req_t;

  // Register address map: addr[15:12] selects the block; for the router
  // block, addr[23:16] selects the region.
  localparam logic [3:0] RB_DST  = 4'h0;  // Design Select Table
  localparam logic [3:0] RB_VR   = 4'h1;  // router in region addr[23:16]
  localparam logic [3:0] RB_CPU  = 4'h3;  // CPU transceiver
  localparam logic [3:0] RB_PR   = 4'h4;  // reconfiguration control

  localparam logic [15:0] ETH_IPV4 = 16'h0800;

  function automatic logic [7:0] beat_byte(input logic [DATA_W-1:0] d, input int unsigned k);
    return d[DATA_W-1-8*k -: 8];
  endfunction

  // One's-complement 16-bit add with end-around carry.
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
