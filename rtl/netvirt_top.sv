// netvirt_top: FPGA data plane of a virtual-network substrate in which
// hardware virtual routers live in partially-reconfigurable regions and can be
// replaced one at a time while the others keep forwarding; virtual networks
// that do not fit in hardware are served by software routers on the host.
//
// Data path (one 64-bit beat per cycle, 62.5 MHz in the reference system):
//   8 RX queues (MAC RX 0..3 on even ports, CPU RX 0..3 on odd ports)
//   -> input arbiter (round robin, whole packets)
//   -> packet classifier + Design Select Table (destination virtual IP ->
//      hardware router id / software router id)
//   -> NUM_PRR reconfigurable regions (one router each, reached through bus
//      macros), or the CPU transceiver (to the host's CPU DMA queues), or, for
//      packets returning from the host on CPU RX i, straight to MAC TX i
//   -> output queues: 8 TX queues (MAC TX on even ports, CPU TX on odd ports).
//
// Host registers (32-bit, word address): reg_req is applied in the cycle it is
// valid; reg_rdata is combinational from reg_req.addr. addr[15:12] selects:
//   0 Design Select Table, 1 router in region addr[23:16] (up to 256 regions),
//   3 CPU transceiver, 4 reconfiguration control:
//     write addr[11:4] = region, wdata[1:0] = 0 blank / 1 Config I / 2 Config II
//       starts a partial reconfiguration of that region;
//     read field 0 = {reconfiguring[31], configuration[1:0]}, field 1 =
//       completed reconfigurations, field 8..12 = classifier packet counts
//       (hardware, software, bypass, dropped, dropped for inactive region).
// The RX/TX beat metadata is ignored on input and filled in by the design.
// The block structure follows the document's system figure; widths, depths,
// the port numbering and the register map are this design's choices.
module netvirt_top
  import netvirt_pkg::*;
#(
  parameter int unsigned NUM_PRR         = 2,
  parameter int unsigned RECONFIG_CYCLES = 37_500_000,
  parameter int unsigned DST_ENTRIES     = 32,
  parameter int unsigned FT_ENTRIES      = 32,
  parameter int unsigned ARP_ENTRIES     = 32,
  parameter int unsigned SW_ENTRIES      = 16,
  parameter int unsigned Q_DEPTH         = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // receive side of the MAC and CPU DMA ports
  input  logic [NUM_PORTS-1:0] rx_valid,
  output logic [NUM_PORTS-1:0] rx_ready,
  input  pkt_beat_t            rx_beat [NUM_PORTS],
  // transmit side
  output logic [NUM_PORTS-1:0] tx_valid,
  input  logic [NUM_PORTS-1:0] tx_ready,
  output pkt_beat_t            tx_beat [NUM_PORTS],
  // host register access
  input  reg_req_t             reg_req,
  output logic [31:0]          reg_rdata,
  // region status
  output prr_cfg_e             prr_cfg [NUM_PRR],
  output logic [NUM_PRR-1:0]   prr_reconfiguring
);
  localparam int unsigned N_SRC = NUM_PRR + 2;

  // ---------------- RX queues ----------------
  logic [NUM_PORTS-1:0] rxq_valid, rxq_ready;
  pkt_beat_t            rxq_beat [NUM_PORTS];
  pkt_beat_t            rx_tagged [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rx
    always_comb begin
      rx_tagged[p]               = rx_beat[p];
      rx_tagged[p].meta.src_port = PORT_W'(p);
      rx_tagged[p].meta.dst_oh   = '0;
      rx_tagged[p].meta.vid      = '0;
    end
    pkt_fifo #(.DEPTH(Q_DEPTH)) u_rxq (
      .clk, .rst_n,
      .in_valid(rx_valid[p]), .in_ready(rx_ready[p]), .in_beat(rx_tagged[p]),
      .out_valid(rxq_valid[p]), .out_ready(rxq_ready[p]), .out_beat(rxq_beat[p]),
      .almost_full(), .count()
    );
  end

  // ---------------- input arbiter ----------------
  logic      arb_valid, arb_ready;
  pkt_beat_t arb_beat;

  input_arbiter #(.N(NUM_PORTS)) u_arb (
    .clk, .rst_n,
    .in_valid(rxq_valid), .in_ready(rxq_ready), .in_beat(rxq_beat),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_beat(arb_beat),
    .grant_idx()
  );

  // ---------------- host register decode ----------------
  logic        we;
  logic [3:0]  blk;
  logic [7:0]  vr_sel;
  assign we     = reg_req.valid && reg_req.write;
  assign blk    = reg_req.addr[15:12];
  assign vr_sel = reg_req.addr[23:16];

  // ---------------- classifier ----------------
  logic [NUM_PRR-1:0] prr_active, hw_valid, hw_ready;
  pkt_beat_t          hw_beat, sw_beat, byp_beat;
  logic               sw_valid, sw_ready, byp_valid, byp_ready;
  logic [31:0]        dst_rdata;
  logic [31:0]        c_hw, c_sw, c_byp, c_drop, c_drop_inact;

  packet_classifier #(.NUM_PRR(NUM_PRR), .DST_ENTRIES(DST_ENTRIES), .BUF_DEPTH(Q_DEPTH)) u_cls (
    .clk, .rst_n,
    .reg_we(we && blk == RB_DST), .reg_addr(reg_req.addr[11:0]), .reg_wdata(reg_req.wdata),
    .reg_rdata(dst_rdata),
    .prr_active,
    .in_valid(arb_valid), .in_ready(arb_ready), .in_beat(arb_beat),
    .hw_valid, .hw_ready, .hw_beat,
    .sw_valid, .sw_ready, .sw_beat,
    .byp_valid, .byp_ready, .byp_beat,
    .cnt_hw(c_hw), .cnt_sw(c_sw), .cnt_bypass(c_byp), .cnt_drop(c_drop),
    .cnt_drop_inactive(c_drop_inact)
  );

  // ---------------- reconfigurable regions ----------------
  logic [N_SRC-1:0] oq_valid, oq_ready;
  pkt_beat_t        oq_beat [N_SRC];
  logic [31:0]      prr_rdata [NUM_PRR];
  logic [31:0]      prr_reconf_cnt [NUM_PRR];
  logic [NUM_PRR-1:0] cfg_req_valid;

  for (genvar r = 0; r < NUM_PRR; r++) begin : g_prr
    assign cfg_req_valid[r] = we && blk == RB_PR && reg_req.addr[11:4] == 8'(r)
                              && reg_req.addr[3:0] == 4'd0;
    prr #(.RECONFIG_CYCLES(RECONFIG_CYCLES), .FT_ENTRIES(FT_ENTRIES),
          .ARP_ENTRIES(ARP_ENTRIES), .BUF_DEPTH(Q_DEPTH)) u_prr (
      .clk, .rst_n,
      .cfg_req_valid(cfg_req_valid[r]), .cfg_req(prr_cfg_e'(reg_req.wdata[1:0])),
      .cfg_loaded(prr_cfg[r]), .reconfiguring(prr_reconfiguring[r]), .active(prr_active[r]),
      .reg_we(we && blk == RB_VR && vr_sel == 8'(r)), .reg_addr(reg_req.addr[11:0]),
      .reg_wdata(reg_req.wdata), .reg_rdata(prr_rdata[r]),
      .in_valid(hw_valid[r]), .in_ready(hw_ready[r]), .in_beat(hw_beat),
      .out_valid(oq_valid[r]), .out_ready(oq_ready[r]), .out_beat(oq_beat[r]),
      .fwd_count(), .reconfig_count(prr_reconf_cnt[r])
    );
  end

  // ---------------- CPU transceiver ----------------
  logic [31:0] cpu_rdata;

  cpu_transceiver #(.SW_ENTRIES(SW_ENTRIES)) u_cpu (
    .clk, .rst_n,
    .reg_we(we && blk == RB_CPU), .reg_addr(reg_req.addr[11:0]), .reg_wdata(reg_req.wdata),
    .reg_rdata(cpu_rdata),
    .in_valid(sw_valid), .in_ready(sw_ready), .in_beat(sw_beat),
    .out_valid(oq_valid[NUM_PRR]), .out_ready(oq_ready[NUM_PRR]), .out_beat(oq_beat[NUM_PRR]),
    .pkt_count()
  );

  assign oq_valid[NUM_PRR+1] = byp_valid;
  assign byp_ready           = oq_ready[NUM_PRR+1];
  assign oq_beat[NUM_PRR+1]  = byp_beat;

  // ---------------- output queues ----------------
  output_queues #(.N_SRC(N_SRC), .Q_DEPTH(Q_DEPTH)) u_oq (
    .clk, .rst_n,
    .in_valid(oq_valid), .in_ready(oq_ready), .in_beat(oq_beat),
    .tx_valid, .tx_ready, .tx_beat,
    .drop_count()
  );

  // ---------------- register read mux ----------------
  logic [7:0] rsel;
  assign rsel = reg_req.addr[11:4];

  always_comb begin
    reg_rdata = 32'd0;
    if (blk == RB_DST) reg_rdata = dst_rdata;
    else if (blk == RB_CPU) reg_rdata = cpu_rdata;
    else if (blk == RB_PR) begin
      unique case (reg_req.addr[3:0])
        4'd8:  reg_rdata = c_hw;
        4'd9:  reg_rdata = c_sw;
        4'd10: reg_rdata = c_byp;
        4'd11: reg_rdata = c_drop;
        4'd12: reg_rdata = c_drop_inact;
        default: ;
      endcase
      for (int r = 0; r < NUM_PRR; r++) begin
        if (32'(rsel) == r && reg_req.addr[3:0] == 4'd0)
          reg_rdata = {prr_reconfiguring[r], 29'd0, prr_cfg[r]};
        if (32'(rsel) == r && reg_req.addr[3:0] == 4'd1)
          reg_rdata = prr_reconf_cnt[r];
      end
    end else begin
      for (int r = 0; r < NUM_PRR; r++)
        if (blk == RB_VR && 32'(vr_sel) == r) reg_rdata = prr_rdata[r];
    end
  end

endmodule
