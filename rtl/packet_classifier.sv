// packet_classifier: assigns every incoming packet to a hardware virtual
// router (one of the partially-reconfigurable regions), to the CPU transceiver
// (software virtual routers on the host), or, for packets that come back from
// the host through a CPU RX queue, straight to the output queues.
//
// How it works: packets are stored whole in a buffer while the header is
// parsed. At the end-of-packet beat a decision is made and queued:
//   * from a CPU RX queue (odd port 2i+1): bypass to MAC TX queue i (port 2i);
//   * not IPv4, shorter than 34 bytes, or destination IP not in the Design
//     Select Table: drop;
//   * table hit of type HW: send to region <id> (dropped if id is out of range);
//   * table hit of type SW: send to the CPU transceiver with the id.
// On the output side the decision at the head of the queue steers the buffered
// packet. A packet for a region that is not active (blank or being
// reconfigured) at that moment is dropped, not held, so a region under
// reconfiguration never stalls the traffic of the other virtual networks.
// Latency: store-and-forward, the first beat leaves 2 cycles after the last
// beat entered. Throughput: one beat per cycle.
// The Design Select Table with VIP/TYPE/ID columns and the use of the
// destination virtual IP follow the document; store-and-forward, the drop
// rules and the CPU-to-MAC bypass port mapping are this design's choices.
module packet_classifier
  import netvirt_pkg::*;
#(
  parameter int unsigned NUM_PRR     = 2,
  parameter int unsigned DST_ENTRIES = 32,
  parameter int unsigned BUF_DEPTH   = 256,
  parameter int unsigned DEC_DEPTH   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // Design Select Table register port
  input  logic               reg_we,
  input  logic [11:0]        reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // region status: 1 = a router is loaded and running
  input  logic [NUM_PRR-1:0] prr_active,
  // input stream from the input arbiter
  input  logic               in_valid,
  output logic               in_ready,
  input  pkt_beat_t          in_beat,
  // to the hardware virtual routers
  output logic [NUM_PRR-1:0] hw_valid,
  input  logic [NUM_PRR-1:0] hw_ready,
  output pkt_beat_t          hw_beat,
  // to the CPU transceiver
  output logic               sw_valid,
  input  logic               sw_ready,
  output pkt_beat_t          sw_beat,
  // bypass to the output queues
  output logic               byp_valid,
  input  logic               byp_ready,
  output pkt_beat_t          byp_beat,
  // event counters (packets)
  output logic [31:0]        cnt_hw,
  output logic [31:0]        cnt_sw,
  output logic [31:0]        cnt_bypass,
  output logic [31:0]        cnt_drop,
  output logic [31:0]        cnt_drop_inactive
);
  typedef enum logic [1:0] {T_DROP, T_HW, T_SW, T_BYP} target_e;
  typedef struct packed {
    target_e              target;
    logic [VID_W-1:0]     id;
    logic [NUM_PORTS-1:0] dst_oh;
  } dec_t;

  localparam int unsigned DW = $clog2(DEC_DEPTH);

  // ---------------- ingress: buffer + header parse ----------------
  logic      buf_in_ready, buf_out_valid, buf_out_ready;
  pkt_beat_t buf_out_beat;
  logic      dec_full, dec_empty;
  logic      acc;
  logic [2:0]  idx;           // beat index inside the packet, saturating at 5
  logic [15:0] ethertype_q;
  logic [15:0] dip_hi_q;
  logic [15:0] dip_lo_q;
  logic        long_enough;
  logic [31:0] dip_now;
  logic        dst_hit;
  vr_type_e    dst_type;
  logic [VID_W-1:0] dst_id;
  dec_t        dec_new;

  assign in_ready = buf_in_ready && !dec_full;
  assign acc      = in_valid && in_ready;

  pkt_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid(acc), .in_ready(buf_in_ready), .in_beat(in_beat),
    .out_valid(buf_out_valid), .out_ready(buf_out_ready), .out_beat(buf_out_beat),
    .almost_full(), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx         <= '0;
      ethertype_q <= '0;
      dip_hi_q    <= '0;
    end else if (acc) begin
      if (idx == 3'd1) ethertype_q <= in_beat.data[31:16];
      if (idx == 3'd3) dip_hi_q    <= in_beat.data[15:0];
      if (in_beat.eop)        idx <= '0;
      else if (idx != 3'd5)   idx <= idx + 1'b1;
    end
  end

  // the destination IP ends in bytes 32..33, the first two bytes of beat 4
  assign long_enough = ((idx == 3'd4) && (in_beat.keep[7:6] == 2'b11)) || (idx == 3'd5);
  assign dip_now     = {dip_hi_q, (idx == 3'd4) ? in_beat.data[63:48] : dip_lo_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dip_lo_q <= '0;
    else if (acc && idx == 3'd4) dip_lo_q <= in_beat.data[63:48];
  end

  design_select_table #(.ENTRIES(DST_ENTRIES)) u_dst (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .key_vip(dip_now), .hit(dst_hit), .hit_type(dst_type), .hit_id(dst_id)
  );

  always_comb begin
    dec_new = '{target: T_DROP, id: '0, dst_oh: '0};
    if (in_beat.meta.src_port[0]) begin
      dec_new.target = T_BYP;
      dec_new.dst_oh = NUM_PORTS'(1) << (in_beat.meta.src_port - 1'b1);
    end else if (long_enough && ethertype_q == ETH_IPV4 && dst_hit) begin
      dec_new.id = dst_id;
      if (dst_type == VR_SW)
        dec_new.target = T_SW;
      else if (dst_type == VR_HW && 32'(dst_id) < NUM_PRR)
        dec_new.target = T_HW;
    end
  end

  // ---------------- decision queue ----------------
  dec_t         dec_mem [DEC_DEPTH];
  logic [DW-1:0] dec_wp, dec_rp;
  logic [DW:0]   dec_cnt;
  logic          dec_push, dec_pop;
  dec_t          dec_head;

  assign dec_full  = (dec_cnt == DEC_DEPTH[DW:0]);
  assign dec_empty = (dec_cnt == '0);
  assign dec_push  = acc && in_beat.eop;
  assign dec_head  = dec_mem[dec_rp];

  always_ff @(posedge clk) if (dec_push) dec_mem[dec_wp] <= dec_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_wp <= '0; dec_rp <= '0; dec_cnt <= '0;
    end else begin
      if (dec_push) dec_wp <= dec_wp + 1'b1;
      if (dec_pop)  dec_rp <= dec_rp + 1'b1;
      dec_cnt <= dec_cnt + (DW+1)'(dec_push) - (DW+1)'(dec_pop);
    end
  end

  // ---------------- egress ----------------
  logic    in_pkt;            // a packet is being sent, route latched
  target_e route_q;
  logic [VID_W-1:0] rid_q;
  target_e route;
  logic [VID_W-1:0] rid;
  logic    fire, sink_ready;
  pkt_beat_t ob;
  logic [NUM_PORTS-1:0] dst_oh_q;
  logic    drop_inactive_q;
  localparam int unsigned RW = $clog2(NUM_PRR > 1 ? NUM_PRR : 2);

  // the decision is read from the queue head at the first beat, then latched
  always_comb begin
    route = in_pkt ? route_q : dec_head.target;
    rid   = in_pkt ? rid_q   : dec_head.id;
    if (!in_pkt && dec_head.target == T_HW && !prr_active[rid[RW-1:0]])
      route = T_DROP;
  end

  always_comb begin
    ob = buf_out_beat;
    if (!in_pkt) begin
      ob.meta.vid    = dec_head.id;
      ob.meta.dst_oh = dec_head.dst_oh;
    end else begin
      ob.meta.vid    = rid_q;
      ob.meta.dst_oh = dst_oh_q;
    end
  end

  logic active_beat;
  assign active_beat = buf_out_valid && (in_pkt || !dec_empty);

  always_comb begin
    hw_valid  = '0;
    sw_valid  = 1'b0;
    byp_valid = 1'b0;
    sink_ready = 1'b1;        // drop sinks everything
    unique case (route)
      T_HW:  begin hw_valid[rid[RW-1:0]] = active_beat;
                   sink_ready = hw_ready[rid[RW-1:0]]; end
      T_SW:  begin sw_valid  = active_beat; sink_ready = sw_ready;  end
      T_BYP: begin byp_valid = active_beat; sink_ready = byp_ready; end
      default: ;
    endcase
  end
  assign hw_beat  = ob;
  assign sw_beat  = ob;
  assign byp_beat = ob;

  assign fire          = active_beat && sink_ready;
  assign buf_out_ready = fire;
  assign dec_pop       = fire && buf_out_beat.eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      route_q  <= T_DROP;
      rid_q    <= '0;
      dst_oh_q <= '0;
    end else if (fire) begin
      in_pkt <= !buf_out_beat.eop;
      if (!in_pkt) begin
        route_q  <= route;
        rid_q    <= dec_head.id;
        dst_oh_q <= dec_head.dst_oh;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_hw <= '0; cnt_sw <= '0; cnt_bypass <= '0; cnt_drop <= '0; cnt_drop_inactive <= '0;
    end else if (fire && buf_out_beat.eop) begin
      unique case (route)
        T_HW:   cnt_hw     <= cnt_hw + 1;
        T_SW:   cnt_sw     <= cnt_sw + 1;
        T_BYP:  cnt_bypass <= cnt_bypass + 1;
        default: begin
          cnt_drop <= cnt_drop + 1;
          if ((in_pkt ? 1'b0 : dec_head.target == T_HW) || drop_inactive_q) cnt_drop_inactive <= cnt_drop_inactive + 1;
        end
      endcase
    end
  end

  // remembers that the packet now being dropped was meant for an inactive region
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_inactive_q <= 1'b0;
    else if (fire && !in_pkt) drop_inactive_q <= (dec_head.target == T_HW) && (route == T_DROP);
  end

endmodule
