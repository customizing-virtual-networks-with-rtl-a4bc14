// fwd_logic: the packet-processing part of a hardware IPv4 virtual router.
//
// For each packet it performs, in order, the checks and updates the document
// lists for the "Fwd Logic" block: header verification, IP checksum
// verification, IP (forwarding-table) lookup, ARP lookup and TTL update.
//
// How it works. Packets are stored whole in a buffer; while they stream in, the
// Ethernet and IPv4 header fields in beats 0..4 are captured and, at the last
// beat, queued as one header record. A decision stage takes one record per
// packet and computes in one cycle:
//   * header check: at least 34 bytes, destination MAC equal to the router's
//     MAC on the arrival port, EtherType 0x0800, version 4, IHL 5;
//   * checksum check: one's-complement sum of the ten header words = 0xFFFF;
//   * TTL check: TTL > 1;
//   * forwarding-table lookup (destination, or source and destination for
//     Configuration II), then ARP lookup of the next hop.
// A packet failing any step is dropped and counted under the first failing
// step. A forwarded packet leaves with the next hop's MAC as destination, the
// output port's MAC as source, TTL - 1 and the checksum updated incrementally
// (RFC 1624: HC' = ~(~HC + ~m + m')), and its one-hot output port in the
// metadata. Latency: the first beat leaves 3 cycles after the last beat
// entered. Throughput: one beat per cycle with at most one idle cycle between
// packets, so a 64-byte packet takes 8 to 9 cycles (1 Gbps of 64-byte packets
// needs one per 32 cycles at 62.5 MHz). The document lists the five functions; dropping failed
// packets (rather than passing them to the host) is this design's choice.
module fwd_logic
  import netvirt_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 256,
  parameter int unsigned HDR_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [47:0]       port_mac [NUM_PORTS/2],
  input  logic              in_valid,
  output logic              in_ready,
  input  pkt_beat_t         in_beat,
  output logic              out_valid,
  input  logic              out_ready,
  output pkt_beat_t         out_beat,
  // forwarding table
  output logic [31:0]       ft_dst,
  output logic [31:0]       ft_src,
  input  logic              ft_hit,
  input  logic [31:0]       ft_next_hop,
  input  logic [PORT_W-1:0] ft_port,
  // ARP table
  output logic [31:0]       arp_ip,
  input  logic              arp_hit,
  input  logic [47:0]       arp_mac,
  // packet counters
  output logic [31:0]       cnt_fwd,
  output logic [31:0]       cnt_bad_hdr,
  output logic [31:0]       cnt_bad_cksum,
  output logic [31:0]       cnt_ttl,
  output logic [31:0]       cnt_no_route,
  output logic [31:0]       cnt_no_arp,
  // no packet inside: buffer, header queue and decision register empty
  output logic              idle
);
  typedef struct packed {
    logic              len_ok;
    logic [PORT_W-1:0] src_port;
    logic [47:0]       dmac;
    logic [15:0]       ethertype;
    logic [15:0]       w7;       // version/IHL, TOS
    logic [15:0]       w8, w9, w10;
    logic [7:0]        ttl;
    logic [7:0]        proto;
    logic [15:0]       cksum;
    logic [31:0]       sip;
    logic [31:0]       dip;
  } hdr_t;

  typedef enum logic [2:0] {D_FWD, D_HDR, D_CKSUM, D_TTL, D_ROUTE, D_ARP} verdict_e;

  typedef struct packed {
    verdict_e             verdict;
    logic [47:0]          dmac, smac;
    logic [7:0]           ttl;
    logic [15:0]          cksum;
    logic [NUM_PORTS-1:0] dst_oh;
  } dec_t;

  localparam int unsigned HW = $clog2(HDR_DEPTH);

  // ---------------- ingress ----------------
  logic      buf_in_ready, acc;
  logic      buf_out_valid, buf_out_ready;
  pkt_beat_t buf_out_beat;
  logic      hdr_full, hdr_empty, hdr_push, hdr_pop;
  logic [2:0] idx;
  hdr_t      cap, hdr_new, hdr_head;
  logic [$clog2(BUF_DEPTH):0] buf_count;

  assign in_ready = buf_in_ready && !hdr_full;
  assign acc      = in_valid && in_ready;

  pkt_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid(acc), .in_ready(buf_in_ready), .in_beat(in_beat),
    .out_valid(buf_out_valid), .out_ready(buf_out_ready), .out_beat(buf_out_beat),
    .almost_full(), .count(buf_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      cap <= '0;
    end else if (acc) begin
      unique case (idx)
        3'd0: begin
          cap.dmac     <= in_beat.data[63:16];
          cap.src_port <= in_beat.meta.src_port;
        end
        3'd1: begin
          cap.ethertype <= in_beat.data[31:16];
          cap.w7        <= in_beat.data[15:0];
        end
        3'd2: begin
          cap.w8    <= in_beat.data[63:48];
          cap.w9    <= in_beat.data[47:32];
          cap.w10   <= in_beat.data[31:16];
          cap.ttl   <= in_beat.data[15:8];
          cap.proto <= in_beat.data[7:0];
        end
        3'd3: begin
          cap.cksum     <= in_beat.data[63:48];
          cap.sip       <= in_beat.data[47:16];
          cap.dip[31:16] <= in_beat.data[15:0];
        end
        3'd4: cap.dip[15:0] <= in_beat.data[63:48];
        default: ;
      endcase
      if (in_beat.eop)      idx <= '0;
      else if (idx != 3'd5) idx <= idx + 1'b1;
    end
  end

  always_comb begin
    hdr_new = cap;
    hdr_new.len_ok = ((idx == 3'd4) && (in_beat.keep[7:6] == 2'b11)) || (idx == 3'd5);
    if (idx == 3'd4) hdr_new.dip[15:0] = in_beat.data[63:48];
  end

  hdr_t          hdr_mem [HDR_DEPTH];
  logic [HW-1:0] hdr_wp, hdr_rp;
  logic [HW:0]   hdr_cnt;

  assign hdr_push  = acc && in_beat.eop;
  assign hdr_full  = (hdr_cnt == HDR_DEPTH[HW:0]);
  assign hdr_empty = (hdr_cnt == '0);
  assign hdr_head  = hdr_mem[hdr_rp];

  always_ff @(posedge clk) if (hdr_push) hdr_mem[hdr_wp] <= hdr_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_wp <= '0; hdr_rp <= '0; hdr_cnt <= '0;
    end else begin
      if (hdr_push) hdr_wp <= hdr_wp + 1'b1;
      if (hdr_pop)  hdr_rp <= hdr_rp + 1'b1;
      hdr_cnt <= hdr_cnt + (HW+1)'(hdr_push) - (HW+1)'(hdr_pop);
    end
  end

  // ---------------- decision stage ----------------
  logic [15:0] sum;
  logic        hdr_ok, ck_ok, ttl_ok;
  dec_t        dec_new, dec_q;
  logic        dec_valid;
  logic        pkt_done;
  logic [15:0] m_old, m_new;

  always_comb begin
    sum = '0;
    sum = oc_add(sum, hdr_head.w7);
    sum = oc_add(sum, hdr_head.w8);
    sum = oc_add(sum, hdr_head.w9);
    sum = oc_add(sum, hdr_head.w10);
    sum = oc_add(sum, {hdr_head.ttl, hdr_head.proto});
    sum = oc_add(sum, hdr_head.cksum);
    sum = oc_add(sum, hdr_head.sip[31:16]);
    sum = oc_add(sum, hdr_head.sip[15:0]);
    sum = oc_add(sum, hdr_head.dip[31:16]);
    sum = oc_add(sum, hdr_head.dip[15:0]);
  end

  assign hdr_ok = hdr_head.len_ok
               && hdr_head.dmac == port_mac[hdr_head.src_port[PORT_W-1:1]]
               && hdr_head.ethertype == ETH_IPV4
               && hdr_head.w7[15:8] == 8'h45;
  assign ck_ok  = (sum == 16'hFFFF);
  assign ttl_ok = (hdr_head.ttl > 8'd1);

  assign ft_dst = hdr_head.dip;
  assign ft_src = hdr_head.sip;
  assign arp_ip = ft_next_hop;

  assign m_old = {hdr_head.ttl, hdr_head.proto};
  assign m_new = {hdr_head.ttl - 8'd1, hdr_head.proto};

  always_comb begin
    dec_new.verdict = !hdr_ok  ? D_HDR   :
                      !ck_ok   ? D_CKSUM :
                      !ttl_ok  ? D_TTL   :
                      !ft_hit  ? D_ROUTE :
                      !arp_hit ? D_ARP   : D_FWD;
    dec_new.dmac   = arp_mac;
    dec_new.smac   = port_mac[ft_port[PORT_W-1:1]];
    dec_new.ttl    = hdr_head.ttl - 8'd1;
    dec_new.cksum  = ~oc_add(oc_add(~hdr_head.cksum, ~m_old), m_new);
    dec_new.dst_oh = NUM_PORTS'(1) << ft_port;
  end

  // one decision register: loaded when empty, freed by the packet's last beat
  assign hdr_pop = !hdr_empty && (!dec_valid || pkt_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_q     <= '0;
    end else begin
      if (hdr_pop) begin
        dec_valid <= 1'b1;
        dec_q     <= dec_new;
      end else if (pkt_done) begin
        dec_valid <= 1'b0;
      end
    end
  end

  assign idle = (buf_count == '0) && hdr_empty && !dec_valid && (idx == '0);

  // ---------------- egress with header rewrite ----------------
  logic [2:0] oidx;
  logic       fwd, fire;

  assign fwd           = (dec_q.verdict == D_FWD);
  assign out_valid     = dec_valid && buf_out_valid && fwd;
  assign fire          = dec_valid && buf_out_valid && (fwd ? out_ready : 1'b1);
  assign buf_out_ready = fire;
  assign pkt_done      = fire && buf_out_beat.eop;

  always_comb begin
    out_beat             = buf_out_beat;
    out_beat.meta.dst_oh = dec_q.dst_oh;
    unique case (oidx)
      3'd0: out_beat.data[63:0]  = {dec_q.dmac, dec_q.smac[47:32]};
      3'd1: out_beat.data[63:32] = dec_q.smac[31:0];
      3'd2: out_beat.data[15:8]  = dec_q.ttl;
      3'd3: out_beat.data[63:48] = dec_q.cksum;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) oidx <= '0;
    else if (fire) begin
      if (buf_out_beat.eop)  oidx <= '0;
      else if (oidx != 3'd7) oidx <= oidx + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_fwd <= '0; cnt_bad_hdr <= '0; cnt_bad_cksum <= '0;
      cnt_ttl <= '0; cnt_no_route <= '0; cnt_no_arp <= '0;
    end else if (pkt_done) begin
      unique case (dec_q.verdict)
        D_FWD:   cnt_fwd       <= cnt_fwd + 1;
        D_HDR:   cnt_bad_hdr   <= cnt_bad_hdr + 1;
        D_CKSUM: cnt_bad_cksum <= cnt_bad_cksum + 1;
        D_TTL:   cnt_ttl       <= cnt_ttl + 1;
        D_ROUTE: cnt_no_route  <= cnt_no_route + 1;
        default: cnt_no_arp    <= cnt_no_arp + 1;
      endcase
    end
  end

endmodule
