// vrouter: one hardware virtual router, the logic that one partial bitstream
// places into a reconfigurable region: the forwarding logic, its forwarding
// table and its ARP table, plus the host registers that program them.
//
// FLOW = 0 builds Configuration I (destination-based IP routing), FLOW = 1
// builds Configuration II (flow-based routing on source and destination
// prefixes). Register map (addr[11:10] selects): 0 forwarding table, 1 ARP
// table (both see addr[9:0]), 2 port MAC addresses (port addr[5:4], word
// addr[0]: 0 = MAC[47:32], 1 = MAC[31:0]), 3 read-only packet counters
// (addr[2:0]: forwarded, bad header, bad checksum, TTL expired, no route,
// no ARP entry). idle is high when no packet is inside. Writes take effect at the next clock edge. Stream timing is
// that of fwd_logic. The two configurations follow the document; the register
// map is this design's.
module vrouter
  import netvirt_pkg::*;
#(
  parameter bit          FLOW        = 1'b0,
  parameter int unsigned FT_ENTRIES  = 32,
  parameter int unsigned ARP_ENTRIES = 32,
  parameter int unsigned BUF_DEPTH   = 256
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
  output logic [31:0] fwd_count,
  output logic        idle
);
  logic [31:0] ft_rdata, arp_rdata;
  logic [31:0] ft_dst, ft_src, ft_nh, arp_ip;
  logic        ft_hit, arp_hit;
  logic [PORT_W-1:0] ft_port;
  logic [47:0] arp_mac;
  logic [47:0] port_mac [NUM_PORTS/2];
  logic [31:0] cnt [6];

  fwd_table #(.ENTRIES(FT_ENTRIES), .FLOW(FLOW)) u_ft (
    .clk, .rst_n,
    .reg_we(reg_we && reg_addr[11:10] == 2'd0), .reg_addr(reg_addr[9:0]),
    .reg_wdata, .reg_rdata(ft_rdata),
    .key_dst(ft_dst), .key_src(ft_src),
    .hit(ft_hit), .next_hop(ft_nh), .out_port(ft_port)
  );

  arp_table #(.ENTRIES(ARP_ENTRIES)) u_arp (
    .clk, .rst_n,
    .reg_we(reg_we && reg_addr[11:10] == 2'd1), .reg_addr(reg_addr[9:0]),
    .reg_wdata, .reg_rdata(arp_rdata),
    .key_ip(arp_ip), .hit(arp_hit), .mac(arp_mac)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS / 2; p++) port_mac[p] <= '0;
    end else if (reg_we && reg_addr[11:10] == 2'd2) begin
      if (reg_addr[0]) port_mac[reg_addr[5:4]][31:0]  <= reg_wdata;
      else             port_mac[reg_addr[5:4]][47:32] <= reg_wdata[15:0];
    end
  end

  fwd_logic #(.BUF_DEPTH(BUF_DEPTH)) u_logic (
    .clk, .rst_n, .port_mac,
    .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat,
    .ft_dst, .ft_src, .ft_hit, .ft_next_hop(ft_nh), .ft_port,
    .arp_ip, .arp_hit, .arp_mac,
    .cnt_fwd(cnt[0]), .cnt_bad_hdr(cnt[1]), .cnt_bad_cksum(cnt[2]),
    .cnt_ttl(cnt[3]), .cnt_no_route(cnt[4]), .cnt_no_arp(cnt[5]),
    .idle
  );

  assign fwd_count = cnt[0];

  always_comb begin
    unique case (reg_addr[11:10])
      2'd0: reg_rdata = ft_rdata;
      2'd1: reg_rdata = arp_rdata;
      2'd2: reg_rdata = reg_addr[0] ? port_mac[reg_addr[5:4]][31:0]
                                    : {16'd0, port_mac[reg_addr[5:4]][47:32]};
      default: reg_rdata = (reg_addr[2:0] < 3'd6) ? cnt[reg_addr[2:0]] : 32'd0;
    endcase
  end

endmodule
