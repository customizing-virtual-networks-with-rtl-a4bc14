// tb_fwd_logic: drives the router's forwarding logic with a mix of good and
// faulty IPv4 packets, answering its table lookups from a small reference
// table kept in the testbench. Checks, for each forwarded packet, the new
// destination MAC (ARP result), source MAC (output port), TTL - 1, a header
// checksum recomputed from scratch, the output port and the untouched payload;
// checks that each faulty packet (wrong MAC, not IPv4, IP options, bad
// checksum, TTL expired, no route, no ARP entry) is dropped and counted under
// its reason; and checks that back-to-back 64-byte packets are forwarded at
// least at 1 Gbps line rate (one per 32 cycles at 62.5 MHz).
module tb_fwd_logic;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [47:0] port_mac [4];
  logic in_valid, in_ready, out_valid, out_ready, idle;
  pkt_beat_t in_beat, out_beat;
  logic [31:0] ft_dst, ft_src, ft_nh, arp_ip;
  logic ft_hit, arp_hit;
  logic [PORT_W-1:0] ft_port;
  logic [47:0] arp_mac;
  logic [31:0] c_fwd, c_hdr, c_ck, c_ttl, c_route, c_arp;
  int checks = 0, failures = 0;
  int e_fwd = 0, e_hdr = 0, e_ck = 0, e_ttl = 0, e_route = 0, e_arp = 0;
  bytes_t exp_q[$]; int exp_port[$];

  fwd_logic #(.BUF_DEPTH(64)) dut (.clk, .rst_n, .port_mac, .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat, .ft_dst, .ft_src, .ft_hit, .ft_next_hop(ft_nh), .ft_port,
    .arp_ip, .arp_hit, .arp_mac, .cnt_fwd(c_fwd), .cnt_bad_hdr(c_hdr), .cnt_bad_cksum(c_ck),
    .cnt_ttl(c_ttl), .cnt_no_route(c_route), .cnt_no_arp(c_arp), .idle);

  // reference tables: 10.1/16 direct on port 2, 10.2/16 via 10.9.9.9 on port 4
  localparam logic [47:0] MAC_H5 = 48'h0022_3344_5505, MAC_GW = 48'h0022_3344_99FF;
  always_comb begin
    ft_hit = 0; ft_nh = 0; ft_port = 0;
    if (ft_dst[31:16] == 16'h0A01) begin ft_hit = 1; ft_nh = ft_dst; ft_port = 3'd2; end
    else if (ft_dst[31:16] == 16'h0A02) begin ft_hit = 1; ft_nh = 32'h0A09_0909; ft_port = 3'd4; end
    arp_hit = 1; arp_mac = 0;
    if (arp_ip == 32'h0A01_0005) arp_mac = MAC_H5;
    else if (arp_ip == 32'h0A09_0909) arp_mac = MAC_GW;
    else arp_hit = 0;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(bytes_t b, int src, bit gaps);
    pkt_meta_t m = '0;
    m.src_port = PORT_W'(src);
    for (int i = 0; i < nbeats(b); i++) begin
      @(negedge clk);
      while (gaps && $urandom % 4 == 0) @(negedge clk);
      in_valid = 1; in_beat = beat_of(b, i, m);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  function automatic bytes_t expected(bytes_t b, logic [47:0] dmac, int port);
    bytes_t e = b;
    logic [15:0] ck;
    for (int k = 0; k < 6; k++) begin
      e[k] = dmac[47-8*k -: 8];
      e[6+k] = port_mac[port/2][47-8*k -: 8];
    end
    e[22] = b[22] - 1;
    ck = ip_cksum(e);
    e[24] = ck[15:8]; e[25] = ck[7:0];
    return e;
  endfunction

  task automatic one(int n, bit gaps);
    int kind = $urandom % 10;
    int src = 2 * ($urandom % 4);
    logic [47:0] me = port_mac[src / 2];
    int len = 60 + $urandom % 120;
    bytes_t b;
    case (kind)
      0, 1: begin
        b = mk_pkt(me, 48'h0, 32'hC0A8_0101, 32'h0A01_0005, 8'(2 + $urandom % 200), len, n);
        exp_q.push_back(expected(b, MAC_H5, 2)); exp_port.push_back(2); e_fwd++;
      end
      2, 3: begin
        b = mk_pkt(me, 48'h0, 32'hC0A8_0101, {16'h0A02, 16'($urandom)}, 8'(2 + $urandom % 200), len, n);
        exp_q.push_back(expected(b, MAC_GW, 4)); exp_port.push_back(4); e_fwd++;
      end
      4: begin b = mk_pkt(48'h0000_0000_0BAD, 48'h0, 32'h1, 32'h0A01_0005, 8'd64, len, n); e_hdr++; end
      5: begin
        b = mk_pkt(me, 48'h0, 32'h1, 32'h0A01_0005, 8'd64, len, n);
        if ($urandom % 2) begin b[12] = 8'h86; b[13] = 8'hDD; end
        else begin
          logic [15:0] ck;
          b[14] = 8'h46; ck = ip_cksum(b); b[24] = ck[15:8]; b[25] = ck[7:0];
        end
        e_hdr++;
      end
      6: begin b = mk_pkt(me, 48'h0, 32'h1, 32'h0A01_0005, 8'd64, len, n, 16'h0800, 1); e_ck++; end
      7: begin b = mk_pkt(me, 48'h0, 32'h1, 32'h0A01_0005, 8'($urandom % 2), len, n); e_ttl++; end
      8: begin b = mk_pkt(me, 48'h0, 32'h1, 32'h0A03_0001, 8'd64, len, n); e_route++; end
      default: begin b = mk_pkt(me, 48'h0, 32'h1, 32'h0A01_0006, 8'd64, len, n); e_arp++; end
    endcase
    send(b, src, gaps);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets out, %0d expected left, idle %0d", n_out, exp_q.size(), idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit slow_sink = 1;
  int n_out = 0;
  longint eop_t [$];
  initial begin
    automatic bytes_t got;
    forever begin
      @(negedge clk);
      out_ready = slow_sink ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        take_beat(got, out_beat);
        check(exp_port.size() > 0 && out_beat.meta.dst_oh == 8'(1) << exp_port[0], "output port");
        if (out_beat.eop) begin
          check(exp_q.size() > 0 && same(got, exp_q[0]), $sformatf("forwarded packet %0d", n_out));
          if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(exp_port.pop_front()); end
          got.delete(); n_out++;
          eop_t.push_back($time);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_beat = '0; out_ready = 0;
    port_mac = '{48'h0002_0000_0000, 48'h0002_0000_0101, 48'h0002_0000_0202, 48'h0002_0000_0303};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) one(n, 1);
    wait (idle && exp_q.size() == 0);
    repeat (10) @(posedge clk);
    check(c_fwd == e_fwd && c_hdr == e_hdr && c_ck == e_ck && c_ttl == e_ttl && c_route == e_route && c_arp == e_arp,
          $sformatf("counters %0d %0d %0d %0d %0d %0d vs %0d %0d %0d %0d %0d %0d",
                    c_fwd, c_hdr, c_ck, c_ttl, c_route, c_arp, e_fwd, e_hdr, e_ck, e_ttl, e_route, e_arp));
    // rate: 100 back-to-back 64-byte packets, sink always ready
    slow_sink = 0;
    eop_t.delete();
    for (int n = 0; n < 100; n++) begin
      automatic bytes_t b = mk_pkt(port_mac[0], 48'h0, 32'h1, 32'h0A01_0005, 8'd64, 64, n);
      exp_q.push_back(expected(b, MAC_H5, 2)); exp_port.push_back(2);
      send(b, 0, 0);
    end
    wait (idle && exp_q.size() == 0);
    begin
      automatic longint span = eop_t[99] - eop_t[0];
      automatic int cyc = int'(span / 10) / 99;
      $display("64-byte packets: one every %0d cycles", cyc);
      check(cyc <= 32, $sformatf("line rate: %0d cycles per 64-byte packet (limit 32)", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
