// tb_packet_classifier: programs the Design Select Table with two hardware and
// two software virtual routers, then sends a random mix of packets: to each
// virtual IP, to unknown IPs, non-IPv4 frames, too-short frames, and packets
// returning from the host on CPU RX queues. Each output (two regions, CPU
// transceiver, bypass) stalls at random. Checks that every packet leaves on
// the right output, whole, in order, with the right router id or bypass port,
// and that the rest are dropped. A second phase marks region 1 inactive (as
// during its reconfiguration) and checks that its packets are dropped while
// region 0 and the software routers still receive theirs.
module tb_packet_classifier;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we; logic [11:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  logic [1:0] prr_active, hw_valid, hw_ready;
  logic in_valid, in_ready, sw_valid, sw_ready, byp_valid, byp_ready;
  pkt_beat_t in_beat, hw_beat, sw_beat, byp_beat;
  logic [31:0] c_hw, c_sw, c_byp, c_drop, c_inact;
  int checks = 0, failures = 0;

  // expected packets per output: 0,1 = regions, 2 = software, 3 = bypass
  bytes_t exp_pkt [4][$];
  int     exp_tag [4][$];   // router id, or bypass destination port
  int     n_exp_drop = 0, n_exp_inact = 0, n_sent = 0, n_out = 0;

  packet_classifier #(.NUM_PRR(2), .DST_ENTRIES(8), .BUF_DEPTH(64), .DEC_DEPTH(8)) dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .prr_active,
    .in_valid, .in_ready, .in_beat, .hw_valid, .hw_ready, .hw_beat,
    .sw_valid, .sw_ready, .sw_beat, .byp_valid, .byp_ready, .byp_beat,
    .cnt_hw(c_hw), .cnt_sw(c_sw), .cnt_bypass(c_byp), .cnt_drop(c_drop), .cnt_drop_inactive(c_inact));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 12'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  localparam logic [31:0] VIP [4] = '{32'h0A00_0001, 32'h0A00_0002, 32'h0A00_0003, 32'h0A00_0004};

  task automatic send(bytes_t b, int src);
    pkt_meta_t m = '0;
    m.src_port = PORT_W'(src);
    for (int i = 0; i < nbeats(b); i++) begin
      @(negedge clk);
      in_valid = 1; in_beat = beat_of(b, i, m);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
    n_sent++;
  endtask

  // one random packet with its expected outcome
  task automatic one(int n);
    int kind = $urandom % 8;
    int src  = 2 * ($urandom % 4);
    bytes_t b;
    if (kind < 4) begin
      b = mk_pkt(48'h0, 48'h1, 32'hC0A8_0001, VIP[kind], 8'd64, 40 + $urandom % 100, n);
      if (kind < 2) begin
        if (prr_active[kind]) begin exp_pkt[kind].push_back(b); exp_tag[kind].push_back(kind); end
        else begin n_exp_drop++; n_exp_inact++; end
      end else begin
        exp_pkt[2].push_back(b); exp_tag[2].push_back(kind == 2 ? 5 : 9);
      end
    end else if (kind == 4) begin
      b = mk_pkt(48'h0, 48'h1, 32'hC0A8_0001, 32'h0B00_0001, 8'd64, 60, n);   // unknown VIP
      n_exp_drop++;
    end else if (kind == 5) begin
      b = mk_pkt(48'h0, 48'h1, 32'hC0A8_0001, VIP[0], 8'd64, 60, n, 16'h0806);   // ARP frame
      n_exp_drop++;
    end else if (kind == 6) begin
      b = mk_pkt(48'h0, 48'h1, 32'hC0A8_0001, VIP[0], 8'd64, 60, n);
      b = b[0:30];                                                         // cut in the header
      n_exp_drop++;
    end else begin
      src = 2 * ($urandom % 4) + 1;                                        // back from the host
      b = mk_pkt(48'h0, 48'h1, 32'hC0A8_0001, $urandom, 8'd64, 60 + $urandom % 60, n);
      exp_pkt[3].push_back(b); exp_tag[3].push_back(src - 1);
    end
    send(b, src);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sink per output
  for (genvar o = 0; o < 4; o++) begin : g_sink
    initial begin
      automatic bytes_t got;
      wait (rst_n);
      forever begin
        automatic logic v;
        automatic pkt_beat_t x;
        @(negedge clk);
        case (o)
          0, 1: hw_ready[o] = ($urandom % 3 != 0);
          2: sw_ready = ($urandom % 3 != 0);
          default: byp_ready = ($urandom % 3 != 0);
        endcase
        #1;
        case (o)
          0, 1: begin v = hw_valid[o] && hw_ready[o]; x = hw_beat; end
          2: begin v = sw_valid && sw_ready; x = sw_beat; end
          default: begin v = byp_valid && byp_ready; x = byp_beat; end
        endcase
        if (v) begin
          take_beat(got, x);
          if (o < 3) check(int'(x.meta.vid) == (exp_tag[o].size() ? exp_tag[o][0] : -1), $sformatf("output %0d: router id", o));
          else check(x.meta.dst_oh == (exp_tag[o].size() ? 8'(1) << exp_tag[o][0] : 8'd0), "bypass port");
          if (x.eop) begin
            check(exp_pkt[o].size() > 0 && same(got, exp_pkt[o][0]), $sformatf("output %0d: packet contents/order", o));
            if (exp_pkt[o].size() > 0) begin void'(exp_pkt[o].pop_front()); void'(exp_tag[o].pop_front()); end
            got.delete();
            n_out++;
          end
        end
      end
    end
  end

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; in_valid = 0; in_beat = '0;
    prr_active = 2'b11; hw_ready = 0; sw_ready = 0; byp_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // A -> HW 0, B -> HW 1, C -> SW 5, D -> SW 9
    wr(0 * 16 + 0, VIP[0]); wr(0 * 16 + 1, {1'b1, 21'd0, 2'd1, 8'd0});
    wr(1 * 16 + 0, VIP[1]); wr(1 * 16 + 1, {1'b1, 21'd0, 2'd1, 8'd1});
    wr(2 * 16 + 0, VIP[2]); wr(2 * 16 + 1, {1'b1, 21'd0, 2'd2, 8'd5});
    wr(3 * 16 + 0, VIP[3]); wr(3 * 16 + 1, {1'b1, 21'd0, 2'd2, 8'd9});
    for (int n = 0; n < 300; n++) one(n);
    while (n_out + n_exp_drop < n_sent) @(posedge clk);
    repeat (20) @(posedge clk);
    // region 1 inactive
    prr_active = 2'b01;
    for (int n = 300; n < 500; n++) one(n);
    while (n_out + n_exp_drop < n_sent) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int o = 0; o < 4; o++) check(exp_pkt[o].size() == 0, "every expected packet left");
    check(c_drop == n_exp_drop && c_inact == n_exp_inact, $sformatf("drop counters %0d/%0d vs %0d/%0d", c_drop, c_inact, n_exp_drop, n_exp_inact));
    check(c_hw + c_sw + c_byp + c_drop == n_sent, "every packet counted once");
    check(n_exp_inact > 0, "inactive-region drops happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
