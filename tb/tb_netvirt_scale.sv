// tb_netvirt_scale: the whole data plane with twenty reconfigurable regions,
// the number of hardware virtual routers the larger FPGA generation holds,
// instead of the two of the reference board. Tables and queues are reduced to
// keep the build small. Each region holds one router (Configuration I) for its
// own virtual network; router r sends its traffic out of MAC port r mod 4 to a
// host behind it.
// Phase 1: packets for all twenty networks arrive on random MAC ports; every
//   one must leave on the right port, rewritten (MAC addresses, TTL, checksum),
//   and the routers together must keep at least 1 Gbps line rate for 64-byte
//   packets (one per 32 cycles at 62.5 MHz).
// Phase 2: region 5 is reconfigured to Configuration II while traffic for all
//   networks continues. Packets of the other networks must all arrive; packets of
//   network 5 are dropped while its region is inactive. After reprogramming,
//   network 5 forwards again, now matching on source prefix as well.
// Phase 3: network 7 is migrated to a software router on the host (its Design
//   Select Table entry rewritten) while region 7 is reconfigured, then moved
//   back; none of its packets may be lost.
// Host registers, counters and the per-region status outputs are read back
// and compared. Every mechanism exercised is counted and must occur.
module tb_netvirt_scale;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  localparam int NR = 20;
  localparam int RC = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] rx_valid, rx_ready, tx_valid, tx_ready;
  pkt_beat_t rx_beat [8], tx_beat [8];
  reg_req_t reg_req;
  logic [31:0] reg_rdata;
  prr_cfg_e prr_cfg [NR];
  logic [NR-1:0] prr_reconfiguring;
  int checks = 0, failures = 0;

  netvirt_top #(.NUM_PRR(NR), .RECONFIG_CYCLES(RC), .FT_ENTRIES(8), .ARP_ENTRIES(8),
                .Q_DEPTH(64)) dut (
    .clk, .rst_n, .rx_valid, .rx_ready, .rx_beat, .tx_valid, .tx_ready, .tx_beat,
    .reg_req, .reg_rdata, .prr_cfg, .prr_reconfiguring);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] vip(int r);  return 32'h0A01_0000 | 32'(r); endfunction
  function automatic logic [47:0] host(int r); return 48'h0010_0000_0000 | 48'(r); endfunction
  function automatic logic [47:0] vmac(int r); return 48'h0200_00EE_0000 | 48'(r); endfunction
  function automatic logic [47:0] pmac(int r, int p);
    return {16'h0200, 8'(r), 8'(p), 16'h0001};
  endfunction

  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, write: 1'b1, addr: a, wdata: d};
    @(negedge clk); reg_req = '0;
  endtask
  task automatic rd(logic [23:0] a, output logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, write: 1'b0, addr: a, wdata: 0};
    #1 d = reg_rdata;
    @(negedge clk); reg_req = '0;
  endtask

  // router r: register block 1, region r. Configuration II entries also match
  // the source prefix 192.168.0.0/16 of the test traffic.
  task automatic program_router(int r);
    logic [23:0] b = {8'(r), 16'h1000};
    for (int p = 0; p < 4; p++) begin
      wr(b | 24'h800 | 24'(p << 4), {16'd0, pmac(r, p)[47:32]});
      wr(b | 24'h801 | 24'(p << 4), pmac(r, p)[31:0]);
    end
    wr(b | 24'h000, vip(r));        wr(b | 24'h001, 32'hFFFF_FFFF);
    wr(b | 24'h002, 32'hC0A8_0000); wr(b | 24'h003, 32'hFFFF_0000);
    wr(b | 24'h004, 32'h0);         wr(b | 24'h005, {1'b1, 28'd0, 3'(2 * (r % 4))});
    wr(b | 24'h400, vip(r));        wr(b | 24'h401, {16'd0, host(r)[47:32]});
    wr(b | 24'h402, host(r)[31:0]); wr(b | 24'h403, 32'h8000_0000);
  endtask

  // ---------------- expected packets, by id ----------------
  typedef struct { int port; bytes_t b; bit required; int r; } exp_t;
  exp_t exp_m [int];
  int next_id = 1;
  int n_req_left = 0;
  int n_hw [NR];
  int n_bp = 0, n_sw = 0;
  longint first_t = -1, last_t = 0;
  int n_timed = 0;

  function automatic bytes_t routed(bytes_t b, int r);
    bytes_t e = b;
    logic [15:0] ck;
    for (int k = 0; k < 6; k++) begin
      e[k] = host(r)[47-8*k -: 8];
      e[6+k] = pmac(r, r % 4)[47-8*k -: 8];
    end
    e[22] = b[22] - 1;
    ck = ip_cksum(e); e[24] = ck[15:8]; e[25] = ck[7:0];
    return e;
  endfunction

  bytes_t rxq [8][$];

  // sw: network r is currently served by software router r (via CPU TX queue)
  task automatic offer(int r, int len, bit required, bit sw = 0);
    int id = next_id++;
    int in_port = 2 * ($urandom % 4);
    bytes_t b = mk_pkt(pmac(r, in_port / 2), 48'h0030_0000_0001, 32'hC0A8_0101, vip(r),
                       8'd64, len, id);
    exp_t e;
    b[18] = 8'(id >> 8); b[19] = 8'(id);
    b[34] = 8'(id >> 8); b[35] = 8'(id);
    begin logic [15:0] ck = ip_cksum(b); b[24] = ck[15:8]; b[25] = ck[7:0]; end
    e.port = 2 * (r % 4); e.b = routed(b, r); e.required = required; e.r = r;
    if (sw) begin
      e.port = 2 * (r % 4) + 1; e.b = b; e.r = -1;
      for (int k = 0; k < 6; k++) e.b[k] = vmac(r)[47-8*k -: 8];
    end
    exp_m[id] = e;
    if (required) n_req_left++;
    rxq[in_port].push_back(b);
  endtask

  for (genvar p = 0; p < 8; p++) begin : g_src
    initial begin
      rx_valid[p] = 0; rx_beat[p] = '0;
      forever begin
        @(negedge clk);
        if (rxq[p].size() > 0) begin
          automatic bytes_t b = rxq[p].pop_front();
          for (int i = 0; i < nbeats(b); i++) begin
            if (i > 0) @(negedge clk);
            rx_valid[p] = 1; rx_beat[p] = beat_of(b, i);
            #1;
            while (!rx_ready[p]) begin @(negedge clk); #1; end
            @(posedge clk);
            #1 rx_valid[p] = 0;
          end
        end
      end
    end
  end

  bit slow_tx = 0;
  for (genvar p = 0; p < 8; p++) begin : g_snk
    initial begin
      automatic bytes_t got;
      tx_ready[p] = 0;
      forever begin
        @(negedge clk);
        tx_ready[p] = slow_tx ? ($urandom % 3 != 0) : 1'b1;
        #1;
        if (tx_valid[p] && !tx_ready[p]) n_bp++;
        if (tx_valid[p] && tx_ready[p]) begin
          take_beat(got, tx_beat[p]);
          if (tx_beat[p].eop) begin
            automatic int id = (got.size() > 35) ? {got[34], got[35]} : -1;
            if (!exp_m.exists(id)) begin
              check(0, $sformatf("port %0d: unexpected packet id %0d", p, id));
            end else begin
              check(exp_m[id].port == p, $sformatf("packet %0d on port %0d, expected %0d",
                                                   id, p, exp_m[id].port));
              check(same(got, exp_m[id].b), $sformatf("packet %0d contents", id));
              if (exp_m[id].required) n_req_left--;
              if (exp_m[id].r >= 0) n_hw[exp_m[id].r]++;
              else n_sw++;
              if (first_t < 0) first_t = $time;
              last_t = $time; n_timed++;
              exp_m.delete(id);
            end
            got.delete();
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d required packets missing", n_req_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_drained();
    int idle = 0;
    while (idle < 200) begin
      @(posedge clk);
      idle = (rx_valid == 0 && tx_valid == 0) ? idle + 1 : 0;
    end
  endtask

  initial begin
    logic [31:0] v, c0, c_inact, c_inact2;
    int n5_before, fwd4;
    reg_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < NR; r++) begin
      wr(24'h0000 | 24'(r << 4), vip(r));
      wr(24'h0001 | 24'(r << 4), {1'b1, 21'd0, 2'd1, 8'(r)});
    end
    for (int r = 0; r < NR; r++) program_router(r);
    for (int r = 0; r < NR; r++) begin
      check(prr_cfg[r] == CFG_DEST, $sformatf("region %0d starts in Configuration I", r));
      rd(24'h4000 | 24'(r << 4), v);
      check(v == 32'd1, $sformatf("region %0d status register", r));
    end
    // every region's router registers are reachable and distinct
    for (int r = 0; r < NR; r++) begin
      rd({8'(r), 16'h1801}, v);
      check(v == pmac(r, 0)[31:0], $sformatf("region %0d port MAC read back", r));
    end

    // ---- phase 1: all networks at once, 64-byte packets ----
    for (int i = 0; i < 24; i++)
      for (int r = 0; r < NR; r++) offer(r, 64, 1);
    wait_drained();
    check(n_req_left == 0, "phase 1: every packet delivered");
    begin
      automatic int cyc = int'((last_t - first_t) / 10) / (n_timed - 1);
      $display("%0d hardware routers, 64-byte packets: one every %0d cycles", NR, cyc);
      check(cyc <= 32, $sformatf("aggregate line rate: %0d cycles per packet (limit 32)", cyc));
    end
    for (int r = 0; r < NR; r++) check(n_hw[r] == 24, $sformatf("region %0d forwarded 24", r));
    rd({8'd4, 16'h1C00}, v); fwd4 = int'(v);
    check(fwd4 == 24, $sformatf("region 4 forward counter %0d", fwd4));

    // ---- phase 2: replace router 5 by Configuration II under traffic ----
    slow_tx = 1;
    n5_before = n_hw[5];
    wr(24'h4050, 32'd2);
    @(negedge clk);
    check(prr_reconfiguring[5], "region 5 reconfiguring");
    check(prr_reconfiguring == NR'(1 << 5), "other regions not reconfiguring");
    for (int i = 0; i < 12; i++)
      for (int r = 0; r < NR; r++) offer(r, 64 + 8 * ($urandom % 8), r != 5);
    wait (prr_reconfiguring[5] == 0);
    wait_drained();
    check(n_req_left == 0, "phase 2: other networks lost nothing while region 5 was replaced");
    check(n_hw[5] - n5_before < 12, "region 5 dropped packets while inactive");
    rd(24'h400C, c_inact);
    check(c_inact > 0, "drops for an inactive region counted");
    rd(24'h4050, v);
    check(v == 32'd2 && prr_cfg[5] == CFG_FLOW, "region 5 now runs Configuration II");
    rd(24'h4051, v);
    check(v == 32'd1, "region 5 reconfigured once");
    rd(24'h4041, v);
    check(v == 32'd0, "region 4 never reconfigured");
    rd({8'd5, 16'h1000}, v);
    check(v == 32'd0, "region 5 tables cleared by the load");
    rd({8'd4, 16'h1000}, v);
    check(v == vip(4), "region 4 tables kept");
    // the stale expectations for network 5 packets that were dropped
    begin
      int stale [$];
      foreach (exp_m[id]) if (exp_m[id].r == 5 && !exp_m[id].required) stale.push_back(id);
      foreach (stale[i]) exp_m.delete(stale[i]);
    end

    // reprogram and use the flow router
    program_router(5);
    n5_before = n_hw[5];
    for (int i = 0; i < 10; i++) offer(5, 64, 1);
    wait_drained();
    check(n_req_left == 0, "phase 2: network 5 forwards through Configuration II");
    check(n_hw[5] - n5_before == 10, "region 5 forwarded 10 after reprogramming");

    // ---- phase 3: migrate network 7 to software while its region is
    // replaced, then back to hardware: nothing of it may be lost ----
    for (int r = 0; r < NR; r++) begin
      wr(24'h3000 | 24'(r << 4), {16'd0, vmac(r)[47:32]});
      wr(24'h3001 | 24'(r << 4), vmac(r)[31:0]);
    end
    wr(24'h0071, {1'b1, 21'd0, 2'd2, 8'd7});     // network 7 -> software router 7
    wr(24'h4070, 32'd2);
    @(negedge clk);
    check(prr_reconfiguring == NR'(1 << 7), "region 7 reconfiguring alone");
    n5_before = n_hw[7];
    for (int i = 0; i < 12; i++)
      for (int r = 0; r < NR; r++) offer(r, 64 + 8 * ($urandom % 8), 1, r == 7);
    wait (prr_reconfiguring[7] == 0);
    wait_drained();
    check(n_req_left == 0, "phase 3: every packet delivered, network 7 through software");
    check(n_sw == 12, $sformatf("network 7 served by software: %0d packets", n_sw));
    check(n_hw[7] == n5_before, "region 7 idle while reconfigured");
    program_router(7);
    wr(24'h0071, {1'b1, 21'd0, 2'd1, 8'd7});     // back to hardware region 7
    for (int i = 0; i < 10; i++) offer(7, 64, 1);
    wait_drained();
    check(n_req_left == 0, "phase 3: network 7 back in hardware");
    check(n_hw[7] - n5_before == 10, "region 7 forwarded 10 after migration back");
    rd(24'h400C, c_inact2);
    check(c_inact2 == c_inact, "no drops during the migration");

    rd(24'h4008, c0);
    for (int r = 0; r < NR; r++) $display("region %0d forwarded %0d", r, n_hw[r]);
    $display("software %0d; dropped for inactive region %0d; tx stalls %0d", n_sw, c_inact, n_bp);
    check(c0 > 0, "hardware classification counted");
    check(n_bp > 0, "output back-pressure occurred");
    check(exp_m.size() == 0, "no expected packet left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
