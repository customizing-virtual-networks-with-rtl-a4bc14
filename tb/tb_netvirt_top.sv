// tb_netvirt_top: end-to-end run of the whole data plane, following the
// reconfiguration experiment the design is built for. Two hardware virtual
// networks A and B run in the two regions (Configuration I), two software
// networks C and D go to the host through the CPU transceiver, and packets
// returning from the host on the CPU RX queues go out of the matching MAC
// port. While traffic for all of them flows, region 1 (network B) is
// reconfigured to Configuration II and reprogrammed.
// Checks every packet that leaves against a model of the whole path (port,
// MAC rewrite, TTL, checksum, payload); that no packet of A, C, D or of the
// host is lost while B's region is being replaced; that unknown destinations
// are dropped; that B's packets are dropped (not queued) while its region is
// inactive; and that two hardware routers together forward 64-byte packets at
// 1 Gbps line rate or better (one per 32 cycles at 62.5 MHz). Every mechanism
// is counted and must have happened at least once.
module tb_netvirt_top;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  localparam int RC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] rx_valid, rx_ready, tx_valid, tx_ready;
  pkt_beat_t rx_beat [8], tx_beat [8];
  reg_req_t reg_req;
  logic [31:0] reg_rdata;
  prr_cfg_e prr_cfg [2];
  logic [1:0] prr_reconfiguring;
  int checks = 0, failures = 0;

  netvirt_top #(.RECONFIG_CYCLES(RC)) dut (.clk, .rst_n, .rx_valid, .rx_ready, .rx_beat,
    .tx_valid, .tx_ready, .tx_beat, .reg_req, .reg_rdata, .prr_cfg, .prr_reconfiguring);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- addresses of the virtual networks ----------------
  localparam logic [31:0] VIP_A = 32'h0A00_0001, VIP_B = 32'h0A00_0002,
                          VIP_C = 32'h0A00_0003, VIP_D = 32'h0A00_0004;
  localparam logic [47:0] HOST_A = 48'h0010_0000_00AA, HOST_B = 48'h0010_0000_00BB;
  localparam int SW_C = 5, SW_D = 2;
  function automatic logic [47:0] pmac(int r, int p); return {24'h0002_00, 8'(r), 8'(p), 8'h01}; endfunction
  function automatic logic [47:0] vmac(int id); return {32'h0200_0000, 16'(id)}; endfunction

  // ---------------- host register writes ----------------
  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, write: 1'b1, addr: a, wdata: d};
    @(negedge clk); reg_req = '0;
  endtask
  task automatic rd(logic [23:0] a, output logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, write: 1'b0, addr: a, wdata: 0};
    #1 d = reg_rdata;
    @(negedge clk); reg_req = '0;
  endtask

  // router r (register block 1, region r): its VIP goes out of MAC port (r+1) to a host behind it
  task automatic program_router(int r, logic [31:0] vip, logic [47:0] host);
    logic [23:0] b = {8'(r), 16'h1000};
    for (int p = 0; p < 4; p++) begin
      wr(b | 16'h800 | 16'(p << 4), {16'd0, pmac(r, p)[47:32]});
      wr(b | 16'h801 | 16'(p << 4), pmac(r, p)[31:0]);
    end
    wr(b | 16'h000, vip);  wr(b | 16'h001, 32'hFFFF_FFFF);
    wr(b | 16'h002, 32'h0); wr(b | 16'h003, 32'h0);     // any source (Configuration II)
    wr(b | 16'h004, 32'h0); wr(b | 16'h005, {1'b1, 28'd0, 3'(2 * (r + 1))});
    wr(b | 16'h400, vip);  wr(b | 16'h401, {16'd0, host[47:32]});
    wr(b | 16'h402, host[31:0]); wr(b | 16'h403, 32'h8000_0000);
  endtask

  // ---------------- expected packets, by id ----------------
  typedef struct { int port; bytes_t b; bit required; } exp_t;
  exp_t exp_m [int];
  int next_id = 1;
  int n_req_left = 0;
  // mechanism counts
  int n_hw [2], n_sw = 0, n_byp = 0, n_bp = 0;

  function automatic bytes_t routed(bytes_t b, int r, logic [47:0] host);
    bytes_t e = b;
    logic [15:0] ck;
    for (int k = 0; k < 6; k++) begin
      e[k] = host[47-8*k -: 8];
      e[6+k] = pmac(r, r + 1)[47-8*k -: 8];
    end
    e[22] = b[22] - 1;
    ck = ip_cksum(e); e[24] = ck[15:8]; e[25] = ck[7:0];
    return e;
  endfunction

  // per RX port packet queues, drained by one sender per port
  bytes_t rxq [8][$];

  // builds one packet of kind k (0 A, 1 B, 2 C, 3 D, 4 unknown, 5 from host),
  // records what should come out, and queues it on an RX port
  task automatic offer(int k, int len, bit b_required);
    int id = next_id++;
    int in_port = (k == 5) ? 2 * ($urandom % 4) + 1 : 2 * ($urandom % 4);
    logic [31:0] vip = (k == 0) ? VIP_A : (k == 1) ? VIP_B : (k == 2) ? VIP_C :
                       (k == 3) ? VIP_D : 32'h0B00_0000 | 32'(id);
    bytes_t b = mk_pkt((k <= 1) ? pmac(k, in_port / 2) : 48'h0002_FFFF_FFFF, 48'h0030_0000_0001,
                       32'hC0A8_0101, vip, 8'd64, len, id);
    exp_t e;
    b[18] = 8'(id >> 8); b[19] = 8'(id);
    b[34] = 8'(id >> 8); b[35] = 8'(id);
    begin logic [15:0] ck = ip_cksum(b); b[24] = ck[15:8]; b[25] = ck[7:0]; end
    e.required = 1;
    case (k)
      0: begin e.port = 2; e.b = routed(b, 0, HOST_A); end
      1: begin e.port = 4; e.b = routed(b, 1, HOST_B); e.required = b_required; end
      2, 3: begin
        e.port = 2 * (((k == 2) ? SW_C : SW_D) % 4) + 1;
        e.b = b;
        for (int i = 0; i < 6; i++) e.b[i] = vmac((k == 2) ? SW_C : SW_D)[47-8*i -: 8];
      end
      5: begin e.port = in_port - 1; e.b = b; end
      default: e.port = -1;
    endcase
    if (e.port >= 0) begin
      exp_m[id] = e;
      if (e.required) n_req_left++;
    end
    rxq[in_port].push_back(b);
  endtask

  for (genvar p = 0; p < 8; p++) begin : g_tx
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

  bit slow_tx = 1;
  longint last_hw_eop_t [$];
  for (genvar p = 0; p < 8; p++) begin : g_rx
    initial begin
      automatic bytes_t got;
      tx_ready[p] = 0;
      forever begin
        @(negedge clk);
        tx_ready[p] = slow_tx ? ($urandom % 4 != 0) : 1'b1;
        #1;
        if (tx_valid[p] && !tx_ready[p]) n_bp++;
        if (tx_valid[p] && tx_ready[p]) begin
          take_beat(got, tx_beat[p]);
          if (tx_beat[p].eop) begin
            automatic int id = (got.size() > 35) ? {got[34], got[35]} : -1;
            if (!exp_m.exists(id)) begin
              check(0, $sformatf("port %0d: unexpected packet id %0d", p, id));
            end else begin
              check(exp_m[id].port == p, $sformatf("packet %0d on port %0d, expected %0d", id, p, exp_m[id].port));
              check(same(got, exp_m[id].b), $sformatf("packet %0d contents", id));
              if (exp_m[id].required) n_req_left--;
              if (p == 2) begin n_hw[0]++; last_hw_eop_t.push_back($time); end
              else if (p == 4) begin n_hw[1]++; last_hw_eop_t.push_back($time); end
              else if (p % 2 == 1) n_sw++;
              else n_byp++;
              exp_m.delete(id);
            end
            got.delete();
          end
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
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
    logic [31:0] v, c_drop, c_inact;
    reg_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // Design Select Table: A, B in hardware, C, D in software
    wr(16'h0000, VIP_A); wr(16'h0001, {1'b1, 21'd0, 2'd1, 8'd0});
    wr(16'h0010, VIP_B); wr(16'h0011, {1'b1, 21'd0, 2'd1, 8'd1});
    wr(16'h0020, VIP_C); wr(16'h0021, {1'b1, 21'd0, 2'd2, 8'(SW_C)});
    wr(16'h0030, VIP_D); wr(16'h0031, {1'b1, 21'd0, 2'd2, 8'(SW_D)});
    for (int id = 0; id < 16; id++) begin
      wr(16'h3000 | 16'(id << 4), {16'd0, vmac(id)[47:32]});
      wr(16'h3001 | 16'(id << 4), vmac(id)[31:0]);
    end
    program_router(0, VIP_A, HOST_A);
    program_router(1, VIP_B, HOST_B);
    // phase 1: mixed traffic
    for (int n = 0; n < 300; n++) offer($urandom % 6, 60 + $urandom % 200, 1);
    wait_drained();
    check(n_req_left == 0, "phase 1: every packet delivered");
    // phase 2: replace B's router with Configuration II under traffic
    wr(16'h4010, 32'd2);
    rd(16'h4010, v);
    check(v[31] == 1'b1, "region 1 reports reconfiguring");
    for (int n = 0; n < 400; n++) offer($urandom % 6, 60 + $urandom % 200, 0);
    while (prr_reconfiguring[1]) @(posedge clk);
    check(prr_cfg[1] == CFG_FLOW && prr_cfg[0] == CFG_DEST, "region 1 now holds Configuration II");
    wait_drained();
    check(n_req_left == 0, "phase 2: no packet of A, C, D or from the host lost during reconfiguration");
    // B's packets are dropped until the new router is programmed
    program_router(1, VIP_B, HOST_B);
    for (int n = 0; n < 200; n++) offer($urandom % 6, 60 + $urandom % 200, 1);
    wait_drained();
    check(n_req_left == 0, "phase 3: every packet delivered, B through Configuration II");
    // phase 4: line rate of the two hardware routers with 64-byte packets
    slow_tx = 0;
    last_hw_eop_t.delete();
    for (int n = 0; n < 200; n++) offer(n % 2, 64, 1);
    wait_drained();
    check(n_req_left == 0, "phase 4: every packet delivered");
    begin
      automatic int cyc = int'((last_hw_eop_t[199] - last_hw_eop_t[0]) / 10) / 199;
      $display("two hardware routers, 64-byte packets: one every %0d cycles", cyc);
      check(cyc <= 32, $sformatf("aggregate line rate: %0d cycles per packet (limit 32)", cyc));
    end
    rd(16'h400B, c_drop);
    rd(16'h400C, c_inact);
    rd(16'h4011, v);
    $display("forwarded: region0 %0d region1 %0d, software %0d, bypass %0d; dropped %0d (inactive region %0d); reconfigurations %0d; tx stalls %0d",
             n_hw[0], n_hw[1], n_sw, n_byp, c_drop, c_inact, v, n_bp);
    check(n_hw[0] > 0, "mechanism: hardware router 0 forwards");
    check(n_hw[1] > 0, "mechanism: hardware router 1 forwards");
    check(n_sw > 0, "mechanism: software path through the CPU transceiver");
    check(n_byp > 0, "mechanism: host-to-MAC bypass");
    check(c_drop > c_inact, "mechanism: unknown destination dropped");
    check(c_inact > 0, "mechanism: packets for a region under reconfiguration dropped");
    check(v == 1, "mechanism: one partial reconfiguration");
    check(n_bp > 0, "mechanism: TX back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
