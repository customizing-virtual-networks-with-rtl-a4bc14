// tb_prr: a reconfigurable region running Configuration I is reconfigured
// with Configuration II, then blanked, while a source keeps offering packets
// the way the classifier does (a packet is started only while the region is
// active). Checks: the region goes inactive at once on a request; every packet
// that was started before is still forwarded whole (drain); the load phase
// lasts RECONFIG_CYCLES; the new router starts with empty tables and forwards
// once programmed, with flow semantics; a blank region forwards nothing; the
// loaded configuration and reconfiguration count are reported.
module tb_prr;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  localparam int RC = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_req_valid; prr_cfg_e cfg_req, cfg_loaded; logic reconfiguring, active;
  logic reg_we; logic [11:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  logic in_valid, in_ready, out_valid, out_ready;
  pkt_beat_t in_beat, out_beat;
  logic [31:0] fwd_count, reconfig_count;
  int checks = 0, failures = 0;
  bytes_t exp_q[$];
  int n_out = 0, n_skipped = 0;
  bit traffic = 0, flow_src_ok = 1;

  localparam logic [47:0] PMAC0 = 48'h0002_AA00_0000, PMAC1 = 48'h0002_AA00_0101;
  localparam logic [47:0] HMAC  = 48'h0010_2030_4050;

  prr #(.RECONFIG_CYCLES(RC), .INIT_CFG(CFG_DEST), .FT_ENTRIES(4), .ARP_ENTRIES(4), .BUF_DEPTH(64)) dut (
    .clk, .rst_n, .cfg_req_valid, .cfg_req, .cfg_loaded, .reconfiguring, .active,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat, .fwd_count, .reconfig_count);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 12'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic program_router();
    wr(12'h800, {16'd0, PMAC0[47:32]}); wr(12'h801, PMAC0[31:0]);
    wr(12'h810, {16'd0, PMAC1[47:32]}); wr(12'h811, PMAC1[31:0]);
    wr(12'h000, 32'h0A05_0000); wr(12'h001, 32'hFFFF_0000);
    wr(12'h002, 32'hC0A8_0100); wr(12'h003, 32'hFFFF_FF00);
    wr(12'h004, 32'h0);         wr(12'h005, {1'b1, 28'd0, 3'd2});
    wr(12'h400, 32'h0A05_0007); wr(12'h401, {16'd0, HMAC[47:32]});
    wr(12'h402, HMAC[31:0]);    wr(12'h403, 32'h8000_0000);
  endtask

  function automatic bytes_t expected(bytes_t b);
    bytes_t e = b;
    logic [15:0] ck;
    for (int k = 0; k < 6; k++) begin e[k] = HMAC[47-8*k -: 8]; e[6+k] = PMAC1[47-8*k -: 8]; end
    e[22] = b[22] - 1;
    ck = ip_cksum(e); e[24] = ck[15:8]; e[25] = ck[7:0];
    return e;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  initial begin
    automatic bytes_t got;
    forever begin
      @(negedge clk);
      out_ready = ($urandom % 4 != 0);
      #1;
      if (out_valid && out_ready) begin
        take_beat(got, out_beat);
        if (out_beat.eop) begin
          check(exp_q.size() > 0 && same(got, exp_q[0]), $sformatf("packet %0d out whole and correct", n_out));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          got.delete(); n_out++;
        end
      end
    end
  end

  // source: a packet starts only while the region is active
  bit expect_fwd = 1;
  bit hold = 0;
  initial begin
    in_valid = 0; in_beat = '0;
    wait (traffic);
    for (int n = 0; ; n++) begin
      automatic bit src_ok = ($urandom % 2) || !flow_src_ok;
      automatic bytes_t b = mk_pkt(PMAC0, 48'h0, src_ok ? 32'hC0A8_0109 : 32'hC0A8_0209,
                                   32'h0A05_0007, 8'd9, 60 + $urandom % 100, n);
      automatic pkt_meta_t m = '0;
      @(negedge clk);
      if (hold) continue;
      if (!active) begin n_skipped++; continue; end
      if (expect_fwd && (cfg_loaded == CFG_DEST || src_ok)) exp_q.push_back(expected(b));
      for (int i = 0; i < nbeats(b); i++) begin
        if (i > 0) @(negedge clk);
        in_valid = 1; in_beat = beat_of(b, i, m);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
    end
  end

  initial begin
    int t0, t1;
    cfg_req_valid = 0; cfg_req = CFG_BLANK; reg_we = 0; reg_addr = 0; reg_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(cfg_loaded == CFG_DEST && active && !reconfiguring, "starts with Configuration I");
    program_router();
    flow_src_ok = 0;
    traffic = 1;
    repeat (400) @(posedge clk);
    check(n_out > 5, "Configuration I forwards");
    // replace with Configuration II while traffic runs
    @(negedge clk); cfg_req_valid = 1; cfg_req = CFG_FLOW;
    @(negedge clk); cfg_req_valid = 0;
    check(!active && reconfiguring, "inactive as soon as requested");
    t0 = $time / 10;
    wait (!reconfiguring);
    t1 = $time / 10;
    check(exp_q.size() == 0, "drained: every started packet left, none lost");
    check(t1 - t0 >= RC, $sformatf("reconfiguration lasted %0d cycles", t1 - t0));
    check(cfg_loaded == CFG_FLOW && reconfig_count == 1, "Configuration II loaded");
    // fresh router: empty tables, nothing is forwarded
    expect_fwd = 0;
    repeat (300) @(posedge clk);
    hold = 1;
    repeat (300) @(posedge clk);
    @(negedge clk); reg_addr = 12'hC01; #1;
    check(reg_rdata > 0 && exp_q.size() == 0, "new router starts with empty tables (nothing forwarded)");
    program_router();
    flow_src_ok = 1; expect_fwd = 1;
    hold = 0;
    begin
      automatic int n_before = n_out;
      repeat (600) @(posedge clk);
      check(n_out > n_before + 3, "Configuration II forwards after programming");
    end
    // blank the region
    @(negedge clk); cfg_req_valid = 1; cfg_req = CFG_BLANK;
    @(negedge clk); cfg_req_valid = 0;
    wait (!reconfiguring);
    check(cfg_loaded == CFG_BLANK && !active && reconfig_count == 2, "blank region");
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0 && n_skipped > 0, "blank region holds nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
