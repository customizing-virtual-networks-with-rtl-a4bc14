// tb_vrouter: programs two complete virtual routers through their host
// registers, one in Configuration I (destination routing) and one in
// Configuration II (flow routing on source and destination prefixes), sends
// the same packets to both and checks what each forwards: Configuration I
// forwards on the destination alone, Configuration II only when the source
// prefix also matches. Also reads the packet counters back over the registers.
module tb_vrouter;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we [2]; logic [11:0] addr; logic [31:0] wdata; logic [31:0] rdata [2];
  logic in_valid, in_ready [2], out_valid [2], out_ready;
  pkt_beat_t in_beat, out_beat [2];
  logic [31:0] fwd_count [2];
  logic idle [2];
  int checks = 0, failures = 0;
  bytes_t exp_q [2][$];
  int n_sent [2];

  localparam logic [47:0] PMAC0 = 48'h0002_AA00_0000, PMAC1 = 48'h0002_AA00_0101;
  localparam logic [47:0] HMAC  = 48'h0010_2030_4050;

  for (genvar c = 0; c < 2; c++) begin : g_r
    vrouter #(.FLOW(c[0]), .FT_ENTRIES(8), .ARP_ENTRIES(8), .BUF_DEPTH(64)) dut (
      .clk, .rst_n, .reg_we(we[c]), .reg_addr(addr), .reg_wdata(wdata), .reg_rdata(rdata[c]),
      .in_valid, .in_ready(in_ready[c]), .in_beat, .out_valid(out_valid[c]), .out_ready,
      .out_beat(out_beat[c]), .fwd_count(fwd_count[c]), .idle(idle[c]));
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int c, int a, logic [31:0] d);
    @(negedge clk); we[c] = 1; addr = 12'(a); wdata = d;
    @(negedge clk); we[c] = 0;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // both routers get every packet; both must accept before the next beat
  initial begin
    automatic bytes_t got [2];
    forever begin
      @(negedge clk);
      out_ready = 1;
      #1;
      for (int c = 0; c < 2; c++)
        if (out_valid[c]) begin
          take_beat(got[c], out_beat[c]);
          if (out_beat[c].eop) begin
            check(exp_q[c].size() > 0 && same(got[c], exp_q[c][0]) && out_beat[c].meta.dst_oh == 8'b0000_0100,
                  $sformatf("configuration %0d forwarded packet", c + 1));
            if (exp_q[c].size() > 0) void'(exp_q[c].pop_front());
            got[c].delete();
          end
        end
    end
  end

  initial begin
    we[0] = 0; we[1] = 0; addr = 0; wdata = 0; in_valid = 0; in_beat = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      // port MACs
      wr(c, 12'h800, {16'd0, PMAC0[47:32]}); wr(c, 12'h801, PMAC0[31:0]);
      wr(c, 12'h810, {16'd0, PMAC1[47:32]}); wr(c, 12'h811, PMAC1[31:0]);
      // route 0: dst 10.5.0.0/16 from src 192.168.1.0/24 -> port 2 (MAC 1), direct
      wr(c, 12'h000, 32'h0A05_0000); wr(c, 12'h001, 32'hFFFF_0000);
      wr(c, 12'h002, 32'hC0A8_0100); wr(c, 12'h003, 32'hFFFF_FF00);
      wr(c, 12'h004, 32'h0);         wr(c, 12'h005, {1'b1, 28'd0, 3'd2});
      // ARP: 10.5.0.7
      wr(c, 12'h400, 32'h0A05_0007); wr(c, 12'h401, {16'd0, HMAC[47:32]});
      wr(c, 12'h402, HMAC[31:0]);    wr(c, 12'h403, 32'h8000_0000);
    end
    @(negedge clk); addr = 12'h002; #1;
    check(rdata[0] == 0 && rdata[1] == 32'hC0A8_0100, "source prefix exists only in Configuration II");
    for (int n = 0; n < 60; n++) begin
      automatic bit src_in = ($urandom % 2);
      automatic logic [31:0] sip = src_in ? {24'hC0A8_01, 8'($urandom)} : {24'hC0A8_02, 8'($urandom)};
      automatic bytes_t b = mk_pkt(PMAC0, 48'h0, sip, 32'h0A05_0007, 8'd30, 60 + $urandom % 60, n);
      automatic pkt_meta_t m = '0;
      exp_q[0].push_back(expected(b)); n_sent[0]++;
      if (src_in) begin exp_q[1].push_back(expected(b)); n_sent[1]++; end
      for (int i = 0; i < nbeats(b); i++) begin
        @(negedge clk);
        in_valid = 1; in_beat = beat_of(b, i, m);
        #1;
        while (!(in_ready[0] && in_ready[1])) begin in_valid = 0; @(negedge clk); in_valid = 1; #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
    end
    wait (idle[0] && idle[1]);
    repeat (5) @(posedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all expected packets forwarded");
    @(negedge clk); addr = 12'hC00; #1;
    check(rdata[0] == n_sent[0] && rdata[1] == n_sent[1], "forwarded counter over registers");
    addr = 12'hC04; #1;
    check(rdata[1] == 60 - n_sent[1] && rdata[0] == 0, "no-route counter");
    check(n_sent[1] > 5 && n_sent[1] < 55, "both kinds of source occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
