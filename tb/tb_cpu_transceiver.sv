// tb_cpu_transceiver: programs virtual-interface MAC addresses for several
// software routers, sends packets tagged with router ids under random
// back-pressure, and checks that only bytes 0..5 of each packet change (to the
// router's MAC), that the packet is steered to CPU TX queue (id mod 4), and
// that beats pass with zero latency.
module tb_cpu_transceiver;
  import netvirt_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we; logic [11:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  logic in_valid, in_ready, out_valid, out_ready;
  pkt_beat_t in_beat, out_beat;
  logic [31:0] pkt_count;
  int checks = 0, failures = 0;
  logic [47:0] vmac [16];
  bytes_t exp_q[$]; int exp_id[$];

  cpu_transceiver #(.SW_ENTRIES(16)) dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .in_valid, .in_ready, .in_beat, .out_valid, .out_ready, .out_beat, .pkt_count);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 12'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PKTS = 100;

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; in_valid = 0; in_beat = '0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      vmac[i] = {16'h0200 + 16'(i), $urandom};
      wr(i * 16 + 0, {16'd0, vmac[i][47:32]});
      wr(i * 16 + 1, vmac[i][31:0]);
    end
    @(negedge clk); reg_addr = 12'(5 * 16 + 1); #1;
    check(reg_rdata == vmac[5][31:0], "read back MAC");
    fork
      begin
        for (int p = 0; p < PKTS; p++) begin
          automatic int id = $urandom % 16;
          automatic bytes_t b = mk_pkt(48'hAABB_CCDD_EEFF, 48'h1111_2222_3333, $urandom, $urandom,
                                       8'd64, 60 + $urandom % 80, p);
          automatic bytes_t e = b;
          automatic pkt_meta_t m = '0;
          m.vid = 8'(id);
          for (int k = 0; k < 6; k++) e[k] = vmac[id][47-8*k -: 8];
          exp_q.push_back(e); exp_id.push_back(id);
          for (int i = 0; i < nbeats(b); i++) begin
            @(negedge clk);
            in_valid = 1; in_beat = beat_of(b, i, m);
            #1;
            while (!in_ready) begin @(negedge clk); #1; end
            @(posedge clk);
            #1 in_valid = 0;
          end
        end
      end
      begin
        bytes_t got;
        int n = 0;
        while (n < PKTS) begin
          @(negedge clk);
          out_ready = ($urandom % 4 != 0);
          #1;
          if (in_valid) check(out_valid, "zero-latency pass-through");
          if (out_valid && out_ready) begin
            take_beat(got, out_beat);
            check(out_beat.meta.dst_oh == 8'(1) << (2 * (exp_id[0] % 4) + 1), "CPU TX queue");
            if (out_beat.eop) begin
              check(same(got, exp_q[0]), $sformatf("packet %0d contents", n));
              void'(exp_q.pop_front()); void'(exp_id.pop_front());
              got.delete(); n++;
            end
          end
        end
      end
    join
    check(pkt_count == PKTS, "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
