// tb_bm_link: sends random packets across a bus-macro link with random source
// gaps and long random sink stalls. Checks that every beat arrives once and in
// order (no beat lost while back-pressure travels through the registered
// macro), and that the latency from in_valid to out_valid is 2 cycles.
module tb_bm_link;
  import netvirt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_beat_t in_beat, out_beat;
  logic [4:0] rx_count;
  int checks = 0, failures = 0;
  pkt_beat_t exp_q[$];
  localparam int BEATS = 4000;

  bm_link #(.RX_DEPTH(16)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat, .rx_count);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // latency
    @(negedge clk);
    in_valid = 1; in_beat = '0; in_beat.data = 64'h1234; in_beat.eop = 1;
    #1 check(in_ready, "ready when empty");
    @(negedge clk); in_valid = 0; #1;
    check(!out_valid, "not out after 1 cycle");
    @(negedge clk); #1;
    check(out_valid && out_beat.data == 64'h1234, "out after 2 cycles");
    out_ready = 1; @(negedge clk); out_ready = 0;
    fork
      begin
        for (int i = 0; i < BEATS; i++) begin
          pkt_beat_t b;
          b = '0; b.data = {$urandom, $urandom}; b.keep = 8'($urandom); b.eop = 1'($urandom);
          b.meta.dst_oh = 8'($urandom);
          @(negedge clk);
          while ($urandom % 4 == 0) @(negedge clk);
          in_valid = 1; in_beat = b;
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          exp_q.push_back(b);
          @(posedge clk);
          #1 in_valid = 0;
        end
      end
      begin
        automatic int got = 0;
        while (got < BEATS) begin
          @(negedge clk);
          // long stalls now and then, to fill the receive FIFO
          if ($urandom % 50 == 0) begin out_ready = 0; repeat ($urandom % 30) @(negedge clk); end
          out_ready = ($urandom % 3 != 0);
          #1;
          check(rx_count <= 16, "receive FIFO never overflows");
          if (out_valid && out_ready) begin
            check(exp_q.size() > 0 && out_beat == exp_q[0], $sformatf("beat %0d order/content", got));
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            got++;
          end
        end
      end
    join
    check(exp_q.size() == 0, "nothing left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
