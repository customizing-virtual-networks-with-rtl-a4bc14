// tb_pkt_fifo: random traffic with random stalls on both sides through a
// small FIFO; checks order and contents of every beat, that in_ready drops
// exactly when DEPTH beats are stored, almost_full, and the 1-cycle
// fall-through latency.
module tb_pkt_fifo;
  import netvirt_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, af;
  pkt_beat_t in_beat, out_beat;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  pkt_beat_t exp_q[$];

  pkt_fifo #(.DEPTH(DEPTH), .AF_SLACK(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat, .almost_full(af), .count);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // latency: one write, visible the next cycle
    in_valid <= 1; in_beat <= '{data: 64'hDEAD_BEEF_0000_0001, keep: 8'hFF, eop: 1'b1, meta: '0};
    @(posedge clk); in_valid <= 0;
    #1 check(out_valid && out_beat.data == 64'hDEAD_BEEF_0000_0001, "1-cycle fall-through");
    out_ready <= 1; @(posedge clk); out_ready <= 0; #1;
    check(!out_valid, "empty after read");
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      in_valid <= 1; in_beat <= '0; in_beat.data <= 64'(i);
      @(posedge clk); #1;
      if (i == DEPTH - 4) check(af, "almost_full with 3 free");
      if (i == DEPTH - 5) check(!af, "not almost_full with 4 free");
    end
    in_valid <= 0; #1;
    check(!in_ready && count == DEPTH, "full after DEPTH writes");
    out_ready <= 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk);
    end
    out_ready <= 0; #1;
    check(count == 0, "drained");
    // random traffic
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          pkt_beat_t b;
          b = '0; b.data = {$urandom, $urandom}; b.keep = 8'($urandom); b.eop = 1'($urandom);
          b.meta.vid = 8'($urandom);
          in_valid <= ($urandom % 3 != 0); in_beat <= b;
          @(posedge clk);
          while (!(in_valid && in_ready)) begin in_valid <= 1; @(posedge clk); end
          exp_q.push_back(b);
        end
        in_valid <= 0;
      end
      begin
        automatic int got = 0;
        while (got < 3000) begin
          out_ready <= ($urandom % 4 != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            check(exp_q.size() > 0 && out_beat == exp_q[0], $sformatf("beat %0d order/content", got));
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            got++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
