// tb_input_arbiter: four sources each send packets of random length with
// random gaps while the sink stalls at random. Checks that packets are never
// interleaved (every output packet is one source's packet, whole and in
// order), that every packet arrives, that the grant rotates round robin when
// all sources wait, and that back-to-back packets flow with no idle cycle.
module tb_input_arbiter;
  import netvirt_pkg::*;
  localparam int N = 4;
  localparam int PKTS = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid, in_ready;
  pkt_beat_t in_beat [N];
  logic out_valid, out_ready;
  pkt_beat_t out_beat;
  logic [1:0] grant_idx;
  int checks = 0, failures = 0;

  input_arbiter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat,
    .out_valid, .out_ready, .out_beat, .grant_idx);

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

  // beat payload: {source, packet number, beat number}
  function automatic pkt_beat_t mk(int s, int p, int b, bit last);
    pkt_beat_t x = '0;
    x.data = {16'(s), 16'(p), 16'(b), 16'hA5A5};
    x.keep = 8'hFF;
    x.eop  = last;
    return x;
  endfunction

  int next_pkt [N];
  bit random_mode = 0;

  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      in_valid[s] = 0; in_beat[s] = '0;
      wait (rst_n);
      wait (random_mode);
      for (int p = 0; p < PKTS; p++) begin
        int len = 1 + $urandom % 6;
        for (int b = 0; b < len; b++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) @(negedge clk);
          in_valid[s] = 1; in_beat[s] = mk(s, p, b, b == len - 1);
          #1;
          while (!in_ready[s]) begin @(negedge clk); #1; end
          @(posedge clk);
          #1 in_valid[s] = 0;
        end
      end
    end
  end

  initial begin
    int cur_src, cur_pkt, cur_beat, done;
    bit in_pkt;
    int gaps;
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // round robin: all four wait with single-beat packets, sink always ready
    @(negedge clk);
    for (int s = 0; s < N; s++) begin in_valid[s] = 1; in_beat[s] = mk(s, 0, 0, 1); end
    out_ready = 1;
    for (int k = 0; k < 2 * N; k++) begin
      #1;
      check(out_valid && grant_idx == 2'((k) % N), $sformatf("round robin step %0d grant %0d", k, grant_idx));
      @(negedge clk);
    end
    for (int s = 0; s < N; s++) in_valid[s] = 0;
    @(negedge clk);
    random_mode = 1;
    done = 0; in_pkt = 0; gaps = 0;
    for (int s = 0; s < N; s++) next_pkt[s] = 0;
    while (done < N * PKTS) begin
      @(negedge clk);
      out_ready = ($urandom % 5 != 0);
      #1;
      if (out_valid && out_ready) begin
        int s, p, b;
        s = int'(out_beat.data[63:48]); p = int'(out_beat.data[47:32]); b = int'(out_beat.data[31:16]);
        if (!in_pkt) begin
          check(s < N && p == next_pkt[s] && b == 0, $sformatf("packet start s%0d p%0d b%0d", s, p, b));
          cur_src = s; cur_pkt = p; cur_beat = 0;
        end else begin
          cur_beat++;
          check(s == cur_src && p == cur_pkt && b == cur_beat, "no interleaving inside a packet");
        end
        in_pkt = !out_beat.eop;
        if (out_beat.eop) begin next_pkt[cur_src]++; done++; end
      end
    end
    for (int s = 0; s < N; s++) check(next_pkt[s] == PKTS, "all packets of each source delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
