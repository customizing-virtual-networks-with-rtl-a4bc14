// tb_output_queues: four sources send packets to random output ports (some
// with no destination, which must be discarded) while the eight TX sides stall
// at random. Checks that every port receives exactly the packets addressed to
// it, whole, and in each source's order, and that the discard counter matches.
module tb_output_queues;
  import netvirt_pkg::*;
  localparam int NS = 4, PKTS = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] in_valid, in_ready;
  pkt_beat_t in_beat [NS];
  logic [NUM_PORTS-1:0] tx_valid, tx_ready;
  pkt_beat_t tx_beat [NUM_PORTS];
  logic [31:0] drop_count;
  int checks = 0, failures = 0;
  int exp_q [NUM_PORTS][NS][$];   // expected packet numbers per port and source
  int exp_len [NS][PKTS];
  int n_drop = 0, n_sent = 0, n_got = 0;
  bit sent_done [NS];

  output_queues #(.N_SRC(NS), .Q_DEPTH(32)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat,
    .tx_valid, .tx_ready, .tx_beat, .drop_count);

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
    in_valid = '0; tx_ready = '0;
    for (int s = 0; s < NS; s++) in_beat[s] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
  end

  for (genvar s = 0; s < NS; s++) begin : g_src
    initial begin
      wait (rst_n);
      for (int p = 0; p < PKTS; p++) begin
        automatic int len = 1 + $urandom % 8;
        automatic int port = $urandom % (NUM_PORTS + 1);   // NUM_PORTS = no destination
        automatic logic [NUM_PORTS-1:0] oh = (port == NUM_PORTS) ? '0 : NUM_PORTS'(1) << port;
        exp_len[s][p] = len;
        if (port == NUM_PORTS) n_drop++; else exp_q[port][s].push_back(p);
        for (int b = 0; b < len; b++) begin
          @(negedge clk);
          in_valid[s] = 1;
          in_beat[s] = '0;
          in_beat[s].data = {16'(s), 16'(p), 16'(b), 16'(len)};
          in_beat[s].keep = 8'hFF; in_beat[s].eop = (b == len - 1); in_beat[s].meta.dst_oh = oh;
          #1;
          while (!in_ready[s]) begin @(negedge clk); #1; end
          @(posedge clk);
          #1 in_valid[s] = 0;
        end
      end
      sent_done[s] = 1;
    end
  end

  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_sink
    initial begin
      automatic int beat = 0, src = 0, pk = 0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        tx_ready[q] = ($urandom % 3 != 0);
        #1;
        if (tx_valid[q] && tx_ready[q]) begin
          automatic int s = int'(tx_beat[q].data[63:48]);
          automatic int p = int'(tx_beat[q].data[47:32]);
          automatic int b = int'(tx_beat[q].data[31:16]);
          if (beat == 0) begin
            check(s < NS && exp_q[q][s].size() > 0 && exp_q[q][s][0] == p,
                  $sformatf("port %0d: packet s%0d p%0d expected next", q, s, p));
            if (s < NS && exp_q[q][s].size() > 0) void'(exp_q[q][s].pop_front());
            src = s; pk = p;
          end else begin
            check(s == src && p == pk && b == beat, $sformatf("port %0d: packet whole", q));
          end
          beat++;
          if (tx_beat[q].eop) begin
            check(beat == int'(tx_beat[q].data[15:0]), "packet length");
            beat = 0; n_got++;
          end
        end
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (sent_done[0] && sent_done[1] && sent_done[2] && sent_done[3]);
    while (n_got + n_drop < NS * PKTS) @(posedge clk);
    repeat (5) @(posedge clk);
    check(drop_count == n_drop, $sformatf("discard count %0d vs %0d", drop_count, n_drop));
    for (int q = 0; q < NUM_PORTS; q++)
      for (int s = 0; s < NS; s++) check(exp_q[q][s].size() == 0, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
