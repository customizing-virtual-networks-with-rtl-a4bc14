// input_arbiter: merges N packet streams into one, a whole packet at a time.
//
// Round robin: when idle, the first requesting input after the one served
// last is granted, and it keeps the grant until its end-of-packet beat has been
// passed on, so packets are never interleaved. The grant is combinational in
// the idle cycle, so back-to-back packets from different inputs follow each
// other with no bubble. In the data plane it merges the eight RX queues (MAC and
// CPU) ahead of the classifier, and the router / transceiver / bypass streams
// ahead of the output queues. The document names the input arbiter; the round
// robin policy and packet granularity are this design's choices.
module input_arbiter
  import netvirt_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    in_valid,
  output logic [N-1:0]    in_ready,
  input  pkt_beat_t       in_beat [N],
  output logic            out_valid,
  input  logic            out_ready,
  output pkt_beat_t       out_beat,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic          busy;        // inside a packet
  logic [IW-1:0] cur, last, pick;
  logic          found;

  // Next requester after 'last', in round-robin order.
  always_comb begin
    pick  = last;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!found && in_valid[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  assign grant_idx = busy ? cur : pick;

  always_comb begin
    in_ready  = '0;
    out_valid = 1'b0;
    out_beat  = in_beat[grant_idx];
    if (busy || found) begin
      out_valid           = in_valid[grant_idx];
      in_ready[grant_idx] = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      last <= IW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out_beat.eop) begin
        busy <= 1'b0;
        last <= grant_idx;
      end else begin
        busy <= 1'b1;
        cur  <= grant_idx;
      end
    end
  end

  a_onehot_ready: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready));

endmodule
