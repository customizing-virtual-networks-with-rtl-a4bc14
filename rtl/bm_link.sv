// bm_link: carries a packet stream across a static / reconfigurable region
// boundary through bus macros, keeping valid/ready semantics at both ends.
//
// Forward path: the beat and its valid bit are cut into 8-bit slices, each
// through one bus_macro (one cycle). Backward path: instead of a combinational
// ready, which could not cross a registered macro, the receiving side keeps a
// small FIFO and returns its almost-full flag through one more bus macro. The
// sender may send whenever that registered flag is low; the FIFO leaves room for
// the beats still in flight (AF_SLACK = 4 covers the two cycles of delay).
// Latency: 2 cycles from in_valid to out_valid. Throughput: one beat per cycle.
// The bus macros follow the document; the credit scheme and FIFO are this
// design's own.
module bm_link
  import netvirt_pkg::*;
#(
  parameter int unsigned MACRO_W  = 8,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pkt_beat_t in_beat,
  output logic      out_valid,
  input  logic      out_ready,
  output pkt_beat_t out_beat,
  output logic [$clog2(RX_DEPTH):0] rx_count
);
  localparam int unsigned PW     = $bits(pkt_beat_t) + 1;
  localparam int unsigned NMAC   = (PW + MACRO_W - 1) / MACRO_W;
  localparam int unsigned PADW   = NMAC * MACRO_W;

  logic [PADW-1:0] fwd_d, fwd_q;
  logic            af, af_q;
  logic [MACRO_W-1:0] bk_q;
  pkt_beat_t       rx_beat;
  logic            rx_valid;

  assign in_ready = !af_q;
  assign fwd_d    = PADW'({in_valid && in_ready, in_beat});

  for (genvar m = 0; m < NMAC; m++) begin : g_fwd
    bus_macro #(.WIDTH(MACRO_W)) u_bm (
      .clk, .d(fwd_d[m*MACRO_W +: MACRO_W]), .q(fwd_q[m*MACRO_W +: MACRO_W])
    );
  end

  bus_macro #(.WIDTH(MACRO_W)) u_bm_back (
    .clk, .d(MACRO_W'(af)), .q(bk_q)
  );

  // the valid bit is the one signal that must not be random after reset
  logic vld_ok;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_ok <= 1'b0;
    else        vld_ok <= 1'b1;
  end

  assign {rx_valid, rx_beat} = fwd_q[PW-1:0];
  assign af_q = bk_q[0] || !vld_ok;

  pkt_fifo #(.DEPTH(RX_DEPTH), .AF_SLACK(4)) u_rx (
    .clk, .rst_n,
    .in_valid(rx_valid && vld_ok), .in_ready(), .in_beat(rx_beat),
    .out_valid, .out_ready, .out_beat,
    .almost_full(af), .count(rx_count)
  );

  logic unused;
  assign unused = ^{fwd_q[PADW-1:PW], bk_q[MACRO_W-1:1]};

endmodule
