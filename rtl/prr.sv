// prr: a partially-reconfigurable region holding one hardware virtual router,
// together with the static-side logic that lets it be replaced while the rest
// of the FPGA keeps forwarding.
//
// The region is entered and left only through bus-macro links (bm_link), one
// for packets in and one for packets out. What the region holds is chosen at
// run time: blank, Configuration I (destination-IP routing) or Configuration
// II (flow routing). In the device this is done by loading a partial bitstream
// over JTAG; here both router variants are present and only the loaded one is
// out of reset, which gives the same behaviour at the region's ports.
//
// Reconfiguration, started by cfg_req_valid with the new configuration:
//   1. DRAIN: the region is reported inactive at once, so the classifier drops
//      new packets for it instead of stalling. The packet already under way is
//      finished and everything inside is allowed to leave, until the links and
//      the router have been empty for 4 cycles. No packet is ever cut in half.
//   2. LOAD: the router is held in reset (its tables are cleared) for
//      RECONFIG_CYCLES, the time the partial bitstream takes to load.
//   3. The new configuration runs (active), or the region stays empty (blank).
// A request while DRAIN or LOAD is under way is ignored. The default
// RECONFIG_CYCLES = 37,500,000 is 0.6 s at 62.5 MHz, the measured load time of
// a 680 KB partial bitstream over a 12 MHz JTAG link. Other regions and all
// static logic are unaffected throughout. The two configurations, the bus
// macros and the load time follow the document; the drain step and keeping
// both variants in one wrapper are this design's choices.
module prr
  import netvirt_pkg::*;
#(
  parameter int unsigned RECONFIG_CYCLES = 37_500_000,
  parameter prr_cfg_e    INIT_CFG        = CFG_DEST,
  parameter int unsigned FT_ENTRIES      = 32,
  parameter int unsigned ARP_ENTRIES     = 32,
  parameter int unsigned BUF_DEPTH       = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // reconfiguration request
  input  logic        cfg_req_valid,
  input  prr_cfg_e    cfg_req,
  output prr_cfg_e    cfg_loaded,
  output logic        reconfiguring,
  output logic        active,
  // host registers of the loaded router
  input  logic        reg_we,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // packets from the classifier
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_beat_t   in_beat,
  // packets to the output queues
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_beat_t   out_beat,
  output logic [31:0] fwd_count,
  output logic [31:0] reconfig_count
);
  typedef enum logic [1:0] {S_RUN, S_DRAIN, S_LOAD} state_e;

  state_e    state;
  prr_cfg_e  target;
  logic [$clog2(RECONFIG_CYCLES + 1)-1:0] timer;
  logic [2:0] quiet_cnt;
  logic      quiet;

  // ---------------- links through the bus macros ----------------
  logic      r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  pkt_beat_t r_in_beat, r_out_beat;
  logic [4:0] in_rx_count, out_rx_count;
  logic      in_mid, out_mid;

  bm_link #(.RX_DEPTH(16)) u_link_in (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_beat,
    .out_valid(r_in_valid), .out_ready(r_in_ready), .out_beat(r_in_beat),
    .rx_count(in_rx_count)
  );

  bm_link #(.RX_DEPTH(16)) u_link_out (
    .clk, .rst_n,
    .in_valid(r_out_valid), .in_ready(r_out_ready), .in_beat(r_out_beat),
    .out_valid, .out_ready, .out_beat,
    .rx_count(out_rx_count)
  );

  // ---------------- the two router variants ----------------
  logic        run_dest, run_flow;
  logic        rst_dest_n, rst_flow_n;
  logic [31:0] rd_dest, rd_flow, fc_dest, fc_flow;
  logic        d_in_ready, f_in_ready, d_out_valid, f_out_valid, d_idle, f_idle;
  pkt_beat_t   d_out_beat, f_out_beat;

  assign run_dest   = (state != S_LOAD) && (cfg_loaded == CFG_DEST);
  assign run_flow   = (state != S_LOAD) && (cfg_loaded == CFG_FLOW);
  // the variants' resets come from a flip-flop, never from decoding logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_dest_n <= 1'b0;
      rst_flow_n <= 1'b0;
    end else begin
      rst_dest_n <= run_dest;
      rst_flow_n <= run_flow;
    end
  end

  vrouter #(.FLOW(1'b0), .FT_ENTRIES(FT_ENTRIES), .ARP_ENTRIES(ARP_ENTRIES),
            .BUF_DEPTH(BUF_DEPTH)) u_cfg1 (
    .clk, .rst_n(rst_dest_n),
    .reg_we(reg_we && run_dest), .reg_addr, .reg_wdata, .reg_rdata(rd_dest),
    .in_valid(r_in_valid && run_dest), .in_ready(d_in_ready), .in_beat(r_in_beat),
    .out_valid(d_out_valid), .out_ready(r_out_ready && run_dest), .out_beat(d_out_beat),
    .fwd_count(fc_dest), .idle(d_idle)
  );

  vrouter #(.FLOW(1'b1), .FT_ENTRIES(FT_ENTRIES), .ARP_ENTRIES(ARP_ENTRIES),
            .BUF_DEPTH(BUF_DEPTH)) u_cfg2 (
    .clk, .rst_n(rst_flow_n),
    .reg_we(reg_we && run_flow), .reg_addr, .reg_wdata, .reg_rdata(rd_flow),
    .in_valid(r_in_valid && run_flow), .in_ready(f_in_ready), .in_beat(r_in_beat),
    .out_valid(f_out_valid), .out_ready(r_out_ready && run_flow), .out_beat(f_out_beat),
    .fwd_count(fc_flow), .idle(f_idle)
  );

  // A blank region absorbs nothing useful: packets that reach it are discarded.
  always_comb begin
    r_in_ready  = 1'b1;
    r_out_valid = 1'b0;
    r_out_beat  = d_out_beat;
    reg_rdata   = 32'd0;
    fwd_count   = 32'd0;
    if (run_dest) begin
      r_in_ready = d_in_ready; r_out_valid = d_out_valid; r_out_beat = d_out_beat;
      reg_rdata  = rd_dest;    fwd_count   = fc_dest;
    end else if (run_flow) begin
      r_in_ready = f_in_ready; r_out_valid = f_out_valid; r_out_beat = f_out_beat;
      reg_rdata  = rd_flow;    fwd_count   = fc_flow;
    end
  end

  // packet boundaries on the two static-side ends
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_mid  <= 1'b0;
      out_mid <= 1'b0;
    end else begin
      if (in_valid && in_ready)   in_mid  <= !in_beat.eop;
      if (out_valid && out_ready) out_mid <= !out_beat.eop;
    end
  end

  assign quiet = !in_mid && !out_mid && in_rx_count == '0 && out_rx_count == '0
              && (run_dest ? d_idle : 1'b1) && (run_flow ? f_idle : 1'b1);

  // ---------------- reconfiguration control ----------------
  assign active        = (state == S_RUN) && (cfg_loaded != CFG_BLANK);
  assign reconfiguring = (state != S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_RUN;
      cfg_loaded     <= INIT_CFG;
      target         <= INIT_CFG;
      timer          <= '0;
      quiet_cnt      <= '0;
      reconfig_count <= '0;
    end else begin
      unique case (state)
        S_RUN: if (cfg_req_valid) begin
          state     <= S_DRAIN;
          target    <= cfg_req;
          quiet_cnt <= '0;
        end
        S_DRAIN: begin
          quiet_cnt <= quiet ? quiet_cnt + 1'b1 : 3'd0;
          if (quiet && quiet_cnt == 3'd3) begin
            state <= S_LOAD;
            timer <= ($bits(timer))'(RECONFIG_CYCLES);
          end
        end
        default: begin  // S_LOAD
          if (timer <= 1) begin
            state          <= S_RUN;
            cfg_loaded     <= target;
            reconfig_count <= reconfig_count + 1;
          end else begin
            timer <= timer - 1'b1;
          end
        end
      endcase
    end
  end

  // a region in LOAD holds no packet
  a_empty_in_load: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOAD |-> !out_valid);

endmodule
