// fwd_table: the forwarding table of one hardware virtual router.
//
// Each entry is {valid, destination prefix/mask, source prefix/mask, next hop
// IP, output port}. Configuration I (FLOW = 0) routes on the destination
// address only: the source fields are not built and always match.
// Configuration II (FLOW = 1) forwards on flow information: an entry matches
// only when both the source and the destination address fall in its prefixes.
// All entries are compared in parallel and the lowest-numbered match wins, so
// the control plane stores longer prefixes first (longest-prefix match by
// order). The result is combinational, one lookup per cycle, which is what lets
// the router keep line rate. Host writes: entry index addr[9:4], word
// addr[3:0]: 0 dst prefix, 1 dst mask, 2 src prefix, 3 src mask, 4 next hop
// (0 = destination is directly attached), 5 {valid[31], port[2:0]}.
// The two configurations and the prefix lookups follow the document; the
// document keeps the table in block RAM, while this table is a register array
// searched in parallel, and its size and layout are this design's choices.
module fwd_table
  import netvirt_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter bit          FLOW    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [9:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  input  logic [31:0]       key_dst,
  input  logic [31:0]       key_src,
  output logic              hit,
  output logic [31:0]       next_hop,
  output logic [PORT_W-1:0] out_port
);
  localparam int unsigned EW = $clog2(ENTRIES);

  typedef struct packed {
    logic              valid;
    logic [31:0]       dpfx, dmask, spfx, smask, nh;
    logic [PORT_W-1:0] port;
  } entry_t;

  entry_t tbl [ENTRIES];
  logic [5:0] sel;
  assign sel = reg_addr[9:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
    end else if (reg_we && 32'(sel) < ENTRIES) begin
      unique case (reg_addr[3:0])
        4'd0: tbl[sel[EW-1:0]].dpfx  <= reg_wdata;
        4'd1: tbl[sel[EW-1:0]].dmask <= reg_wdata;
        4'd2: tbl[sel[EW-1:0]].spfx  <= FLOW ? reg_wdata : '0;
        4'd3: tbl[sel[EW-1:0]].smask <= FLOW ? reg_wdata : '0;
        4'd4: tbl[sel[EW-1:0]].nh    <= reg_wdata;
        4'd5: begin
          tbl[sel[EW-1:0]].valid <= reg_wdata[31];
          tbl[sel[EW-1:0]].port  <= reg_wdata[PORT_W-1:0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (32'(sel) < ENTRIES) begin
      unique case (reg_addr[3:0])
        4'd0: reg_rdata = tbl[sel[EW-1:0]].dpfx;
        4'd1: reg_rdata = tbl[sel[EW-1:0]].dmask;
        4'd2: reg_rdata = tbl[sel[EW-1:0]].spfx;
        4'd3: reg_rdata = tbl[sel[EW-1:0]].smask;
        4'd4: reg_rdata = tbl[sel[EW-1:0]].nh;
        4'd5: reg_rdata = {tbl[sel[EW-1:0]].valid, 28'd0, tbl[sel[EW-1:0]].port};
        default: ;
      endcase
    end
  end

  always_comb begin
    hit      = 1'b0;
    next_hop = '0;
    out_port = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (tbl[e].valid
          && ((key_dst & tbl[e].dmask) == (tbl[e].dpfx & tbl[e].dmask))
          && (!FLOW || ((key_src & tbl[e].smask) == (tbl[e].spfx & tbl[e].smask)))) begin
        hit      = 1'b1;
        next_hop = (tbl[e].nh == '0) ? key_dst : tbl[e].nh;
        out_port = tbl[e].port;
      end
    end
  end

endmodule
