// arp_table: the ARP table of one hardware virtual router, mapping a next-hop
// IP address to the Ethernet address written into the forwarded packet.
//
// Exact match over all entries in parallel, lowest-numbered match wins,
// combinational result. Host writes: entry index addr[9:4], word addr[3:0]:
// 0 IP, 1 MAC[47:32], 2 MAC[31:0], 3 {valid[31]}. The document names ARP
// lookup as one of the router functions; the table's organisation and size are
// this design's choices.
module arp_table
  import netvirt_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [9:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic [31:0] key_ip,
  output logic        hit,
  output logic [47:0] mac
);
  localparam int unsigned EW = $clog2(ENTRIES);

  typedef struct packed {
    logic        valid;
    logic [31:0] ip;
    logic [47:0] mac;
  } entry_t;

  entry_t tbl [ENTRIES];
  logic [5:0] sel;
  assign sel = reg_addr[9:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
    end else if (reg_we && 32'(sel) < ENTRIES) begin
      unique case (reg_addr[3:0])
        4'd0: tbl[sel[EW-1:0]].ip          <= reg_wdata;
        4'd1: tbl[sel[EW-1:0]].mac[47:32]  <= reg_wdata[15:0];
        4'd2: tbl[sel[EW-1:0]].mac[31:0]   <= reg_wdata;
        4'd3: tbl[sel[EW-1:0]].valid       <= reg_wdata[31];
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (32'(sel) < ENTRIES) begin
      unique case (reg_addr[3:0])
        4'd0: reg_rdata = tbl[sel[EW-1:0]].ip;
        4'd1: reg_rdata = {16'd0, tbl[sel[EW-1:0]].mac[47:32]};
        4'd2: reg_rdata = tbl[sel[EW-1:0]].mac[31:0];
        4'd3: reg_rdata = {tbl[sel[EW-1:0]].valid, 31'd0};
        default: ;
      endcase
    end
  end

  always_comb begin
    hit = 1'b0;
    mac = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (tbl[e].valid && tbl[e].ip == key_ip) begin
        hit = 1'b1;
        mac = tbl[e].mac;
      end
    end
  end

endmodule
