// design_select_table: programmable CAM that maps a virtual destination IP
// address (VIP) to the virtual router that serves it: its type (hardware router
// in a PRR, or software router on the host) and its id.
//
// Each entry holds {valid, VIP, type, id}. The lookup compares the key against
// all entries in parallel and returns the lowest-numbered valid match, in the
// same cycle (combinational). Entries are written by the host over the register
// bus (one cycle, no wait states): word 0 of an entry is the VIP, word 1 is
// {valid[31], type[9:8], id[7:0]}; the entry index is addr[11:4]. Reads return
// the stored words. The VIP/TYPE/ID columns follow the table drawn in the
// document; the entry count, exact-match (not prefix) keys and the register
// layout are this design's choices.
module design_select_table
  import netvirt_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register port (block already selected)
  input  logic              reg_we,
  input  logic [11:0]       reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // lookup
  input  logic [31:0]       key_vip,
  output logic              hit,
  output vr_type_e          hit_type,
  output logic [VID_W-1:0]  hit_id
);
  localparam int unsigned EW = $clog2(ENTRIES);

  logic              valid_q [ENTRIES];
  logic [31:0]       vip_q   [ENTRIES];
  vr_type_e          type_q  [ENTRIES];
  logic [VID_W-1:0]  id_q    [ENTRIES];

  logic [7:0] sel;
  assign sel = reg_addr[11:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid_q[e] <= 1'b0;
        vip_q[e]   <= '0;
        type_q[e]  <= VR_NONE;
        id_q[e]    <= '0;
      end
    end else if (reg_we && 32'(sel) < ENTRIES) begin
      unique case (reg_addr[3:0])
        4'd0: vip_q[sel[EW-1:0]] <= reg_wdata;
        4'd1: begin
          valid_q[sel[EW-1:0]] <= reg_wdata[31];
          type_q[sel[EW-1:0]]  <= vr_type_e'(reg_wdata[9:8]);
          id_q[sel[EW-1:0]]    <= reg_wdata[VID_W-1:0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (32'(sel) < ENTRIES) begin
      if (reg_addr[3:0] == 4'd0) reg_rdata = vip_q[sel[EW-1:0]];
      if (reg_addr[3:0] == 4'd1)
        reg_rdata = {valid_q[sel[EW-1:0]], 21'd0, type_q[sel[EW-1:0]], id_q[sel[EW-1:0]]};
    end
  end

  always_comb begin
    hit      = 1'b0;
    hit_type = VR_NONE;
    hit_id   = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (valid_q[e] && vip_q[e] == key_vip && type_q[e] != VR_NONE) begin
        hit      = 1'b1;
        hit_type = type_q[e];
        hit_id   = id_q[e];
      end
    end
  end

endmodule
