// tb_design_select_table: programs the four example entries of the document's
// table (two hardware, two software virtual routers) plus random ones, then
// checks lookups against a reference model kept in the testbench: hits, type,
// id, misses, invalidated entries, read-back, and lowest-index priority.
module tb_design_select_table;
  import netvirt_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we; logic [11:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] key_vip; logic hit; vr_type_e hit_type; logic [VID_W-1:0] hit_id;
  int checks = 0, failures = 0;

  logic [31:0] m_vip [E]; logic m_v [E]; logic [1:0] m_t [E]; logic [7:0] m_id [E];

  design_select_table #(.ENTRIES(E)) dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata,
    .reg_rdata, .key_vip, .hit, .hit_type, .hit_id);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int e, int f, logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 12'(e * 16 + f); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic set(int e, logic [31:0] vip, bit v, logic [1:0] t, logic [7:0] id);
    wr(e, 0, vip); wr(e, 1, {v, 21'd0, t, id});
    m_vip[e] = vip; m_v[e] = v; m_t[e] = t; m_id[e] = id;
  endtask

  task automatic probe(logic [31:0] k);
    bit eh = 0; logic [1:0] et = 0; logic [7:0] ei = 0;
    for (int e = E - 1; e >= 0; e--)
      if (m_v[e] && m_vip[e] == k && m_t[e] != 2'd0) begin eh = 1; et = m_t[e]; ei = m_id[e]; end
    key_vip = k; #1;
    check(hit == eh && (!eh || (hit_type == vr_type_e'(et) && hit_id == ei)),
          $sformatf("lookup %h: hit %0d type %0d id %0d", k, hit, hit_type, hit_id));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; key_vip = 0;
    for (int e = 0; e < E; e++) begin m_v[e] = 0; m_vip[e] = 0; m_t[e] = 0; m_id[e] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    probe(32'h0A00_0001);
    // VIP A..D as in the document's example: A HW 0, B HW 1, C SW 0, D SW 1
    set(0, 32'h0A00_0001, 1, 2'd1, 8'd0);
    set(1, 32'h0A00_0002, 1, 2'd1, 8'd1);
    set(2, 32'h0A00_0003, 1, 2'd2, 8'd0);
    set(3, 32'h0A00_0004, 1, 2'd2, 8'd1);
    for (int k = 0; k < 6; k++) probe(32'h0A00_0000 + k);
    // read back
    @(negedge clk); reg_addr = 12'(2 * 16 + 1); #1;
    check(reg_rdata == {1'b1, 21'd0, 2'd2, 8'd0}, "read back entry 2 word 1");
    reg_addr = 12'(1 * 16 + 0); #1;
    check(reg_rdata == 32'h0A00_0002, "read back entry 1 VIP");
    // a duplicate VIP in a later entry loses to the earlier one
    set(5, 32'h0A00_0002, 1, 2'd2, 8'd7);
    probe(32'h0A00_0002);
    // invalidate B
    set(1, 32'h0A00_0002, 0, 2'd1, 8'd1);
    probe(32'h0A00_0002);
    // random programming and lookups
    for (int i = 0; i < 200; i++) begin
      set($urandom % E, 32'h0A00_0000 + $urandom % 12, 1'($urandom % 4 != 0), 2'($urandom % 3), 8'($urandom));
      probe(32'h0A00_0000 + $urandom % 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
