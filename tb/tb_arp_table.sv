// tb_arp_table: fills the ARP table with random IP/MAC pairs (some invalid),
// then checks random lookups, hits and misses, against a reference model, and
// reads the entries back.
module tb_arp_table;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we; logic [9:0] addr; logic [31:0] wdata, rdata, key; logic hit; logic [47:0] mac;
  int checks = 0, failures = 0;
  logic [31:0] m_ip [E]; logic [47:0] m_mac [E]; bit m_v [E];

  arp_table #(.ENTRIES(E)) dut (.clk, .rst_n, .reg_we(we), .reg_addr(addr), .reg_wdata(wdata),
    .reg_rdata(rdata), .key_ip(key), .hit, .mac);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int e, int f, logic [31:0] d);
    @(negedge clk); we = 1; addr = 10'(e * 16 + f); wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; key = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); key = 0; #1; check(!hit, "empty table misses");
    for (int round = 0; round < 5; round++) begin
      for (int e = 0; e < E; e++) begin
        m_ip[e] = {8'd10, 8'd1, 8'd0, 8'($urandom % 16)};
        m_mac[e] = {16'($urandom), 32'($urandom)};
        m_v[e] = ($urandom % 6 != 0);
        wr(e, 0, m_ip[e]); wr(e, 1, {16'd0, m_mac[e][47:32]}); wr(e, 2, m_mac[e][31:0]);
        wr(e, 3, {m_v[e], 31'd0});
      end
      @(negedge clk); addr = 10'(3 * 16 + 2); #1;
      check(rdata == m_mac[3][31:0], "read back MAC low word");
      for (int i = 0; i < 40; i++) begin
        automatic bit eh = 0;
        automatic logic [47:0] em = 0;
        key = {8'd10, 8'd1, 8'd0, 8'($urandom % 16)};
        for (int e = E - 1; e >= 0; e--) if (m_v[e] && m_ip[e] == key) begin eh = 1; em = m_mac[e]; end
        #1;
        check(hit == eh && (!eh || mac == em), $sformatf("lookup %h", key));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
