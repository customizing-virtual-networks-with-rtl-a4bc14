// tb_fwd_table: builds one table of each configuration. Configuration I
// (destination prefixes) and Configuration II (source and destination
// prefixes) are filled with random prefixes, longest first as a control plane
// would, and random keys are looked up against a reference model in the
// testbench (first matching entry wins; next hop 0 means "the destination").
module tb_fwd_table;
  import netvirt_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we [2]; logic [9:0] addr; logic [31:0] wdata; logic [31:0] rdata [2];
  logic [31:0] kd, ks; logic hit [2]; logic [31:0] nh [2]; logic [PORT_W-1:0] port [2];
  int checks = 0, failures = 0;

  typedef struct { bit v; logic [31:0] dp, dm, sp, sm, nh; logic [2:0] port; } ent_t;
  ent_t m [2][E];

  fwd_table #(.ENTRIES(E), .FLOW(1'b0)) dut_dest (.clk, .rst_n, .reg_we(we[0]), .reg_addr(addr),
    .reg_wdata(wdata), .reg_rdata(rdata[0]), .key_dst(kd), .key_src(ks), .hit(hit[0]),
    .next_hop(nh[0]), .out_port(port[0]));
  fwd_table #(.ENTRIES(E), .FLOW(1'b1)) dut_flow (.clk, .rst_n, .reg_we(we[1]), .reg_addr(addr),
    .reg_wdata(wdata), .reg_rdata(rdata[1]), .key_dst(kd), .key_src(ks), .hit(hit[1]),
    .next_hop(nh[1]), .out_port(port[1]));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int t, int e, int f, logic [31:0] d);
    @(negedge clk); we[t] = 1; addr = 10'(e * 16 + f); wdata = d;
    @(negedge clk); we[t] = 0;
  endtask

  function automatic logic [31:0] mask(int len);
    return (len == 0) ? 32'd0 : ~((32'd1 << (32 - len)) - 1);
  endfunction

  task automatic probe(logic [31:0] d, logic [31:0] s);
    for (int t = 0; t < 2; t++) begin
      bit eh = 0; logic [31:0] enh = 0; logic [2:0] ep = 0;
      for (int e = E - 1; e >= 0; e--)
        if (m[t][e].v && (d & m[t][e].dm) == (m[t][e].dp & m[t][e].dm)
            && (t == 0 || (s & m[t][e].sm) == (m[t][e].sp & m[t][e].sm))) begin
          eh = 1; enh = (m[t][e].nh == 0) ? d : m[t][e].nh; ep = m[t][e].port;
        end
      kd = d; ks = s; #1;
      check(hit[t] == eh && (!eh || (nh[t] == enh && port[t] == ep)),
            $sformatf("cfg %0d lookup d=%h s=%h: hit %0d nh %h port %0d", t + 1, d, s, hit[t], nh[t], port[t]));
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we[0] = 0; we[1] = 0; addr = 0; wdata = 0; kd = 0; ks = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int t = 0; t < 2; t++) begin
        for (int e = 0; e < E; e++) begin
          automatic int dl = 32 - e * 3 - int'($urandom % 3);
          automatic int sl = ($urandom % 3 != 0) ? 24 : 16;
          automatic logic [31:0] dp = {8'd10, 8'($urandom % 4), 16'($urandom)};
          automatic logic [31:0] sp = {8'd192, 8'd168, 16'($urandom % 4) << 8};
          m[t][e].v = ($urandom % 8 != 0);
          m[t][e].dp = dp; m[t][e].dm = mask(dl);
          m[t][e].sp = (t == 1) ? sp : 0; m[t][e].sm = (t == 1) ? mask(sl) : 0;
          m[t][e].nh = ($urandom % 3 == 0) ? 0 : {8'd10, 8'd99, 16'($urandom)};
          m[t][e].port = 3'($urandom);
          wr(t, e, 0, m[t][e].dp); wr(t, e, 1, m[t][e].dm);
          wr(t, e, 2, sp); wr(t, e, 3, mask(sl));
          wr(t, e, 4, m[t][e].nh); wr(t, e, 5, {m[t][e].v, 28'd0, m[t][e].port});
        end
      end
      // Configuration I ignores what is written to the source fields
      @(negedge clk); addr = 10'(0 * 16 + 3); #1;
      check(rdata[0] == 0 && rdata[1] == m[1][0].sm, "source mask stored only in Configuration II");
      for (int i = 0; i < 150; i++) begin
        automatic int e = $urandom % E;
        automatic logic [31:0] d = (m[0][e].dp & m[0][e].dm) | ($urandom & ~m[0][e].dm);
        automatic logic [31:0] s = {8'd192, 8'd168, 16'($urandom % 4) << 8} | 32'($urandom % 256);
        if ($urandom % 2) d = (m[1][e].dp & m[1][e].dm) | ($urandom & ~m[1][e].dm);
        if ($urandom % 5 == 0) d = $urandom;
        probe(d, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
