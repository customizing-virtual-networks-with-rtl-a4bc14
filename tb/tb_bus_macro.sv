// tb_bus_macro: drives random bytes into one 8-bit bus macro and checks that
// each appears at the output exactly one clock later.
module tb_bus_macro;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;

  bus_macro #(.WIDTH(8)) dut (.clk, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); d = 8'h5A;
    for (int i = 0; i < 500; i++) begin
      prev = d;
      @(negedge clk);
      d = 8'($urandom);
      #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL: q %h expected %h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
