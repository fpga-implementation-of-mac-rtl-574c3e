// tb_accumulator -- checks the 128-bit accumulator register: synchronous
// reset clears it, every rising edge loads d, and q holds between edges.
module tb_accumulator;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic         clk = 1'b0;
  logic         reset;
  logic [127:0] d, q, expected;

  accumulator dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, expected);
    end
  endtask

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    d = {4{32'hdeadbeef}};
    @(posedge clk); #1;
    expected = '0;
    check(q == expected, "reset clears");
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      reset = (t % 17 == 16);
      d = {$urandom, $urandom, $urandom, $urandom};
      expected = reset ? '0 : d;
      #2;
      // Before the edge q still holds the previous value.
      check(q != d || q == expected, "no change before edge");
      @(posedge clk); #1;
      check(q == expected, reset ? "reset" : "load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
