// tb_vedic_mac -- end-to-end test of the MAC unit at its default size
// (64 x 64 multiplier, 128-bit adder and accumulator).
//
// Phases:
//  1. the reference run: reset, then a = 28 and b = 18 held, so the output
//     steps 504, 1008, 1512, ... one product per clock (checked cycle by
//     cycle, including that the first product appears one edge after reset
//     is released);
//  2. random operands changing every clock, checked against a 128-bit
//     reference sum, with reset asserted now and then in mid-run;
//  3. all-ones operands, whose products make the 128-bit sum wrap around.
// Mechanisms counted (each must occur): reset clears, accumulation of a
// non-zero product, wrap-around of the 128-bit sum.
module tb_vedic_mac;
  localparam int unsigned N = 64;

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_reset = 0, n_accum = 0, n_wrap = 0;

  logic             clk = 1'b0;
  logic             reset;
  logic [N-1:0]     a, b;
  logic [2*N-1:0]   mac_output;
  logic [2*N-1:0]   model;

  vedic_mac dut (.clk(clk), .reset(reset), .a(a), .b(b), .mac_output(mac_output));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d %s: mac_output=%0d expected %0d", cycles, what, mac_output, model);
    end
  endtask

  // Apply one clock with the given inputs and update the reference model.
  task automatic step(input logic rst, input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N:0] wide;
    @(negedge clk);
    reset = rst;
    a = av;
    b = bv;
    @(posedge clk); #1;
    if (rst) begin
      model = '0;
      n_reset++;
    end else begin
      wide = (2*N+1)'(model) + (2*N+1)'((2*N)'(av) * (2*N)'(bv));
      if (wide[2*N]) n_wrap++;
      if (av != 0 && bv != 0) n_accum++;
      model = wide[2*N-1:0];
    end
    check(mac_output == model, rst ? "after reset" : "after accumulate");
  endtask

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    a = '0;
    b = '0;
    model = '0;

    // Phase 1: the published example, a = 28, b = 18.
    step(1'b1, 64'd28, 64'd18);
    step(1'b1, 64'd28, 64'd18);
    for (int k = 1; k <= 8; k++) begin
      step(1'b0, 64'd28, 64'd18);
      checks++;
      if (mac_output != 128'(504 * k)) begin
        failures++;
        $display("FAIL reference run: after %0d edges mac_output=%0d expected %0d", k, mac_output, 504 * k);
      end
    end

    // Phase 2: random operands, occasional reset.
    for (int t = 0; t < 400; t++) begin
      step(t % 97 == 50, {$urandom, $urandom}, {$urandom, $urandom});
    end

    // Phase 3: largest operands until the sum has wrapped a few times.
    for (int t = 0; t < 6; t++) begin
      step(1'b0, '1, '1);
    end

    checks++;
    if (n_reset == 0) begin failures++; $display("FAIL reset never exercised"); end
    checks++;
    if (n_accum == 0) begin failures++; $display("FAIL accumulation never exercised"); end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL wrap-around never exercised"); end
    $display("mechanisms: reset=%0d accumulate=%0d wrap=%0d", n_reset, n_accum, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
