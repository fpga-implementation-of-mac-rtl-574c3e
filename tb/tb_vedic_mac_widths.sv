// tb_vedic_mac_widths -- runs the MAC unit at the smaller operand widths
// for which the unit is also characterised: 2, 4, 8, 16 and 32 bits (the
// 64-bit default is covered by tb_vedic_mac). Each width gets its own
// instance, fed with random operands every clock and checked every clock
// against a reference sum modulo 2^(2N). Reset is pulsed in mid-run. The
// widths of 8 bits and up also run the a = 28, b = 18 example for 8 clocks
// first (504 per clock).
module tb_vedic_mac_widths;
  localparam int NW = 5;
  localparam int unsigned WIDTHS [NW] = '{2, 4, 8, 16, 32};
  localparam int STEPS = 300;

  logic clk = 1'b0;
  int   cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int unsigned N = WIDTHS[w];

    int checks = 0, failures = 0, n_wrap = 0, n_reset = 0;
    bit done = 1'b0;
    logic             reset;
    logic [N-1:0]     a, b;
    logic [2*N-1:0]   mac_output, model;
    logic [2*N:0]     wide;

    vedic_mac #(.N(N)) dut (.clk(clk), .reset(reset), .a(a), .b(b), .mac_output(mac_output));

    initial begin
      reset = 1'b1;
      a = '0;
      b = '0;
      model = '0;
      for (int t = -10; t < STEPS; t++) begin
        @(negedge clk);
        if (t < -8) begin
          reset = 1'b1;
        end else if (t < 0) begin
          reset = 1'b0;
          a = (N >= 8) ? N'(28) : N'($urandom);
          b = (N >= 8) ? N'(18) : N'($urandom);
        end else begin
          reset = (t % 61 == 30);
          a = N'($urandom);
          b = N'($urandom);
        end
        @(posedge clk); #1;
        if (reset) begin
          model = '0;
          n_reset++;
        end else begin
          wide = (2*N+1)'(model) + (2*N+1)'((2*N)'(a) * (2*N)'(b));
          if (wide[2*N]) n_wrap++;
          model = wide[2*N-1:0];
        end
        checks++;
        if (mac_output != model) begin
          failures++;
          if (failures < 5) $display("FAIL N=%0d step %0d: mac_output=%0h expected %0h", N, t, mac_output, model);
        end
        if (N >= 8 && t == -1) begin
          checks++;
          if (mac_output != (2*N)'(8 * 504)) begin
            failures++;
            $display("FAIL N=%0d example run: %0d after 8 clocks, expected 4032", N, mac_output);
          end
        end
      end
      checks++;
      if (n_reset < 2) begin failures++; $display("FAIL N=%0d reset not exercised", N); end
      if (N <= 8) begin
        checks++;
        if (n_wrap == 0) begin failures++; $display("FAIL N=%0d wrap-around not exercised", N); end
      end
      done = 1'b1;
    end
  end

  initial begin
    wait (cycles == 5000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (g_w[0].done && g_w[1].done && g_w[2].done && g_w[3].done && g_w[4].done);
    checks   = g_w[0].checks + g_w[1].checks + g_w[2].checks + g_w[3].checks + g_w[4].checks;
    failures = g_w[0].failures + g_w[1].failures + g_w[2].failures + g_w[3].failures + g_w[4].failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
