// tb_dkg_gate -- exhaustive check of the DKG reversible gate.
// All 16 input patterns are applied. Checks: the 16 output patterns are all
// distinct (the gate is reversible); with a = 0 the gate is a full adder,
// {r,s} = b + c + d, with garbage outputs p = b and q = c.
module tb_dkg_gate;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  logic [15:0] seen;

  dkg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b d=%0b -> p=%0b q=%0b r=%0b s=%0b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(!seen[{p, q, r, s}], "output pattern repeated (not reversible)");
      seen[{p, q, r, s}] = 1'b1;
      if (!a) begin
        check({r, s} == 2'(int'(b) + int'(c) + int'(d)), "full-adder sum/carry");
        check(p == b && q == c, "garbage outputs");
      end
    end
    check(&seen, "all output patterns reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
