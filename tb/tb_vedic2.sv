// tb_vedic2 -- exhaustive check of the 2x2 Vedic multiplier: sum = a * b
// for all 16 operand pairs.
module tb_vedic2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] sum;

  vedic2 dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (sum != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
