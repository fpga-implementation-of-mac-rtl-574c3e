// tb_carry_save_adder -- checks the 3:2 compressor at two widths:
// x + y + z must equal s + 2*c exactly, and no output bit may depend on a
// neighbouring column (each s[i], c[i] checked against its own column's
// count of ones). W = 4 exhaustively, W = 64 with random operands.
module tb_carry_save_adder;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, z4, s4, c4;
  logic [63:0] x64, y64, z64, s64, c64;

  carry_save_adder #(.W(4))  dut4  (.x(x4),  .y(y4),  .z(z4),  .s(s4),  .c(c4));
  carry_save_adder #(.W(64)) dut64 (.x(x64), .y(y64), .z(z64), .s(s64), .c(c64));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x4, y4, z4} = 12'(v);
      #1;
      checks++;
      if (7'(x4) + 7'(y4) + 7'(z4) != 7'(s4) + 7'({c4, 1'b0})) begin
        failures++;
        $display("FAIL W=4 %h %h %h -> s=%h c=%h", x4, y4, z4, s4, c4);
      end
      for (int i = 0; i < 4; i++) begin
        int n;
        n = int'(x4[i]) + int'(y4[i]) + int'(z4[i]);
        checks++;
        if (s4[i] != n[0] || c4[i] != n[1]) begin
          failures++;
          $display("FAIL W=4 column %0d", i);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      x64 = {$urandom, $urandom};
      y64 = {$urandom, $urandom};
      z64 = {$urandom, $urandom};
      if (t == 0) begin x64 = '1; y64 = '1; z64 = '1; end
      #1;
      checks++;
      if (66'(x64) + 66'(y64) + 66'(z64) != 66'(s64) + 66'({c64, 1'b0})) begin
        failures++;
        $display("FAIL W=64 %h %h %h -> s=%h c=%h", x64, y64, z64, s64, c64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
