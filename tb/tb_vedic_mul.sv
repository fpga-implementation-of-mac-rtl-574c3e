// tb_vedic_mul -- checks the recursive Vedic multiplier against the
// simulator's multiplication at every published size: N = 4 and N = 8
// exhaustively, N = 16, 32 and 64 (the default) with random operands and
// the corner cases 0, 1 and all ones.
module tb_vedic_mul;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]   p4;
  logic [7:0]  a8, b8;   logic [15:0]  p8;
  logic [15:0] a16, b16; logic [31:0]  p16;
  logic [31:0] a32, b32; logic [63:0]  p32;
  logic [63:0] a64, b64; logic [127:0] p64;

  vedic_mul #(.N(4))  dut4  (.a(a4),  .b(b4),  .sum(p4));
  vedic_mul #(.N(8))  dut8  (.a(a8),  .b(b8),  .sum(p8));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .sum(p16));
  vedic_mul #(.N(32)) dut32 (.a(a32), .b(b32), .sum(p32));
  vedic_mul           dut64 (.a(a64), .b(b64), .sum(p64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a16, b16, a32, b32, a64, b64} = '0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      check(p4 == 8'(a4) * 8'(b4), $sformatf("N=4 %0d*%0d=%0d", a4, b4, p4));
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      check(p8 == 16'(a8) * 16'(b8), $sformatf("N=8 %0d*%0d=%0d", a8, b8, p8));
    end
    for (int t = 0; t < 5000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom;      b32 = $urandom;
      a64 = {$urandom, $urandom};
      b64 = {$urandom, $urandom};
      case (t)
        0: begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; a64 = '1; b64 = '1; end
        1: begin a16 = '0; a32 = '0; a64 = '0; end
        2: begin b16 = 16'd1; b32 = 32'd1; b64 = 64'd1; end
        3: begin a64 = 64'd28; b64 = 64'd18; end
        default: ;
      endcase
      #1;
      check(p16 == 32'(a16) * 32'(b16), $sformatf("N=16 %h*%h=%h", a16, b16, p16));
      check(p32 == 64'(a32) * 64'(b32), $sformatf("N=32 %h*%h=%h", a32, b32, p32));
      check(p64 == 128'(a64) * 128'(b64), $sformatf("N=64 %h*%h=%h", a64, b64, p64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
