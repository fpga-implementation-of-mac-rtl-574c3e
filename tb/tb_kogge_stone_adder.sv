// tb_kogge_stone_adder -- checks the Kogge-Stone adder against the
// simulator's own addition: W = 8 exhaustively over x, y and cin; W = 1
// exhaustively; W = 65 and W = 128 with random operands plus the
// full-length carry chain (all ones + 1).
module tb_kogge_stone_adder;
  int checks = 0, failures = 0;

  logic [7:0]   x8, y8, s8;
  logic         cin8, cout8;
  logic [0:0]   x1, y1, s1;
  logic         cin1, cout1;
  logic [64:0]  x65, y65, s65;
  logic         cin65, cout65;
  logic [127:0] x128, y128, s128;
  logic         cin128, cout128;

  kogge_stone_adder #(.W(8))   dut8   (.x(x8),   .y(y8),   .cin(cin8),   .s(s8),   .cout(cout8));
  kogge_stone_adder #(.W(1))   dut1   (.x(x1),   .y(y1),   .cin(cin1),   .s(s1),   .cout(cout1));
  kogge_stone_adder #(.W(65))  dut65  (.x(x65),  .y(y65),  .cin(cin65),  .s(s65),  .cout(cout65));
  kogge_stone_adder #(.W(128)) dut128 (.x(x128), .y(y128), .cin(cin128), .s(s128), .cout(cout128));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    {x1, y1, cin1} = '0;
    {x65, y65, cin65} = '0;
    {x128, y128, cin128} = '0;
    for (int v = 0; v < (1 << 17); v++) begin
      {x8, y8, cin8} = 17'(v);
      #1;
      check({cout8, s8} == 9'(x8) + 9'(y8) + 9'(cin8), $sformatf("W=8 %h+%h+%0b", x8, y8, cin8));
    end
    for (int v = 0; v < 8; v++) begin
      {x1, y1, cin1} = 3'(v);
      #1;
      check({cout1, s1} == 2'(x1) + 2'(y1) + 2'(cin1), "W=1");
    end
    for (int t = 0; t < 3000; t++) begin
      x65    = {$urandom, $urandom, $urandom};
      y65    = {$urandom, $urandom, $urandom};
      cin65  = $urandom;
      x128   = {$urandom, $urandom, $urandom, $urandom};
      y128   = {$urandom, $urandom, $urandom, $urandom};
      cin128 = $urandom;
      if (t == 0) begin
        x65 = '1; y65 = '0; cin65 = 1'b1;
        x128 = '1; y128 = '0; cin128 = 1'b1;
      end
      if (t == 1) begin
        x65 = '1; y65 = '1; cin65 = 1'b1;
        x128 = '1; y128 = '1; cin128 = 1'b0;
      end
      #1;
      check({cout65, s65} == 66'(x65) + 66'(y65) + 66'(cin65), $sformatf("W=65 %h+%h", x65, y65));
      check({cout128, s128} == 129'(x128) + 129'(y128) + 129'(cin128), $sformatf("W=128 %h+%h", x128, y128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
