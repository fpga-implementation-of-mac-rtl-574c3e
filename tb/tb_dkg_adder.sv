// tb_dkg_adder -- checks the DKG ripple adder: the 4-bit adder
// exhaustively (x, y, cin), and the 128-bit adder used by the MAC with
// random operands plus the full-length carry ripple (all ones + 1).
module tb_dkg_adder;
  int checks = 0, failures = 0;

  logic [3:0]   x4, y4, s4;
  logic         cin4, cout4;
  logic [127:0] x, y, s;
  logic         cin, cout;

  dkg_adder #(.W(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .s(s4), .cout(cout4));
  dkg_adder          dut  (.x(x),  .y(y),  .cin(cin),  .s(s),  .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {x, y, cin} = '0;
    for (int v = 0; v < 512; v++) begin
      {x4, y4, cin4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} != 5'(x4) + 5'(y4) + 5'(cin4)) begin
        failures++;
        $display("FAIL W=4 %h+%h+%0b -> %0b %h", x4, y4, cin4, cout4, s4);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      x   = {$urandom, $urandom, $urandom, $urandom};
      y   = {$urandom, $urandom, $urandom, $urandom};
      cin = $urandom;
      if (t == 0) begin x = '1; y = '0; cin = 1'b1; end
      if (t == 1) begin x = '1; y = '1; cin = 1'b1; end
      #1;
      checks++;
      if ({cout, s} != 129'(x) + 129'(y) + 129'(cin)) begin
        failures++;
        $display("FAIL W=128 %h+%h+%0b -> %0b %h", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
