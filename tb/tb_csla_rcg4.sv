// tb_csla_rcg4 -- exhaustive check of the 4-bit reduced-CG carry-select
// slice: all 512 combinations of a, b and cin against a + b + cin.
module tb_csla_rcg4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;

  csla_rcg4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> %b%h", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
