// tb_rpm_mult -- checks the modified Russian Peasant Multiplier:
// exhaustively at its default 8 x 8 size, and with random and corner
// operands at the 16 x 16 size the filter uses, against a * b.
module tb_rpm_mult;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  logic clk = 0;

  rpm_mult dut8 (.a(a8), .b(b8), .p(p8));
  rpm_mult #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL16 %h * %h -> %h", x, y, p16);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %h * %h -> %h", a8, b8, p8);
      end
    end
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'hFFFF);
    check16(16'h0001, 16'h7FFF);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
