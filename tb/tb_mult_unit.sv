// tb_mult_unit -- checks the filter's tap multiplier: signed Q1.15 x Q1.15
// product, shifted right by 15 (floor) and saturated to 16 bits, for random
// and corner operands of every sign; and that with `off` set the product is
// zero whatever the operands.
module tb_mult_unit;
  logic signed [15:0] a, b, p;
  logic               off;
  int checks = 0, failures = 0, n_sat = 0;
  logic clk = 0;

  mult_unit dut (.a(a), .b(b), .off(off), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] model(input int x, input int y);
    longint prod;
    longint q;
    prod = longint'(x) * longint'(y);
    q = prod >>> 15;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return 16'(q);
  endfunction

  task automatic check(input logic signed [15:0] x, input logic signed [15:0] y,
                       input logic o);
    logic signed [15:0] exp_p;
    a = x; b = y; off = o;
    #1;
    exp_p = o ? 16'sd0 : model(int'(x), int'(y));
    if (!o && int'(x) * int'(y) >= 32'sh4000_0000) n_sat++;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d off=%b -> %0d exp %0d", x, y, o, p, exp_p);
    end
  endtask

  initial begin
    check(-16'sd32768, -16'sd32768, 0);   // saturates
    check(-16'sd32768, 16'sd32767, 0);
    check(16'sd32767, 16'sd32767, 0);
    check(-16'sd1, 16'sd1, 0);            // floor of a tiny negative product
    check(16'sd0, -16'sd5, 0);
    check(16'sd12345, -16'sd321, 1);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom), ($urandom % 8) == 0);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
