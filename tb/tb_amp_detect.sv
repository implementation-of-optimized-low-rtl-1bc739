// tb_amp_detect -- checks the amplitude detector for every threshold
// exponent k: the boundary values -2^k-1, -2^k, 2^k-1, 2^k and random words,
// against -2^k <= din < 2^k computed with integers.
module tb_amp_detect;
  logic signed [15:0] din;
  logic [3:0]         k;
  logic               is_small;
  int checks = 0, failures = 0;
  logic clk = 0;

  amp_detect dut (.din(din), .th_log2(k), .is_small(is_small));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v, input int kk);
    logic exp_s;
    if (v < -32768 || v > 32767) return;
    din = 16'(v); k = 4'(kk);
    #1;
    exp_s = (v >= -(1 << kk)) && (v < (1 << kk));
    checks++;
    if (is_small !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL din=%0d k=%0d -> %b", v, kk, is_small);
    end
  endtask

  initial begin
    for (int kk = 0; kk < 16; kk++) begin
      check(-(1 << kk) - 1, kk); check(-(1 << kk), kk);
      check((1 << kk) - 1, kk);  check(1 << kk, kk);
      check(0, kk); check(-1, kk); check(32767, kk); check(-32768, kk);
      for (int i = 0; i < 500; i++) check(int'($signed(16'($urandom))) >>> ($urandom % 16), kk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
