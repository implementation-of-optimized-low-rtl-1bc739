// tb_csla_adder -- checks the chained carry-select adder at its default
// width (16, four slices) and at 10 bits (padded last slice) with random
// and corner operands against a + b + cin.
module tb_csla_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a10, b10, s10;
  logic        cout10;
  int checks = 0, failures = 0;
  logic clk = 0;

  csla_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  csla_adder #(.W(10)) dut10 (.a(a10), .b(b10), .cin(cin), .s(s10), .cout(cout10));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if ({cout, s} !== 17'(a) + 17'(b) + 17'(cin)) begin
      failures++;
      $display("FAIL16 a=%h b=%h cin=%b -> %b %h", a, b, cin, cout, s);
    end
    checks++;
    if ({cout10, s10} !== 11'(a10) + 11'(b10) + 11'(cin)) begin
      failures++;
      $display("FAIL10 a=%h b=%h cin=%b -> %b %h", a10, b10, cin, cout10, s10);
    end
  endtask

  initial begin
    // Corners: carry rippling through every slice.
    a = 16'hFFFF; b = 16'h0000; cin = 1; a10 = 10'h3FF; b10 = 0; check();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1; a10 = 10'h3FF; b10 = 10'h3FF; check();
    a = 16'h8000; b = 16'h8000; cin = 0; a10 = 10'h200; b10 = 10'h200; check();
    a = 16'h0F0F; b = 16'h00F1; cin = 0; a10 = 10'h10F; b10 = 10'h0F1; check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      a10 = 10'($urandom); b10 = 10'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
