// tb_ctrl_sig_gen -- drives random AD flags (mostly small, so long runs
// occur) with random gaps in x_valid and a window length m that changes
// between phases, and checks the control signal of every sample against the
// history: ctrl = 1 exactly when this sample and the m-1 samples before it
// (since reset) were all small. Runs far longer than M_MAX check the
// counter's saturation.
module tb_ctrl_sig_gen;
  localparam int M_MAX = 16;
  logic       clk = 0, rst_n = 0, x_valid = 0, ad = 0, ctrl;
  logic [4:0] m_len = 5'd4;
  int checks = 0, failures = 0, n_ctrl = 0, n_long = 0;
  bit hist [$];   // AD flag of every sample accepted since reset

  ctrl_sig_gen #(.M_MAX(M_MAX)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .ad(ad), .m_len(m_len), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model(input bit cur, input int m);
    int need = (m == 0) ? 1 : m;
    if (!cur) return 0;
    if (hist.size() < need - 1) return 0;
    for (int j = 1; j < need; j++)
      if (!hist[hist.size() - j]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int phase = 0; phase < 40; phase++) begin
      m_len <= 5'(1 + $urandom % M_MAX);
      if (phase == 5) m_len <= 5'(M_MAX);   // all-small phase: full window
      if (phase == 39) m_len <= 5'd0;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        x_valid = ($urandom % 4) != 0;
        // Long runs of small samples, broken now and then.
        ad = (phase % 5 == 0) ? 1'b1 : (($urandom % 10) != 0);
        #1;
        checks++;
        if (ctrl !== model(ad, int'(m_len))) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d ad=%b m=%0d ctrl=%b", phase, ad, m_len, ctrl);
        end
        if (ctrl) n_ctrl++;
        if (ctrl && int'(m_len) == M_MAX) n_long++;
        if (x_valid) hist.push_back(ad);
        @(posedge clk);
      end
    end
    checks += 2;
    if (n_ctrl == 0) begin failures++; $display("FAIL ctrl never rose"); end
    if (n_long == 0) begin failures++; $display("FAIL window M_MAX never completed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
