// tb_mcsd_window -- checks the per-tap control bits of the MCSD window with
// a 24-tap window. Input samples are random, mostly below the threshold so
// that runs of small samples of every length occur, with random gaps in
// x_valid; m and the input threshold change between phases. Reference: the
// sample now in tap i is marked exactly when some later-or-equal sample t,
// at most m(t)-1 (and at most M_MAX-1) samples after it, completed a run of
// m(t) consecutive small samples. Also counts the cases the OR gates
// exist for: a sample marked only because a later sample completed the run.
module tb_mcsd_window;
  localparam int TAPS = 24, M_MAX = 16;
  logic               clk = 0, rst_n = 0, x_valid = 0;
  logic signed [15:0] x_in = 0;
  logic [3:0]         x_th = 4'd8;
  logic [4:0]         m_len = 5'd4;
  logic [TAPS-1:0]    in_ct;
  logic               ctrl;
  int checks = 0, failures = 0, n_retro = 0, n_short = 0, n_marked = 0;
  bit sm [$];   // small flag of every accepted sample
  bit cg [$];   // control signal of every accepted sample
  int mm [$];   // m in force when each sample was accepted

  mcsd_window #(.TAPS(TAPS), .M_MAX(M_MAX)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .x_th_log2(x_th),
    .m_len(m_len), .in_ct(in_ct), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit marked(input int s);
    int n = sm.size() - 1;
    for (int t = s; t <= n; t++) begin
      int m = (mm[t] == 0) ? 1 : mm[t];
      if (t - s < m && t - s < M_MAX && cg[t]) return 1;
    end
    return 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int phase = 0; phase < 30; phase++) begin
      m_len = 5'(1 + $urandom % M_MAX);
      x_th  = 4'(4 + $urandom % 8);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        x_valid = ($urandom % 5) != 0;
        if (($urandom % 8) == 0) x_in = 16'($urandom);
        else x_in = 16'(int'($signed(16'($urandom))) >>> (16 - int'(x_th)));
        #1;
        if (x_valid) begin
          bit s;
          int m, ok;
          s = ($signed(x_in) >= -(1 <<< x_th)) && ($signed(x_in) < (1 <<< x_th));
          m = (m_len == 0) ? 1 : int'(m_len);
          ok = s;
          for (int j = 1; j < m; j++)
            if (sm.size() - j < 0 || !sm[sm.size() - j]) ok = 0;
          checks++;
          if (ctrl !== 1'(ok)) begin
            failures++;
            if (failures < 10) $display("FAIL ctrl phase %0d", phase);
          end
          sm.push_back(s); cg.push_back(1'(ok)); mm.push_back(int'(m_len));
        end
        @(posedge clk);
        #1;
        for (int i2 = 0; i2 < TAPS; i2++) begin
          automatic int sidx = sm.size() - 1 - i2;
          automatic bit exp_b = (sidx >= 0) ? marked(sidx) : 1'b0;
          checks++;
          if (in_ct[i2] !== exp_b) begin
            failures++;
            if (failures < 10) $display("FAIL in_ct[%0d]=%b exp %b phase %0d", i2, in_ct[i2], exp_b, phase);
          end
          if (exp_b) n_marked++;
          if (exp_b && sidx >= 0 && !cg[sidx]) n_retro++;
          if (!exp_b && sidx >= 0 && sm[sidx]) n_short++;
        end
      end
    end
    checks += 3;
    if (n_marked == 0) begin failures++; $display("FAIL nothing marked"); end
    if (n_retro == 0)  begin failures++; $display("FAIL no sample marked through the OR gates"); end
    if (n_short == 0)  begin failures++; $display("FAIL no short run left unmarked"); end
    $display("marked=%0d through_or=%0d short_unmarked=%0d", n_marked, n_retro, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
