// tb_reconf_fir -- end-to-end test of the reconfigurable FIR filter, run
// with 16 taps (M_MAX 16): the default 75-tap filter flattens into a very
// large simulation model, and every mechanism is already reachable at 16.
//
// Coefficients are random Q1.15 values, the even taps below the
// coefficient threshold. The input alternates loud stretches with quiet
// stretches (samples below the input threshold) of random length, so runs
// both shorter and longer than the window length m occur; x_valid has
// random gaps, and m and the thresholds change between phases. A reference
// model, written from the filter equation and the switch-off rule rather
// than from the RTL structure, predicts every output: for each tap it
// decides from the sample history whether the sample there belongs to a
// completed run of m small samples, switches the tap off when that holds
// and the coefficient is small, and adds the floor-quantized, saturated
// products of the other taps. Each output is checked for value, for the
// set of switched-off taps and for its latency (two clock edges after the
// sample was taken).
//
// Mechanisms counted (each must occur): tap switched off; tap switched off
// through the window's OR gates (sample marked by a later sample's control
// signal); small sample and coefficient left switched on because its run
// was shorter than m; gap in x_valid; change of m while running; saturated
// (-1 x -1) product. The share of cancelled multiplications and the mean
// square error against the filter with no switch-off are printed.
module tb_reconf_fir;
  import fir_pkg::*;
  localparam int TAPS = 16;
  localparam int M_MAX = fir_pkg::MCSD_M_MAX;

  logic            clk = 0, rst_n = 0, x_valid = 0;
  sample_t         x_in = '0;
  sample_t         coeff [TAPS];
  logic [3:0]      x_th = 4'd9, c_th = 4'd12;
  logic [4:0]      m_len = 5'd4;
  logic            y_valid;
  acc_t            y_out;
  logic [TAPS-1:0] mult_off;

  reconf_fir #(.TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .coeff(coeff),
    .x_th_log2(x_th), .c_th_log2(c_th), .m_len(m_len),
    .y_valid(y_valid), .y_out(y_out), .mult_off(mult_off));

  int checks = 0, failures = 0;
  int n_off = 0, n_off_or = 0, n_short_on = 0, n_gap = 0, n_mchange = 0, n_sat = 0;
  longint n_mults = 0;
  real sq_err = 0.0;

  // Sample history since reset.
  int sx [$];   // sample value
  bit sm [$];   // sample below the input threshold
  bit cg [$];   // sample completed a run of m small samples
  int mm [$];   // m in force when the sample arrived

  typedef struct { int due; int y; logic [TAPS-1:0] off; } exp_t;
  exp_t expq [$];
  int cyc = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qmul(input int x, input int c);
    longint q = (longint'(x) * longint'(c)) >>> 15;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return int'(q);
  endfunction

  function automatic bit marked(input int s);
    for (int t = s; t < sm.size(); t++) begin
      int m = (mm[t] == 0) ? 1 : mm[t];
      if (t - s < m && t - s < M_MAX && cg[t]) return 1;
    end
    return 0;
  endfunction

  function automatic bit is_small(input int v, input int k);
    return v >= -(1 << k) && v < (1 << k);
  endfunction

  // Called after a sample has been taken: predicts the output for it.
  task automatic predict();
    exp_t e;
    int y = 0, y_ideal = 0;
    int n = sx.size() - 1;
    e.off = '0;
    for (int i = 0; i < TAPS; i++) begin
      int s = n - i;
      int xv = (s >= 0) ? sx[s] : 0;
      int c = int'(coeff[i]);
      bit cs = is_small(c, int'(c_th));
      bit mk = (s >= 0) ? marked(s) : 1'b0;
      int p = qmul(xv, c);
      y_ideal += p;
      n_mults++;
      if (cs && mk) begin
        e.off[i] = 1'b1;
        n_off++;
        if (!cg[s]) n_off_or++;
      end else begin
        y += p;
        if (cs && s >= 0 && sm[s]) n_short_on++;
        if (xv == -32768 && c == -32768) n_sat++;
      end
    end
    e.y = y;
    e.due = cyc + 1;
    sq_err += (real'(y - y_ideal) / 32768.0) ** 2;
    expq.push_back(e);
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) begin
      if (i % 2 == 0) coeff[i] = sample_t'(int'($signed(16'($urandom))) >>> (16 - 12));
      else              coeff[i] = sample_t'($urandom);
    end
    coeff[3] = -16'sd32768;   // meets a full-scale negative sample below
  end

  // Output checker. cyc counts clock edges; it advances after each check,
  // so predict() at edge k (which runs before this check) schedules the
  // output for edge k+1.
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (expq.size() > 0 && expq[0].due == cyc) begin
        automatic exp_t e = expq.pop_front();
        checks++;
        if (!y_valid || int'(y_out) !== e.y || mult_off !== e.off) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d valid=%b y=%0d exp %0d off=%h exp %h",
                     cyc, y_valid, y_out, e.y, mult_off, e.off);
        end
      end else if (y_valid) begin
        failures++;
        checks++;
        if (failures < 10) $display("FAIL unexpected y_valid at cyc %0d", cyc);
      end
    end
    cyc++;
  end

  initial begin
    int prev_m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    prev_m = int'(m_len);
    for (int phase = 0; phase < 8; phase++) begin
      // The coefficient threshold acts when an output is registered, one
      // edge after its sample: let the last output of a phase register
      // before the settings change.
      @(negedge clk);
      x_valid = 0;
      @(posedge clk);
      #1;
      m_len = 5'(1 + $urandom % M_MAX);
      if (phase == 0) m_len = 5'd3;
      if (int'(m_len) != prev_m && sx.size() > 0) n_mchange++;
      prev_m = int'(m_len);
      x_th = 4'(7 + $urandom % 4);
      c_th = 4'(11 + $urandom % 2);
      for (int seg = 0; seg < 12; seg++) begin
        automatic bit quiet = seg % 2;
        automatic int len = quiet ? 1 + $urandom % (2 * M_MAX) : 1 + $urandom % 6;
        for (int k = 0; k < len; k++) begin
          @(negedge clk);
          if (($urandom % 6) == 0) begin
            x_valid = 0; n_gap++;
            @(negedge clk);
          end
          x_valid = 1;
          if (quiet) x_in = sample_t'(int'($signed(16'($urandom))) >>> (16 - int'(x_th)));
          else       x_in = sample_t'($urandom);
          if (phase == 2 && seg == 0 && k == 0) x_in = -16'sd32768;
          // Record the sample as the filter takes it at the next edge.
          begin
            automatic int m = (m_len == 0) ? 1 : int'(m_len);
            automatic bit s = is_small(int'(x_in), int'(x_th));
            automatic bit ok = s;
            for (int j = 1; j < m; j++)
              if (sm.size() - j < 0 || !sm[sm.size() - j]) ok = 0;
            sx.push_back(int'(x_in)); sm.push_back(s); cg.push_back(ok);
            mm.push_back(int'(m_len));
          end
          @(posedge clk);
          predict();
        end
      end
    end
    @(negedge clk);
    x_valid = 0;
    repeat (5) @(posedge clk);
    #3;
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    checks += 6;
    if (n_off == 0)      begin failures++; $display("FAIL no multiplier switched off"); end
    if (n_off_or == 0)   begin failures++; $display("FAIL no switch-off through the window OR gates"); end
    if (n_short_on == 0) begin failures++; $display("FAIL no short run left switched on"); end
    if (n_gap == 0)      begin failures++; $display("FAIL no gap in x_valid"); end
    if (n_mchange == 0)  begin failures++; $display("FAIL m never changed"); end
    if (n_sat == 0)      begin failures++; $display("FAIL no saturated product"); end
    $display("samples=%0d taps_off=%0d via_or=%0d short_on=%0d gaps=%0d m_changes=%0d sat=%0d",
             sx.size(), n_off, n_off_or, n_short_on, n_gap, n_mchange, n_sat);
    $display("cancelled multiplications %0.1f%%, MSE vs. no switch-off %e",
             100.0 * real'(n_off) / real'(n_mults), sq_err / real'(sx.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
