// mcsd_window -- Multiplier Control Signal Decision window.
//
// Decides, per tap, whether the sample now held in that tap belongs to a
// run of at least m consecutive small input samples. The incoming sample
// x(n) goes through the amplitude detector (amp_detect) and the control
// signal generator (ctrl_sig_gen). Beside the sample delay line runs a
// one-bit delay line in_ct, one register per tap. Stage 0 loads the control
// signal; every later stage i loads in_ct[i-1], ORed with the control signal
// when i < m. So when control rises because samples n..n-m+1 were all
// small, the OR gates also mark the m-1 older samples of that run, which are
// then in taps 1..m-1; behind the window the bits just shift along. The OR
// gates exist for the first M_MAX-1 stages and are enabled by m at run time.
//
// Interface: the register stages advance on the clock edge where x_valid is
// 1, together with the filter's sample delay line, so in_ct[i] always
// describes the sample in tap i. ctrl is the control signal of the current
// input sample (combinational). Reset clears all bits.
// The AD, control generator and OR-gated control delay line follow the
// filter architecture figure; the run-time window length is this design's
// choice.
module mcsd_window
  import fir_pkg::*;
#(
  parameter int unsigned TAPS  = fir_pkg::N_TAPS,
  parameter int unsigned M_MAX = fir_pkg::MCSD_M_MAX,
  parameter int unsigned M_W   = $clog2(M_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              x_valid,
  input  logic [DATA_W-1:0] x_in,
  input  logic [TH_W-1:0]   x_th_log2,
  input  logic [M_W-1:0]    m_len,
  output logic [TAPS-1:0]   in_ct,
  output logic              ctrl
);
  logic ad;

  amp_detect #(.W(DATA_W), .TH_W(TH_W)) u_ad (
    .din    (x_in),
    .th_log2(x_th_log2),
    .is_small  (ad)
  );

  ctrl_sig_gen #(.M_MAX(M_MAX), .M_W(M_W)) u_cg (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_valid(x_valid),
    .ad     (ad),
    .m_len  (m_len),
    .ctrl   (ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_ct <= '0;
    else if (x_valid) begin
      in_ct[0] <= ctrl;
      for (int i = 1; i < TAPS; i++) begin
        if (i < M_MAX && i < int'(m_len)) in_ct[i] <= in_ct[i-1] | ctrl;
        else                              in_ct[i] <= in_ct[i-1];
      end
    end
  end
endmodule
