// reconf_fir -- reconfigurable direct-form FIR filter with multiplier
// switch-off (MCSD window) and Russian Peasant tap multipliers.
//
// Computes y[n] = sum_{i=0}^{TAPS-1} C_i x[n-i]. Input samples enter a
// register delay line, tap i holding x[n-i]. Each tap has a multiplier unit
// (mult_unit, built on the modified Russian Peasant Multiplier) producing a
// 16-bit Q1.15 product, and the products, sign-extended to 24 bits, are
// added in a chain into the output.
//
// To save power the filter drops products that are bound to be tiny. The
// MCSD window (mcsd_window) marks each tap whose sample belongs to a run of
// at least m consecutive inputs below the input threshold 2^x_th_log2. An
// amplitude detector per tap flags coefficients below 2^c_th_log2. A tap's
// multiplier is switched off (phi_i = coefficient small AND in_ct_i) when
// both hold; its operands are then held at zero and it contributes zero.
// Requiring a run of m small samples keeps a multiplier from toggling on and
// off when the input amplitude hovers around the threshold.
//
// Interface and timing: when x_valid is 1 at a clock edge, x_in enters tap
// 0 and the delay line and control bits advance. At the next clock edge the
// sum over the updated taps is registered: y_valid is 1 for one cycle, two
// edges after the sample was presented, and y_out/mult_off then hold y[n]
// and the taps that were switched off for it. Samples may arrive every
// cycle. Coefficients and thresholds are plain inputs held stable by the
// user; rst_n is an asynchronous active-low reset that clears the delay
// lines and the output.
// From the document: the structure (AD, control generator, OR-gated
// control delay line, gated multipliers, adder chain), 16-bit data with 15
// fractional bits, 16-bit quantized products, 24-bit output, 75 taps.
// This design's choices: power-of-two thresholds and window length as
// run-time inputs, the sample strobe, the output register and the reset.
module reconf_fir
  import fir_pkg::*;
#(
  parameter int unsigned TAPS  = fir_pkg::N_TAPS,
  parameter int unsigned M_MAX = fir_pkg::MCSD_M_MAX,
  parameter int unsigned M_W   = $clog2(M_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             x_valid,
  input  sample_t          x_in,
  input  sample_t          coeff [TAPS],
  input  logic [TH_W-1:0]  x_th_log2,
  input  logic [TH_W-1:0]  c_th_log2,
  input  logic [M_W-1:0]   m_len,
  output logic             y_valid,
  output acc_t             y_out,
  output logic [TAPS-1:0]  mult_off
);
  sample_t         xd [TAPS];   // sample delay line, xd[i] = x[n-i]
  logic [TAPS-1:0] in_ct;       // MCSD control bit per tap
  logic [TAPS-1:0] c_small;     // coefficient below its threshold
  logic [TAPS-1:0] phi;         // multiplier switch-off per tap
  prod_t           prod [TAPS];
  acc_t            acc  [TAPS]; // adder chain, acc[i] = sum of taps 0..i
  logic            mcsd_ctrl;
  logic            sum_due;     // delay line advanced at the last edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) xd[i] <= '0;
    end else if (x_valid) begin
      xd[0] <= x_in;
      for (int i = 1; i < TAPS; i++) xd[i] <= xd[i-1];
    end
  end

  mcsd_window #(.TAPS(TAPS), .M_MAX(M_MAX), .M_W(M_W)) u_mcsd (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_valid  (x_valid),
    .x_in     (x_in),
    .x_th_log2(x_th_log2),
    .m_len    (m_len),
    .in_ct    (in_ct),
    .ctrl     (mcsd_ctrl)
  );

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    amp_detect #(.W(DATA_W), .TH_W(TH_W)) u_cad (
      .din    (coeff[i]),
      .th_log2(c_th_log2),
      .is_small  (c_small[i])
    );

    assign phi[i] = c_small[i] & in_ct[i];

    mult_unit #(.W(DATA_W), .FRAC_W(FRAC_W)) u_mult (
      .a  (xd[i]),
      .b  (coeff[i]),
      .off(phi[i]),
      .p  (prod[i])
    );

    if (i == 0) begin : g_first
      assign acc[0] = OUT_W'(prod[0]);
    end else begin : g_next
      assign acc[i] = acc[i-1] + OUT_W'(prod[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_due  <= 1'b0;
      y_valid  <= 1'b0;
      y_out    <= '0;
      mult_off <= '0;
    end else begin
      sum_due <= x_valid;
      y_valid <= sum_due;
      if (sum_due) begin
        y_out    <= acc[TAPS-1];
        mult_off <= phi;
      end
    end
  end

  // The control signal of the current sample is visible in in_ct[0] after
  // the sample enters the delay line.
  logic ctrl_unused;
  assign ctrl_unused = mcsd_ctrl;
endmodule
