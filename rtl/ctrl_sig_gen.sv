// ctrl_sig_gen -- Control signal Generator of the MCSD window.
//
// An internal counter holds the number of consecutive small samples seen
// before the current one (saturating at M_MAX). For the current sample, the
// control signal is 1 when its AD output is 1 and the counter already holds
// at least m-1, i.e. when the current sample ends a run of at least m
// consecutive small samples. A sample whose AD output is 0 clears the
// counter. The counter advances only on x_valid, once per input sample.
//
// Interface: ad and m_len describe the current sample; ctrl is combinational
// from them and the counter; the counter is updated at the clock edge where
// x_valid is 1. m_len = 0 is treated as 1. Reset (rst_n low) clears the
// counter.
// Counting consecutive small inputs and raising control when the count is
// reached follow the document; the saturating counter, the comparison with a
// run-time m and the reset are this design's choices.
module ctrl_sig_gen #(
  parameter int unsigned M_MAX = 16,
  parameter int unsigned M_W   = $clog2(M_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x_valid,
  input  logic           ad,
  input  logic [M_W-1:0] m_len,
  output logic           ctrl
);
  logic [M_W-1:0] run_cnt;   // consecutive small samples before this one
  logic [M_W-1:0] need;      // previous small samples needed, m-1

  assign need = (m_len == '0) ? '0 : m_len - 1'b1;
  assign ctrl = ad && (run_cnt >= need);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            run_cnt <= '0;
    else if (x_valid) begin
      if (!ad)             run_cnt <= '0;
      else if (run_cnt != M_W'(M_MAX)) run_cnt <= run_cnt + 1'b1;
    end
  end
endmodule
