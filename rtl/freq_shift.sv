// freq_shift: shifts a complex sample stream in frequency.
//
// Each accepted input sample x[n] is multiplied by the oscillator output
// cos(2*pi*f*n/f_s) + j*sin(2*pi*f*n/f_s) from a sig_gen instance, using a
// cpx_multiply pipeline, so the spectrum moves up by f (down by f with CONJ=1).
// The oscillator advances only when an input sample is accepted, so sample n
// always meets oscillator sample n and a stall cannot introduce a phase jump.
// The product keeps the top O_BITS of the X_BITS+N_BITS wide result.
//
// Interface: AXI4-Stream in and out, I and Q in separate ports; s_tlast and
// s_tuser pass through. s_tlast also restarts the oscillator at phase 0 for the
// next sample, so every tlast-delimited frame is shifted with the same starting
// phase. Latency 3 cycles, one sample per cycle.
//
// The composition (oscillator plus complex multiplier, shared oscillator
// parameters, conjugate bit for negative frequencies) follows the design; the
// phase restart on tlast is this implementation's choice.
module freq_shift
  import caf_pkg::*;
#(
  parameter int unsigned PHASE_BITS = DEF_PHASE_BITS,
  parameter int unsigned N_BITS     = DEF_N_BITS,
  parameter int unsigned X_BITS     = DEF_SIG_BITS,
  parameter int unsigned O_BITS     = X_BITS,
  parameter int unsigned PHASE_INC  = 0,
  parameter bit          CONJ       = 1'b0,
  parameter int unsigned USER_BITS  = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      s_tvalid,
  output logic                      s_tready,
  input  logic signed [X_BITS-1:0]  s_i,
  input  logic signed [X_BITS-1:0]  s_q,
  input  logic                      s_tlast,
  input  logic [USER_BITS-1:0]      s_tuser,
  output logic                      m_tvalid,
  input  logic                      m_tready,
  output logic signed [O_BITS-1:0]  m_i,
  output logic signed [O_BITS-1:0]  m_q,
  output logic                      m_tlast,
  output logic [USER_BITS-1:0]      m_tuser
);

  logic                     nco_valid, nco_ready;
  logic signed [N_BITS-1:0] nco_cos, nco_sin;
  logic                     mul_ready;

  sig_gen #(
    .PHASE_BITS (PHASE_BITS),
    .N_BITS     (N_BITS),
    .PHASE_INC  (PHASE_INC),
    .CONJ       (CONJ)
  ) u_sig_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .m_tvalid (nco_valid),
    .m_tready (nco_ready),
    .m_sync   (s_tlast),
    .m_cos    (nco_cos),
    .m_sin    (nco_sin)
  );

  // join the input stream with the oscillator stream
  assign nco_ready = s_tvalid && mul_ready;
  assign s_tready  = nco_valid && mul_ready;

  cpx_multiply #(
    .XI_BITS   (X_BITS),
    .XQ_BITS   (X_BITS),
    .YI_BITS   (N_BITS),
    .YQ_BITS   (N_BITS),
    .I_BITS    (O_BITS),
    .Q_BITS    (O_BITS),
    .USER_BITS (USER_BITS)
  ) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_tvalid (s_tvalid && nco_valid),
    .s_tready (mul_ready),
    .s_xi     (s_i),
    .s_xq     (s_q),
    .s_yi     (nco_cos),
    .s_yq     (nco_sin),
    .s_tlast  (s_tlast),
    .s_tuser  (s_tuser),
    .m_tvalid (m_tvalid),
    .m_tready (m_tready),
    .m_i      (m_i),
    .m_q      (m_q),
    .m_tlast  (m_tlast),
    .m_tuser  (m_tuser)
  );

endmodule
