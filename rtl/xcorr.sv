// xcorr: dot-product cross correlator for one frequency lane.
//
// For every tlast-delimited frame of samples (one frame per lag) it computes
//   acc = sum_m conj(r[m]) * x[m]
// where r is the reference and x the (frequency shifted) capture window. The
// conjugate is taken by negating the reference Q input. Products come from a
// cpx_multiply pipeline run at full width (no truncation), and are summed in an
// ACC_BITS accumulator wide enough for N full-scale products, so no correlation
// energy is lost. At the frame's last sample the sum is emitted together with the
// tuser of that sample (the lag index and frame flags, supplied by the caller).
//
// Interface: AXI4-Stream in (reference and capture sample side by side) and
// out (one complex sum per frame). Timing: the sum of a frame is valid 4 cycles
// after its last sample is accepted; one sample per cycle is accepted while the
// output register is free. Inputs must be symmetric (no most-negative value).
//
// The multiply-accumulate form follows the design; the accumulator width and the
// framing by tlast are this implementation's choices.
module xcorr
  import caf_pkg::*;
#(
  parameter int unsigned A_BITS    = DEF_SIG_BITS,  // reference I/Q width
  parameter int unsigned B_BITS    = DEF_SIG_BITS,  // shifted capture I/Q width
  parameter int unsigned N         = DEF_N,         // samples per dot product
  parameter int unsigned ACC_BITS  = A_BITS + B_BITS + $clog2(N),
  parameter int unsigned USER_BITS = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        s_tvalid,
  output logic                        s_tready,
  input  logic signed [A_BITS-1:0]    s_ref_i,
  input  logic signed [A_BITS-1:0]    s_ref_q,
  input  logic signed [B_BITS-1:0]    s_x_i,
  input  logic signed [B_BITS-1:0]    s_x_q,
  input  logic                        s_tlast,
  input  logic [USER_BITS-1:0]        s_tuser,
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic signed [ACC_BITS-1:0]  m_i,
  output logic signed [ACC_BITS-1:0]  m_q,
  output logic [USER_BITS-1:0]        m_tuser
);

  localparam int unsigned P_BITS = A_BITS + B_BITS;

  logic                      p_valid, p_ready, p_last;
  logic signed [P_BITS-1:0]  p_i, p_q;
  logic [USER_BITS-1:0]      p_user;
  logic signed [ACC_BITS-1:0] acc_i, acc_q;
  logic signed [ACC_BITS-1:0] sum_i, sum_q;

  cpx_multiply #(
    .XI_BITS   (A_BITS),
    .XQ_BITS   (A_BITS),
    .YI_BITS   (B_BITS),
    .YQ_BITS   (B_BITS),
    .I_BITS    (P_BITS),
    .Q_BITS    (P_BITS),
    .USER_BITS (USER_BITS)
  ) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_tvalid (s_tvalid),
    .s_tready (s_tready),
    .s_xi     (s_ref_i),
    .s_xq     (-s_ref_q),
    .s_yi     (s_x_i),
    .s_yq     (s_x_q),
    .s_tlast  (s_tlast),
    .s_tuser  (s_tuser),
    .m_tvalid (p_valid),
    .m_tready (p_ready),
    .m_i      (p_i),
    .m_q      (p_q),
    .m_tlast  (p_last),
    .m_tuser  (p_user)
  );

  // products are taken while the result register is free
  assign p_ready = !m_tvalid || m_tready;

  assign sum_i = acc_i + ACC_BITS'(p_i);
  assign sum_q = acc_q + ACC_BITS'(p_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_i    <= '0;
      acc_q    <= '0;
      m_tvalid <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (p_valid && p_ready) begin
        if (p_last) begin
          m_i      <= sum_i;
          m_q      <= sum_q;
          m_tuser  <= p_user;
          m_tvalid <= 1'b1;
          acc_i    <= '0;
          acc_q    <= '0;
        end else begin
          acc_i <= sum_i;
          acc_q <= sum_q;
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_i) && $stable(m_q));

endmodule
