// cpx_multiply: pipelined complex multiplier with AXI4-Stream handshakes.
//
// Computes (xi + j*xq) * (yi + j*yq) in three register stages:
//   stage 1: the four partial products xi*yi, xq*yq, xi*yq and xq*yi
//   stage 2: I = xi*yi - xq*yq and Q = xi*yq + xq*yi
//   stage 3: truncation, keeping the top I_BITS (Q_BITS) of the full-width sum
// Operands may have different widths. The full-width sums are as wide as the
// wider product that forms them (XI_BITS+YI_BITS for I when all widths match), which holds any product of symmetric
// operands (no operand equal to the most negative two's-complement value).
// Setting I_BITS/Q_BITS to those widths turns the truncation off; otherwise
// the low bits of the sums are dropped on purpose, and a linter reports them
// as unused.
//
// Timing: latency 3 cycles, one sample accepted per cycle. The whole pipeline
// holds while the output is valid and m_tready is low (s_tready is then low),
// so no stage is loaded unless data can move on. s_tlast and s_tuser travel
// alongside the data unchanged.
//
// The stage split and the top-bits truncation follow the design; the stall
// scheme (one enable for all stages) is this implementation's choice.
module cpx_multiply #(
  parameter int unsigned XI_BITS   = 8,
  parameter int unsigned XQ_BITS   = 8,
  parameter int unsigned YI_BITS   = 8,
  parameter int unsigned YQ_BITS   = 8,
  parameter int unsigned I_BITS    = 8,
  parameter int unsigned Q_BITS    = 8,
  parameter int unsigned USER_BITS = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // slave side
  input  logic                        s_tvalid,
  output logic                        s_tready,
  input  logic signed [XI_BITS-1:0]   s_xi,
  input  logic signed [XQ_BITS-1:0]   s_xq,
  input  logic signed [YI_BITS-1:0]   s_yi,
  input  logic signed [YQ_BITS-1:0]   s_yq,
  input  logic                        s_tlast,
  input  logic [USER_BITS-1:0]        s_tuser,
  // master side
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic signed [I_BITS-1:0]    m_i,
  output logic signed [Q_BITS-1:0]    m_q,
  output logic                        m_tlast,
  output logic [USER_BITS-1:0]        m_tuser
);

  // widths of the I and Q sums: the wider of the two products that form each
  localparam int unsigned PI_BITS = (XI_BITS + YI_BITS > XQ_BITS + YQ_BITS) ?
                                    XI_BITS + YI_BITS : XQ_BITS + YQ_BITS;
  localparam int unsigned PQ_BITS = (XI_BITS + YQ_BITS > XQ_BITS + YI_BITS) ?
                                    XI_BITS + YQ_BITS : XQ_BITS + YI_BITS;

  // stage 1: partial products
  logic signed [XI_BITS+YI_BITS-1:0] xu;  // xi*yi
  logic signed [XQ_BITS+YQ_BITS-1:0] yv;  // xq*yq
  logic signed [XI_BITS+YQ_BITS-1:0] xv;  // xi*yq
  logic signed [XQ_BITS+YI_BITS-1:0] yu;  // xq*yi
  // stage 2: sums
  logic signed [PI_BITS-1:0] i_sum;
  logic signed [PQ_BITS-1:0] q_sum;

  logic [2:0]           vld;
  logic [2:0]           lst;
  logic [USER_BITS-1:0] usr [3];
  logic                 en;

  assign en       = !vld[2] || m_tready;
  assign s_tready = en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
    end else if (en) begin
      vld <= {vld[1:0], s_tvalid};
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      // stage 1
      xu     <= s_xi * s_yi;
      yv     <= s_xq * s_yq;
      xv     <= s_xi * s_yq;
      yu     <= s_xq * s_yi;
      lst[0] <= s_tlast;
      usr[0] <= s_tuser;
      // stage 2
      i_sum  <= PI_BITS'(xu) - PI_BITS'(yv);
      q_sum  <= PQ_BITS'(xv) + PQ_BITS'(yu);
      lst[1] <= lst[0];
      usr[1] <= usr[0];
      // stage 3
      m_i    <= i_sum[PI_BITS-1 -: I_BITS];
      m_q    <= q_sum[PQ_BITS-1 -: Q_BITS];
      lst[2] <= lst[1];
      usr[2] <= usr[1];
    end
  end

  assign m_tvalid = vld[2];
  assign m_tlast  = lst[2];
  assign m_tuser  = usr[2];

  // AXI4-Stream rule: a valid output is held stable until it is accepted.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_i) && $stable(m_q));

endmodule
