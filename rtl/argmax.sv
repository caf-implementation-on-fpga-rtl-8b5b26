// argmax: running maximum of |z|^2 over a frame of complex values.
//
// The magnitude is compared as x^2 + y^2: the square root is monotonic, so the
// largest squared magnitude marks the same sample as the largest magnitude, and
// no square-root or CORDIC unit is needed. Stage 1 registers the two squares;
// stage 2 adds them and compares the sum with the best value so far. The first
// value of a frame is always taken; later ones replace the best only when
// strictly larger, so ties keep the earliest index. On the frame's last value
// (s_tlast) the winner is written to the output register and the search restarts.
//
// Interface: AXI4-Stream in (value, index, tlast) and out (max |z|^2 and its
// index). Timing: the result is valid 2 cycles after the last value is
// accepted. The input is accepted every cycle while the output register is free.
//
// The squared-magnitude comparison follows the design; the two-stage split and
// the tie rule are this implementation's choices.
module argmax #(
  parameter int unsigned W        = 26,  // width of x and y
  parameter int unsigned IDX_BITS = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_tvalid,
  output logic                  s_tready,
  input  logic signed [W-1:0]   s_i,
  input  logic signed [W-1:0]   s_q,
  input  logic [IDX_BITS-1:0]   s_idx,
  input  logic                  s_tlast,
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic [2*W-1:0]        m_mag,
  output logic [IDX_BITS-1:0]   m_idx
);

  logic                 en;
  logic                 v1, last1;
  logic [2*W-1:0]       sq_i, sq_q;
  logic [IDX_BITS-1:0]  idx1;
  logic [2*W-1:0]       mag;
  logic [2*W-1:0]       best_mag;
  logic [IDX_BITS-1:0]  best_idx;
  logic                 first;
  logic                 take;
  logic signed [2*W-1:0] wide_i, wide_q;

  assign wide_i = (2*W)'(s_i);
  assign wide_q = (2*W)'(s_q);

  assign en       = !m_tvalid || m_tready;
  assign s_tready = en;

  // stage 1: squares (each is non-negative and below 2^(2W-2))
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else if (en) begin
      v1    <= s_tvalid;
      sq_i  <= unsigned'(wide_i * wide_i);
      sq_q  <= unsigned'(wide_q * wide_q);
      idx1  <= s_idx;
      last1 <= s_tlast;
    end
  end

  // stage 2: compare
  assign mag  = sq_i + sq_q;
  assign take = first || (mag > best_mag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first    <= 1'b1;
      m_tvalid <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (en && v1) begin
        if (last1) begin
          m_mag    <= take ? mag  : best_mag;
          m_idx    <= take ? idx1 : best_idx;
          m_tvalid <= 1'b1;
          first    <= 1'b1;
        end else begin
          first <= 1'b0;
          if (take) begin
            best_mag <= mag;
            best_idx <= idx1;
          end
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_mag) && $stable(m_idx));

endmodule
