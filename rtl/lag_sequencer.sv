// lag_sequencer: address generator that replays the capture for every lag.
//
// After a 'start' pulse it walks lag k = 0..N and, within each lag, sample
// m = 0..N-1, reading the reference at m and the capture at k+m. The two
// buffers have a one-cycle synchronous read, so their read-data registers act
// as the output stage of this stream: a read is issued only when that stage is
// empty or being taken (rd_en = advance), and the side-band registered here
// (lag index, last sample of the lag, last lag of the frame) lines up with the
// data. 'active' stays high until the final read has been issued.
//
// Total: (N+1)*N samples per frame, one per clock when nothing stalls.
// Walking the lags by re-reading the capture is this implementation's choice;
// the design specifies the N+1 dot products of an N-sample reference over a
// 2N-sample capture.
module lag_sequencer #(
  parameter int unsigned N          = 1000,
  parameter int unsigned CAP_A_BITS = $clog2(2 * N),
  parameter int unsigned REF_A_BITS = $clog2(N),
  parameter int unsigned LAG_BITS   = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  active,
  output logic                  rd_en,
  output logic [CAP_A_BITS-1:0] cap_addr,
  output logic [REF_A_BITS-1:0] ref_addr,
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic                  m_tlast,       // last sample of a lag
  output logic [LAG_BITS-1:0]   m_lag,
  output logic                  m_frame_last   // sample belongs to the last lag
);

  logic [LAG_BITS-1:0]   k;
  logic [REF_A_BITS-1:0] m;
  logic                  adv;
  logic                  last_m, last_k;

  assign last_m   = (m == REF_A_BITS'(N - 1));
  assign last_k   = (k == LAG_BITS'(N));
  assign adv      = active && (!m_tvalid || m_tready);
  assign rd_en    = adv;
  assign cap_addr = CAP_A_BITS'(k) + CAP_A_BITS'(m);
  assign ref_addr = m;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      m_tvalid <= 1'b0;
      k        <= '0;
      m        <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        k      <= '0;
        m      <= '0;
      end else if (adv) begin
        m_tvalid     <= 1'b1;
        m_tlast      <= last_m;
        m_lag        <= k;
        m_frame_last <= last_k;
        if (last_m) begin
          m <= '0;
          if (last_k) begin
            active <= 1'b0;
            k      <= '0;
          end else begin
            k <= k + 1'b1;
          end
        end else begin
          m <= m + 1'b1;
        end
      end
    end
  end

endmodule
