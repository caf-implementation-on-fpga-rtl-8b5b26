// max_select: picks the overall CAF peak from the per-frequency maxima.
//
// Each of the NF lanes offers its largest |correlation|^2 and the lag where it
// occurred. Once every lane holds a result, the lanes are scanned one per clock
// (lane 0 first); a lane replaces the current best only when strictly larger,
// so ties go to the lowest frequency index. The winner's magnitude, lag and
// lane (frequency) index are then offered on the output stream. When the output
// is accepted, all lanes are acknowledged in the same cycle.
//
// Interface: NF AXI4-Stream inputs that are consumed together, one AXI4-Stream
// output. Timing: the clock edge that first sees every lane valid starts the
// scan, and the result is valid NF edges later.
//
// The design names this block and its job (the "Max" after the correlators);
// the sequential scan is this implementation's choice, as it costs one
// comparator and NF cycles against about a million cycles per CAF frame.
module max_select #(
  parameter int unsigned NF       = 49,
  parameter int unsigned MAG_BITS = 52,
  parameter int unsigned LAG_BITS = 10,
  parameter int unsigned F_BITS   = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NF-1:0]         lane_valid,
  output logic [NF-1:0]         lane_ready,
  input  logic [MAG_BITS-1:0]   lane_mag [NF],
  input  logic [LAG_BITS-1:0]   lane_lag [NF],
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic [MAG_BITS-1:0]   m_mag,
  output logic [LAG_BITS-1:0]   m_lag,
  output logic [F_BITS-1:0]     m_freq
);

  typedef enum logic [1:0] {S_WAIT, S_SCAN, S_OUT} state_t;
  state_t state;

  logic [F_BITS-1:0] j;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_WAIT;
      j     <= '0;
    end else begin
      unique case (state)
        S_WAIT: begin
          j <= '0;
          if (&lane_valid) state <= S_SCAN;
        end
        S_SCAN: begin
          if (j == F_BITS'(0) || lane_mag[j] > m_mag) begin
            m_mag  <= lane_mag[j];
            m_lag  <= lane_lag[j];
            m_freq <= j;
          end
          if (j == F_BITS'(NF - 1)) state <= S_OUT;
          else                      j     <= j + 1'b1;
        end
        S_OUT: begin
          if (m_tready) state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  assign m_tvalid   = (state == S_OUT);
  assign lane_ready = {NF{m_tvalid && m_tready}};

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_mag) && $stable(m_freq));

endmodule
