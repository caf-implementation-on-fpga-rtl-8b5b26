// sig_gen: numerically controlled oscillator (direct digital synthesis).
//
// A PHASE_BITS-bit phase accumulator advances by PHASE_INC for every sample
// taken from the output stream. The phase indexes a half-sine lookup table of
// 2^(PHASE_BITS-1) entries: the low PHASE_BITS-1 bits address the table and the
// phase MSB selects the negative half-period. The cosine is read from the same
// table a quarter period (2^(PHASE_BITS-2)) ahead. Output amplitude is
// 2^(N_BITS-1)-1 (see caf_pkg::half_sine).
//
// Frequency: f_out = PHASE_INC * f_s / 2^PHASE_BITS, where f_s is the rate at
// which samples are taken (one per accepted sample, not one per clock), so the
// resolution is f_s / 2^PHASE_BITS. CONJ=1 negates the sine output, giving the
// complex conjugate, i.e. the frequency -f_out.
//
// Interface: an AXI4-Stream master that is always valid after reset. The
// outputs are registered (a synchronous ROM read, which maps to block RAM):
// m_cos/m_sin show the current phase; on an accepted sample the next phase is
// loaded. If m_sync is high with the accepted sample, the phase restarts at zero
// instead, so each frame of samples starts at phase 0. Reset also sets phase 0.
//
// The half-sine table, accumulator and the conjugate option follow the design;
// the restart input and the quarter-period cosine read are this
// implementation's choices.
module sig_gen
  import caf_pkg::*;
#(
  parameter int unsigned PHASE_BITS = DEF_PHASE_BITS,
  parameter int unsigned N_BITS     = DEF_N_BITS,
  parameter int unsigned PHASE_INC  = 0,
  parameter bit          CONJ       = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       m_tvalid,
  input  logic                       m_tready,
  input  logic                       m_sync,   // restart at phase 0 after this sample
  output logic signed [N_BITS-1:0]   m_cos,
  output logic signed [N_BITS-1:0]   m_sin
);

  localparam int unsigned LUT_DEPTH = 2 ** (PHASE_BITS - 1);
  localparam logic [PHASE_BITS-1:0] QUARTER = PHASE_BITS'(2 ** (PHASE_BITS - 2));
  localparam logic [PHASE_BITS-1:0] INC     = PHASE_BITS'(PHASE_INC);

  typedef logic signed [N_BITS-1:0] lut_t [LUT_DEPTH];

  function automatic lut_t build_lut();
    lut_t t;
    for (int k = 0; k < LUT_DEPTH; k++) t[k] = N_BITS'(half_sine(k, PHASE_BITS, N_BITS));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  // sine of a phase from the half-period table
  function automatic logic signed [N_BITS-1:0] sine(input logic [PHASE_BITS-1:0] ph);
    logic signed [N_BITS-1:0] v;
    v = LUT[ph[PHASE_BITS-2:0]];
    return ph[PHASE_BITS-1] ? -v : v;
  endfunction

  logic [PHASE_BITS-1:0] phase, phase_nxt;
  logic                  adv;

  assign adv = m_tvalid && m_tready;

  always_comb begin
    phase_nxt = phase;
    if (adv) phase_nxt = m_sync ? '0 : phase + INC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      m_tvalid <= 1'b0;
      m_cos    <= sine(QUARTER);
      m_sin    <= '0;
    end else begin
      phase    <= phase_nxt;
      m_tvalid <= 1'b1;
      m_cos    <= sine(phase_nxt + QUARTER);
      m_sin    <= CONJ ? -sine(phase_nxt) : sine(phase_nxt);
    end
  end

endmodule
