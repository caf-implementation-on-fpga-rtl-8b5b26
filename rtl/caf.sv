// caf: complex ambiguity function (CAF) engine, time-delay and Doppler search.
//
// It answers: by how many samples (lag) and by which frequency offset must the
// received signal be moved to best match a stored reference? For every lag
// k = 0..N and frequency offset f_j it evaluates the dot product
//   chi(k, j) = sum_{m=0}^{N-1} conj(ref[m]) * cap[k+m] * exp(+i*2*pi*f_j*m/f_s)
// and returns the (k, j) with the largest |chi|^2, together with that value.
//
// Structure (one "lane" per frequency offset, NF lanes side by side):
//   reference_buffer (N samples) ----------------------------+
//   capture_buffer (2N samples) -> lag_sequencer -> freq_shift_j -> xcorr_j
//                                                   -> argmax_j -> max_select
// The lag_sequencer replays the capture window cap[k..k+N-1] for each lag and
// broadcasts it to all lanes together with ref[m]. Each freq_shift restarts its
// oscillator at phase 0 at the start of every lag (so the phase term is indexed
// by m), each xcorr multiplies by the conjugated reference and accumulates N
// products, each argmax keeps the best lag of its lane, and max_select picks the
// best lane.
//
// Lane j uses the offset index o = j - (NF-1)/2, i.e. offsets are spaced
// FREQ_STEP_INC phase steps apart and centred on zero: the oscillator phase
// increment is |o|*FREQ_STEP_INC and negative offsets set the conjugate bit.
// One phase step is f_s / 2^PHASE_BITS (152.6 Hz for f_s = 625 kHz, 12 bits).
//
// Interface (all AXI4-Stream, tdata = {Q, I}, each SIG_BITS signed and
// symmetric, i.e. never the most negative code):
//   s_ref_*  : reference load, N samples; refused while a frame is processed
//   s_cap_*  : capture, 2N samples per frame; a full capture starts the search
//              as soon as a reference is loaded
//   m_res_*  : one result per frame (lag index, frequency lane index, |chi|^2);
//              accepting it frees the capture buffer for the next frame
// Timing: (N+1)*N + NF + 13 clocks from the last capture sample to the result
// (1,001,062 clocks at the defaults). Reset: rst_n, active low, synchronous.
//
// The dataflow (capture, parallel frequency shifts, dot-product correlators
// against one reference, maximum search), the 2N capture length and the default
// sizes follow the design. The lane offset spacing, the reference load stream
// and the frame handshake are this implementation's choices.
module caf
  import caf_pkg::*;
#(
  parameter int unsigned N             = DEF_N,
  parameter int unsigned NF            = DEF_NF,
  parameter int unsigned PHASE_BITS    = DEF_PHASE_BITS,
  parameter int unsigned N_BITS        = DEF_N_BITS,
  parameter int unsigned SIG_BITS      = DEF_SIG_BITS,
  parameter int unsigned FREQ_STEP_INC = 1,
  // derived sizes
  parameter int unsigned ACC_BITS      = 2 * SIG_BITS + $clog2(N),
  parameter int unsigned MAG_BITS      = 2 * ACC_BITS,
  parameter int unsigned LAG_BITS      = $clog2(N + 1),
  parameter int unsigned F_BITS        = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // reference load
  input  logic                  s_ref_tvalid,
  output logic                  s_ref_tready,
  input  logic [2*SIG_BITS-1:0] s_ref_tdata,
  // capture
  input  logic                  s_cap_tvalid,
  output logic                  s_cap_tready,
  input  logic [2*SIG_BITS-1:0] s_cap_tdata,
  // result
  output logic                  m_res_tvalid,
  input  logic                  m_res_tready,
  output logic [LAG_BITS-1:0]   m_res_lag,
  output logic [F_BITS-1:0]     m_res_freq,
  output logic [MAG_BITS-1:0]   m_res_mag,
  // status
  output logic                  ref_loaded,
  output logic                  busy
);

  localparam int unsigned W          = 2 * SIG_BITS;
  localparam int unsigned CAP_A_BITS = $clog2(2 * N);
  localparam int unsigned REF_A_BITS = $clog2(N);
  localparam int unsigned CENTER     = (NF - 1) / 2;
  // lane side-band through freq_shift: {ref Q, ref I, frame_last, lag}
  localparam int unsigned FS_USER    = W + 1 + LAG_BITS;
  localparam int unsigned XC_USER    = 1 + LAG_BITS;

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic                  cap_full;
  logic                  seq_start, seq_active, rd_en;
  logic [CAP_A_BITS-1:0] cap_addr;
  logic [REF_A_BITS-1:0] ref_addr;
  logic [W-1:0]          cap_rd, ref_rd;
  logic                  seq_valid, seq_ready, seq_last, seq_frame_last;
  logic [LAG_BITS-1:0]   seq_lag;
  logic                  res_take;

  // ------------------------------------------------------------------ control
  assign seq_start = (state == S_IDLE) && cap_full && ref_loaded;
  assign res_take  = m_res_tvalid && m_res_tready;
  assign busy      = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE:  if (seq_start) state <= S_RUN;
        S_RUN:   if (res_take)  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ buffers
  reference_buffer #(.DEPTH(N), .W(W), .A_BITS(REF_A_BITS)) u_ref (
    .clk       (clk),
    .rst_n     (rst_n),
    .lock      (busy),
    .s_tvalid  (s_ref_tvalid),
    .s_tready  (s_ref_tready),
    .s_tdata   (s_ref_tdata),
    .loaded    (ref_loaded),
    .rd_en     (rd_en),
    .rd_addr   (ref_addr),
    .rd_data   (ref_rd)
  );

  capture_buffer #(.DEPTH(2 * N), .W(W), .A_BITS(CAP_A_BITS)) u_cap (
    .clk       (clk),
    .rst_n     (rst_n),
    .release_i (res_take),
    .s_tvalid  (s_cap_tvalid),
    .s_tready  (s_cap_tready),
    .s_tdata   (s_cap_tdata),
    .full      (cap_full),
    .rd_en     (rd_en),
    .rd_addr   (cap_addr),
    .rd_data   (cap_rd)
  );

  lag_sequencer #(
    .N          (N),
    .CAP_A_BITS (CAP_A_BITS),
    .REF_A_BITS (REF_A_BITS),
    .LAG_BITS   (LAG_BITS)
  ) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (seq_start),
    .active       (seq_active),
    .rd_en        (rd_en),
    .cap_addr     (cap_addr),
    .ref_addr     (ref_addr),
    .m_tvalid     (seq_valid),
    .m_tready     (seq_ready),
    .m_tlast      (seq_last),
    .m_lag        (seq_lag),
    .m_frame_last (seq_frame_last)
  );

  // ------------------------------------------------------------------ lanes
  logic [NF-1:0]       fs_in_ready;
  logic [NF-1:0]       lane_valid, lane_ready;
  logic [MAG_BITS-1:0] lane_mag [NF];
  logic [LAG_BITS-1:0] lane_lag [NF];

  // the sample is broadcast: it is taken when every lane can take it
  assign seq_ready = &fs_in_ready;

  for (genvar j = 0; j < NF; j++) begin : g_lane
    localparam int          OFF  = int'(j) - int'(CENTER);
    localparam int unsigned INC  = ((OFF < 0) ? -OFF : OFF) * FREQ_STEP_INC;
    localparam bit          CONJ = (OFF < 0);

    logic                         fs_valid, fs_ready, fs_last;
    logic signed [SIG_BITS-1:0]   fs_i, fs_q;
    logic [FS_USER-1:0]           fs_user;
    logic                         xc_in_ready;
    logic                         xc_valid, xc_ready;
    logic signed [ACC_BITS-1:0]   xc_i, xc_q;
    logic [XC_USER-1:0]           xc_user;
    logic                         am_in_ready;

    freq_shift #(
      .PHASE_BITS (PHASE_BITS),
      .N_BITS     (N_BITS),
      .X_BITS     (SIG_BITS),
      .O_BITS     (SIG_BITS),
      .PHASE_INC  (INC % (2 ** PHASE_BITS)),
      .CONJ       (CONJ),
      .USER_BITS  (FS_USER)
    ) u_fs (
      .clk      (clk),
      .rst_n    (rst_n),
      .s_tvalid (seq_valid && seq_ready),
      .s_tready (fs_in_ready[j]),
      .s_i      (cap_rd[SIG_BITS-1:0]),
      .s_q      (cap_rd[W-1:SIG_BITS]),
      .s_tlast  (seq_last),
      .s_tuser  ({ref_rd, seq_frame_last, seq_lag}),
      .m_tvalid (fs_valid),
      .m_tready (fs_ready),
      .m_i      (fs_i),
      .m_q      (fs_q),
      .m_tlast  (fs_last),
      .m_tuser  (fs_user)
    );

    assign fs_ready = xc_in_ready;

    xcorr #(
      .A_BITS    (SIG_BITS),
      .B_BITS    (SIG_BITS),
      .N         (N),
      .ACC_BITS  (ACC_BITS),
      .USER_BITS (XC_USER)
    ) u_xc (
      .clk      (clk),
      .rst_n    (rst_n),
      .s_tvalid (fs_valid),
      .s_tready (xc_in_ready),
      .s_ref_i  (fs_user[XC_USER +: SIG_BITS]),
      .s_ref_q  (fs_user[XC_USER + SIG_BITS +: SIG_BITS]),
      .s_x_i    (fs_i),
      .s_x_q    (fs_q),
      .s_tlast  (fs_last),
      .s_tuser  (fs_user[XC_USER-1:0]),
      .m_tvalid (xc_valid),
      .m_tready (xc_ready),
      .m_i      (xc_i),
      .m_q      (xc_q),
      .m_tuser  (xc_user)
    );

    assign xc_ready = am_in_ready;

    argmax #(.W(ACC_BITS), .IDX_BITS(LAG_BITS)) u_am (
      .clk      (clk),
      .rst_n    (rst_n),
      .s_tvalid (xc_valid),
      .s_tready (am_in_ready),
      .s_i      (xc_i),
      .s_q      (xc_q),
      .s_idx    (xc_user[LAG_BITS-1:0]),
      .s_tlast  (xc_user[LAG_BITS]),
      .m_tvalid (lane_valid[j]),
      .m_tready (lane_ready[j]),
      .m_mag    (lane_mag[j]),
      .m_idx    (lane_lag[j])
    );
  end

  max_select #(
    .NF       (NF),
    .MAG_BITS (MAG_BITS),
    .LAG_BITS (LAG_BITS),
    .F_BITS   (F_BITS)
  ) u_max (
    .clk        (clk),
    .rst_n      (rst_n),
    .lane_valid (lane_valid),
    .lane_ready (lane_ready),
    .lane_mag   (lane_mag),
    .lane_lag   (lane_lag),
    .m_tvalid   (m_res_tvalid),
    .m_tready   (m_res_tready),
    .m_mag      (m_res_mag),
    .m_lag      (m_res_lag),
    .m_freq     (m_res_freq)
  );

  // a new frame never starts while the previous one is still being replayed
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n) !(seq_start && seq_active));

  a_res_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                m_res_tvalid && !m_res_tready |=> m_res_tvalid && $stable(m_res_lag)
                                && $stable(m_res_freq));

endmodule
