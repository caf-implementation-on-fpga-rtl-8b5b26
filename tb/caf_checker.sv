// caf_checker: stimulus and bit-exact checker for the caf top level.
//
// It is instantiated next to a caf instance by tb_caf (small sizes) and by
// tb_caf_full (default sizes), and drives the three streams of the engine.
// For every frame it builds a pseudo-random +/-A reference (a PRN-like
// non-return-to-zero sequence on I and Q), and a 2N-sample capture that holds
// the reference delayed by K0 samples and multiplied by exp(-i*2*pi*o*n/2^PB)
// for the chosen lane offset o, surrounded by independent +/-A samples. The
// expected result is computed independently with the same integer arithmetic
// as the hardware (oscillator rounding, truncation after the frequency shift,
// full-width correlation, first maximum wins), and the (lag, frequency) must
// also equal the planted (K0, lane).
//
// Mechanisms exercised and counted (each must occur at least once):
//   frames       : complete CAF frames checked
//   cap_refused  : capture samples refused because the buffer is frozen
//   ref_refused  : reference writes refused while a frame is processed
//   ref_reload   : reference replaced between frames
//   res_stall    : cycles the result waited for m_res_tready
//   neg_win/pos_win/zero_win : peaks found in a negative, positive, zero
//                  offset lane (conjugated, plain, and zero-increment oscillator)
// The frame latency (full capture to result valid) is checked against
// (N+1)*N + NF + 14 cycles.
// REF_LEN < N zero-pads the reference (a shorter correlation run on the same
// hardware); PLANT_K0 and LANE0 fix the delay and lane of the first frame;
// CHECK_MECH = 0 drops the mechanism counts for single-frame workload runs.
module caf_checker #(
  parameter int unsigned N          = 32,
  parameter int unsigned NF         = 5,
  parameter int unsigned PHASE_BITS = 12,
  parameter int unsigned N_BITS     = 8,
  parameter int unsigned SIG_BITS   = 8,
  parameter int unsigned STEP       = 1,
  parameter int unsigned FRAMES     = 4,
  parameter int unsigned REF_LEN    = N,    // non-zero part of the reference
  parameter int          PLANT_K0   = -1,   // delay of frame 0 (-1: random)
  parameter int          LANE0      = -1,   // lane of frame 0 (-1: top lane)
  parameter bit          CHECK_MECH = 1'b1, // require every mechanism to occur
  parameter int unsigned LAG_BITS   = 6,
  parameter int unsigned F_BITS     = 3,
  parameter int unsigned MAG_BITS   = 52
) (
  input  logic                  clk,
  output logic                  rst_n,
  output logic                  s_ref_tvalid,
  input  logic                  s_ref_tready,
  output logic [2*SIG_BITS-1:0] s_ref_tdata,
  output logic                  s_cap_tvalid,
  input  logic                  s_cap_tready,
  output logic [2*SIG_BITS-1:0] s_cap_tdata,
  input  logic                  m_res_tvalid,
  output logic                  m_res_tready,
  input  logic [LAG_BITS-1:0]   m_res_lag,
  input  logic [F_BITS-1:0]     m_res_freq,
  input  logic [MAG_BITS-1:0]   m_res_mag,
  input  logic                  ref_loaded,
  input  logic                  busy,
  output logic                  done,
  output int                    checks,
  output int                    failures
);

  localparam real TWO_PI = 6.283185307179586;
  localparam int  AMP    = (1 << (SIG_BITS - 1)) - 28;   // PRN amplitude, e.g. 100 for 8 bits
  localparam int  PH     = 1 << PHASE_BITS;
  localparam int  CENTER = (NF - 1) / 2;
  localparam int  LAT    = (N + 1) * N + NF + 14;

  // counters of the mechanisms
  int frames = 0, cap_refused = 0, ref_refused = 0, ref_reload = 0, res_stall = 0;
  int neg_win = 0, pos_win = 0, zero_win = 0;

  // per-lane oscillator tables and data of the frame being prepared
  int nco_c [NF][N];
  int nco_s [NF][N];
  int refi [N], refq [N];
  int capi [2*N], capq [2*N];

  // expected results, one entry per frame
  int     e_lag[$], e_freq[$], e_k0[$], e_lane[$];
  longint e_mag[$];

  int cap_full_t[$];      // cycle at which each capture completed
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int qamp(real v);
    real a;
    a = real'((1 << (N_BITS - 1)) - 1);
    return (v >= 0.0) ? $rtoi(a * v + 0.5) : -$rtoi(-a * v + 0.5);
  endfunction

  function automatic int qsig(real v);
    int lim, r;
    lim = (1 << (SIG_BITS - 1)) - 1;
    r = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    return (r > lim) ? lim : ((r < -lim) ? -lim : r);
  endfunction

  function automatic int lane_off(int j);
    return (j - CENTER) * int'(STEP);
  endfunction

  task automatic build_nco();
    for (int j = 0; j < NF; j++) begin
      int o, inc, p;
      o = lane_off(j);
      inc = ((o < 0) ? -o : o) % PH;
      p = 0;
      for (int m = 0; m < N; m++) begin
        nco_c[j][m] = qamp($cos(TWO_PI * real'(p) / real'(PH)));
        nco_s[j][m] = qamp($sin(TWO_PI * real'(p) / real'(PH))) * ((o < 0) ? -1 : 1);
        p = (p + inc) % PH;
      end
    end
  endtask

  task automatic new_reference();
    for (int m = 0; m < N; m++) begin
      refi[m] = (m >= int'(REF_LEN)) ? 0 : ($urandom_range(1, 0) ? AMP : -AMP);
      refq[m] = (m >= int'(REF_LEN)) ? 0 : ($urandom_range(1, 0) ? AMP : -AMP);
    end
  endtask

  // capture: reference delayed by k0 and shifted by -(offset of lane)
  task automatic new_capture(int k0, int lane);
    int o;
    o = lane_off(lane);
    for (int n = 0; n < 2 * N; n++) begin
      if (n >= k0 && n < k0 + int'(N)) begin
        real ph, re, im;
        ph = -TWO_PI * real'(o) * real'(n) / real'(PH);
        re = real'(refi[n - k0]) * $cos(ph) - real'(refq[n - k0]) * $sin(ph);
        im = real'(refi[n - k0]) * $sin(ph) + real'(refq[n - k0]) * $cos(ph);
        capi[n] = qsig(re);
        capq[n] = qsig(im);
      end else begin
        capi[n] = $urandom_range(1, 0) ? AMP : -AMP;
        capq[n] = $urandom_range(1, 0) ? AMP : -AMP;
      end
    end
  endtask

  // bit-exact model of the engine
  task automatic model(output int best_lag, output int best_freq, output longint best_mag);
    best_mag = -1; best_lag = 0; best_freq = 0;
    for (int j = 0; j < NF; j++) begin
      longint lane_mag;
      int     lane_lag;
      lane_mag = -1; lane_lag = 0;
      for (int k = 0; k <= int'(N); k++) begin
        longint ai, aq, mg;
        ai = 0; aq = 0;
        for (int m = 0; m < N; m++) begin
          int xi, xq, yi, yq;
          xi = capi[k + m]; xq = capq[k + m];
          yi = (xi * nco_c[j][m] - xq * nco_s[j][m]) >>> N_BITS;
          yq = (xi * nco_s[j][m] + xq * nco_c[j][m]) >>> N_BITS;
          ai += longint'(refi[m] * yi + refq[m] * yq);
          aq += longint'(refi[m] * yq - refq[m] * yi);
        end
        mg = ai * ai + aq * aq;
        if (mg > lane_mag) begin lane_mag = mg; lane_lag = k; end
      end
      if (lane_mag > best_mag) begin best_mag = lane_mag; best_lag = lane_lag; best_freq = j; end
    end
  endtask

  task automatic send_reference();
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      s_ref_tvalid = 1'b1;
      s_ref_tdata  = {SIG_BITS'(refq[m]), SIG_BITS'(refi[m])};
      do @(posedge clk); while (!s_ref_tready);
    end
    @(negedge clk); s_ref_tvalid = 1'b0;
  endtask

  task automatic send_capture();
    for (int n = 0; n < 2 * N; n++) begin
      @(negedge clk);
      s_cap_tvalid = 1'b1;
      s_cap_tdata  = {SIG_BITS'(capq[n]), SIG_BITS'(capi[n])};
      forever begin
        @(posedge clk);
        if (s_cap_tready) break;
        cap_refused++;
      end
    end
    cap_full_t.push_back(cyc);
    @(negedge clk); s_cap_tvalid = 1'b0;
  endtask

  // ------------------------------------------------------------ result side
  int results = 0;
  int t_valid = -1;
  always @(posedge clk) if (rst_n) begin
    if (m_res_tvalid && t_valid < 0) begin
      t_valid = cyc;
      checks++;
      if (cap_full_t.size() == 0 || t_valid - cap_full_t[0] > LAT ||
          t_valid - cap_full_t[0] < int'((N + 1) * N)) begin
        failures++;
        $display("frame latency %0d cycles, limit %0d", t_valid - cap_full_t[0], LAT);
      end else if (results == 0) begin
        $display("frame latency %0d cycles", t_valid - cap_full_t[0]);
      end
    end
    if (m_res_tvalid && !m_res_tready) res_stall++;
    if (m_res_tvalid && m_res_tready) begin
      int lane;
      checks++;
      if (int'(m_res_lag) != e_lag[0] || int'(m_res_freq) != e_freq[0] || longint'(m_res_mag) != e_mag[0]) begin
        failures++;
        $display("frame %0d: got lag %0d freq %0d mag %0d, model lag %0d freq %0d mag %0d",
                 results, m_res_lag, m_res_freq, m_res_mag, e_lag[0], e_freq[0], e_mag[0]);
      end
      checks++;
      if (int'(m_res_lag) != e_k0[0] || int'(m_res_freq) != e_lane[0]) begin
        failures++;
        $display("frame %0d: peak at lag %0d freq %0d, planted at lag %0d freq %0d",
                 results, m_res_lag, m_res_freq, e_k0[0], e_lane[0]);
      end else begin
        $display("frame %0d: peak at lag %0d, frequency lane %0d (offset %0d steps), |chi|^2 = %0d",
                 results, m_res_lag, m_res_freq, lane_off(int'(m_res_freq)), m_res_mag);
      end
      lane = lane_off(int'(m_res_freq));
      if (lane < 0) neg_win++; else if (lane > 0) pos_win++; else zero_win++;
      void'(e_lag.pop_front()); void'(e_freq.pop_front()); void'(e_mag.pop_front());
      void'(e_k0.pop_front()); void'(e_lane.pop_front()); void'(cap_full_t.pop_front());
      results++;
      frames++;
      t_valid = -1;
    end
    m_res_tready <= ($urandom_range(7, 0) == 0);
  end

  // reference writes offered while busy must be refused
  initial begin
    s_ref_tvalid = 1'b0;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int lanes [4];
    rst_n = 1'b0; s_cap_tvalid = 1'b0; s_cap_tdata = '0; s_ref_tdata = '0;
    m_res_tready = 1'b0; done = 1'b0; checks = 0; failures = 0;
    // the planted lanes: positive, negative, zero offset, then random
    lanes[0] = (LANE0 < 0) ? NF - 1 : LANE0; lanes[1] = 0; lanes[2] = CENTER; lanes[3] = 1;
    build_nco();
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int f = 0; f < int'(FRAMES); f++) begin
      int k0, lane, bl, bf;
      longint bm;
      lane = lanes[f % 4];
      k0 = (f == 0 && PLANT_K0 >= 0) ? PLANT_K0 : int'($urandom_range(N, 0));
      if (f == 0 || f == 2) begin
        // a new reference is loaded only between frames
        while (busy || cap_full_t.size() != 0) @(posedge clk);
        new_reference();
        send_reference();
        if (f != 0) ref_reload++;
        checks++;
        if (!ref_loaded) begin failures++; $display("ref_loaded low after a load"); end
      end
      new_capture(k0, lane);
      model(bl, bf, bm);
      e_lag.push_back(bl); e_freq.push_back(bf); e_mag.push_back(bm);
      e_k0.push_back(k0); e_lane.push_back(lane);
      send_capture();
      if (f == 0) begin
        // offer garbage reference data while the frame is processed
        while (!busy) @(posedge clk);
        @(negedge clk);
        s_ref_tvalid = 1'b1; s_ref_tdata = '1;
        repeat (20) begin
          @(posedge clk);
          if (s_ref_tready) begin failures++; $display("reference write accepted while busy"); end
          else ref_refused++;
        end
        @(negedge clk); s_ref_tvalid = 1'b0;
        checks++;
      end
    end
    while (results < int'(FRAMES)) @(posedge clk);
    // every mechanism must have happened
    if (CHECK_MECH) begin
      checks += 8;
      if (frames != int'(FRAMES)) begin failures++; $display("frames %0d", frames); end
      if (cap_refused == 0) begin failures++; $display("no capture sample was refused"); end
      if (ref_refused == 0) begin failures++; $display("no reference write was refused"); end
      if (ref_reload == 0 && FRAMES > 2) begin failures++; $display("reference never reloaded"); end
      if (res_stall == 0) begin failures++; $display("result never stalled"); end
      if (neg_win == 0 && FRAMES > 1) begin failures++; $display("no negative-offset peak"); end
      if (pos_win == 0) begin failures++; $display("no positive-offset peak"); end
      if (zero_win == 0 && FRAMES > 2) begin failures++; $display("no zero-offset peak"); end
    end
    $display("mechanisms: frames=%0d cap_refused=%0d ref_refused=%0d ref_reload=%0d res_stall=%0d neg_win=%0d pos_win=%0d zero_win=%0d",
             frames, cap_refused, ref_refused, ref_reload, res_stall, neg_win, pos_win, zero_win);
    done = 1'b1;
  end

endmodule
