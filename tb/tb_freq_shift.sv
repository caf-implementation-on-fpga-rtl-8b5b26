// tb_freq_shift: self-checking test of the frequency shifter.
//
// Part 1 (exact): random symmetric 8-bit samples, random tlast, random input
// valid and output ready. Instance A shifts up by 131 phase steps, instance B
// down (conjugate bit). Each output must equal the top 8 bits of
// x * (cos + j*sin) with the oscillator modelled from round(127*cos/sin(2*pi*p/4096))
// and the phase p restarting at 0 after every tlast.
// Part 2 (spectral): a complex 50 kHz tone sampled at 625 kHz goes through
// instance A without tlast. The mean phase step of the output must match
// 50 kHz + 131*625e3/4096 Hz (about 70 kHz) to within 0.5%.
module tb_freq_shift;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real TWO_PI = 6.283185307179586;
  localparam int  INC = 131;

  logic              a_sv, a_sr, a_sl, a_mv, a_mr, a_ml, b_sv, b_sr, b_mv, b_mr, b_ml;
  logic signed [7:0] a_xi, a_xq, b_xi, b_xq, a_i, a_q, b_i, b_q;
  logic [0:0]        a_mu, b_mu;
  logic [0:0]        a_su, b_su;

  freq_shift #(.PHASE_BITS(12), .N_BITS(8), .X_BITS(8), .PHASE_INC(INC), .CONJ(1'b0)) dut_a (
    .clk(clk), .rst_n(rst_n), .s_tvalid(a_sv), .s_tready(a_sr), .s_i(a_xi), .s_q(a_xq),
    .s_tlast(a_sl), .s_tuser(a_su), .m_tvalid(a_mv), .m_tready(a_mr), .m_i(a_i), .m_q(a_q),
    .m_tlast(a_ml), .m_tuser(a_mu));
  freq_shift #(.PHASE_BITS(12), .N_BITS(8), .X_BITS(8), .PHASE_INC(INC), .CONJ(1'b1)) dut_b (
    .clk(clk), .rst_n(rst_n), .s_tvalid(b_sv), .s_tready(b_sr), .s_i(b_xi), .s_q(b_xq),
    .s_tlast(1'b0), .s_tuser(b_su), .m_tvalid(b_mv), .m_tready(b_mr), .m_i(b_i), .m_q(b_q),
    .m_tlast(b_ml), .m_tuser(b_mu));

  function automatic int q127(real v);
    return (v >= 0.0) ? $rtoi(127.0 * v + 0.5) : -$rtoi(-127.0 * v + 0.5);
  endfunction

  function automatic int srand_sym(int bits);
    int lim = (1 << (bits - 1)) - 1;
    return int'($urandom_range(2 * lim, 0)) - lim;
  endfunction

  int pa = 0, pb = 0;
  int ea_i[$], ea_q[$], ea_l[$], eb_i[$], eb_q[$];
  bit exact_mode = 1'b1;
  bit drive_a    = 1'b1;
  int tone_n = 0;
  // tone analysis
  real prev_re, prev_im, sum_dphi = 0.0;
  int  n_dphi = 0, tone_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (a_mv && a_mr) begin
      if (exact_mode) begin
        checks++;
        if (int'(a_i) != ea_i[0] || int'(a_q) != ea_q[0] || int'(a_ml) != ea_l[0]) begin
          failures++;
          if (failures <= 10) $display("A: got %0d,%0d exp %0d,%0d", a_i, a_q, ea_i[0], ea_q[0]);
        end
        void'(ea_i.pop_front()); void'(ea_q.pop_front()); void'(ea_l.pop_front());
      end else begin
        real re, im, d;
        re = real'(a_i); im = real'(a_q);
        if (tone_out > 20) begin
          // angle of z[n]*conj(z[n-1])
          d = $atan2(im * prev_re - re * prev_im, re * prev_re + im * prev_im);
          sum_dphi += d; n_dphi++;
        end
        prev_re = re; prev_im = im; tone_out++;
      end
    end
    if (b_mv && b_mr) begin
      checks++;
      if (int'(b_i) != eb_i[0] || int'(b_q) != eb_q[0]) begin
        failures++;
        if (failures <= 10) $display("B: got %0d,%0d exp %0d,%0d", b_i, b_q, eb_i[0], eb_q[0]);
      end
      void'(eb_i.pop_front()); void'(eb_q.pop_front());
    end
    if (a_sv && a_sr) begin
      if (exact_mode) begin
        int c, s;
        c = q127($cos(TWO_PI * real'(pa) / 4096.0));
        s = q127($sin(TWO_PI * real'(pa) / 4096.0));
        ea_i.push_back((int'(a_xi) * c - int'(a_xq) * s) >>> 8);
        ea_q.push_back((int'(a_xi) * s + int'(a_xq) * c) >>> 8);
        ea_l.push_back(int'(a_sl));
        pa = a_sl ? 0 : (pa + INC) % 4096;
        a_xi <= 8'(srand_sym(8)); a_xq <= 8'(srand_sym(8));
        a_sl <= ($urandom_range(15, 0) == 0);
      end else begin
        tone_n++;
        a_xi <= 8'(q127($cos(TWO_PI * 50.0e3 / 625.0e3 * real'(tone_n))));
        a_xq <= 8'(q127($sin(TWO_PI * 50.0e3 / 625.0e3 * real'(tone_n))));
      end
    end
    if (b_sv && b_sr) begin
      int c, s;
      c = q127($cos(TWO_PI * real'(pb) / 4096.0));
      s = -q127($sin(TWO_PI * real'(pb) / 4096.0));
      eb_i.push_back((int'(b_xi) * c - int'(b_xq) * s) >>> 8);
      eb_q.push_back((int'(b_xi) * s + int'(b_xq) * c) >>> 8);
      pb = (pb + INC) % 4096;
      b_xi <= 8'(srand_sym(8)); b_xq <= 8'(srand_sym(8));
    end
    if (drive_a) begin
      a_sv <= 1'($urandom_range(3, 0) != 0);
      a_mr <= 1'($urandom_range(2, 0) != 0);
    end
    b_sv <= 1'($urandom_range(1, 0));
    b_mr <= 1'($urandom_range(3, 0) != 0);
  end

  initial begin
    a_sv = 0; b_sv = 0; a_mr = 0; b_mr = 0; a_sl = 0; a_su = 0; b_su = 0;
    a_xi = 8'sd5; a_xq = -8'sd7; b_xi = 8'sd100; b_xq = 8'sd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    // drain part 1, then switch instance A to the tone
    @(negedge clk);
    drive_a = 1'b0;
    a_sv = 0; a_mr = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (ea_i.size() != 0) begin failures++; $display("A outputs missing: %0d", ea_i.size()); end
    exact_mode = 1'b0;
    @(negedge clk);
    a_sl = 1'b1; a_sv = 1'b1;          // one tlast sample restarts the phase at 0
    a_xi = 8'sd127; a_xq = 8'sd0;
    @(posedge clk); #1;
    a_sl = 1'b0;
    repeat (2000) @(posedge clk);
    @(negedge clk); a_sv = 0;
    repeat (10) @(posedge clk);
    begin
      real f_meas, f_exp;
      f_meas = sum_dphi / real'(n_dphi) / TWO_PI * 625.0e3;
      f_exp  = 50.0e3 + real'(INC) * 625.0e3 / 4096.0;
      checks++;
      if (n_dphi < 1000 || f_meas < f_exp * 0.995 || f_meas > f_exp * 1.005) begin
        failures++;
        $display("tone at %f Hz, expected %f Hz (%0d steps)", f_meas, f_exp, n_dphi);
      end else $display("tone shifted to %f Hz (expected %f Hz)", f_meas, f_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
