// tb_cpx_multiply: self-checking test of the pipelined complex multiplier.
//
// Two instances are driven with random symmetric operands: an 8x8 -> 8 bit one
// (the default, truncating) and a 12x8 -> 20 bit one (full width). The input
// valid and the output ready toggle at random, so the pipeline stalls. Every
// output is compared with an integer model: I = xi*yi - xq*yq and
// Q = xi*yq + xq*yi, shifted right arithmetically by the dropped bits.
// A second phase drives back-to-back data with ready held high and checks the
// three-cycle latency and one-sample-per-clock throughput.
module tb_cpx_multiply;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT A: 8x8 -> 8 (default parameters)
  logic               a_sv, a_sr, a_mv, a_mr, a_ml, a_sl;
  logic signed [7:0]  a_xi, a_xq, a_yi, a_yq, a_i, a_q;
  logic [0:0]         a_su, a_mu;
  cpx_multiply dut_a (
    .clk(clk), .rst_n(rst_n), .s_tvalid(a_sv), .s_tready(a_sr),
    .s_xi(a_xi), .s_xq(a_xq), .s_yi(a_yi), .s_yq(a_yq), .s_tlast(a_sl), .s_tuser(a_su),
    .m_tvalid(a_mv), .m_tready(a_mr), .m_i(a_i), .m_q(a_q), .m_tlast(a_ml), .m_tuser(a_mu));

  // ---------------- DUT B: 12x8 -> 20 (no truncation)
  logic               b_sv, b_sr, b_mv, b_mr, b_ml;
  logic signed [11:0] b_xi, b_xq;
  logic signed [7:0]  b_yi, b_yq;
  logic signed [19:0] b_i, b_q;
  logic [3:0]         b_mu;
  cpx_multiply #(.XI_BITS(12), .XQ_BITS(12), .YI_BITS(8), .YQ_BITS(8),
                 .I_BITS(20), .Q_BITS(20), .USER_BITS(4)) dut_b (
    .clk(clk), .rst_n(rst_n), .s_tvalid(b_sv), .s_tready(b_sr),
    .s_xi(b_xi), .s_xq(b_xq), .s_yi(b_yi), .s_yq(b_yq), .s_tlast(1'b0), .s_tuser(4'(b_xi)),
    .m_tvalid(b_mv), .m_tready(b_mr), .m_i(b_i), .m_q(b_q), .m_tlast(b_ml), .m_tuser(b_mu));

  int a_exp_i[$], a_exp_q[$], a_exp_l[$];
  int b_exp_i[$], b_exp_q[$], b_exp_u[$];

  function automatic int srand_sym(int bits);
    int lim = (1 << (bits - 1)) - 1;
    return int'($urandom_range(2 * lim, 0)) - lim;
  endfunction

  // drive new random inputs after each accepted sample (non-blocking, so the
  // DUT samples the old values at this edge)
  task automatic new_a();
    a_xi <= 8'(srand_sym(8)); a_xq <= 8'(srand_sym(8));
    a_yi <= 8'(srand_sym(8)); a_yq <= 8'(srand_sym(8));
    a_sl <= 1'($urandom_range(1, 0));
    a_su <= 1'($urandom_range(1, 0));
  endtask
  task automatic new_b();
    b_xi <= 12'(srand_sym(12)); b_xq <= 12'(srand_sym(12));
    b_yi <= 8'(srand_sym(8));   b_yq <= 8'(srand_sym(8));
  endtask

  bit random_mode = 1'b1;
  int a_out = 0, b_out = 0;

  always @(posedge clk) if (rst_n) begin
    // scoreboard, output side
    if (a_mv && a_mr) begin
      checks++; a_out++;
      if (a_i !== 8'(a_exp_i[0]) || a_q !== 8'(a_exp_q[0]) || a_ml !== a_exp_l[0][0]) begin
        failures++;
        if (failures <= 10) $display("A mismatch: got %0d,%0d exp %0d,%0d", a_i, a_q, a_exp_i[0], a_exp_q[0]);
      end
      void'(a_exp_i.pop_front()); void'(a_exp_q.pop_front()); void'(a_exp_l.pop_front());
    end
    if (b_mv && b_mr) begin
      checks++; b_out++;
      if (b_i !== 20'(b_exp_i[0]) || b_q !== 20'(b_exp_q[0]) || b_mu !== 4'(b_exp_u[0])) begin
        failures++;
        if (failures <= 10) $display("B mismatch: got %0d,%0d exp %0d,%0d", b_i, b_q, b_exp_i[0], b_exp_q[0]);
      end
      void'(b_exp_i.pop_front()); void'(b_exp_q.pop_front()); void'(b_exp_u.pop_front());
    end
    // input side
    if (a_sv && a_sr) begin
      a_exp_i.push_back((int'(a_xi) * int'(a_yi) - int'(a_xq) * int'(a_yq)) >>> 8);
      a_exp_q.push_back((int'(a_xi) * int'(a_yq) + int'(a_xq) * int'(a_yi)) >>> 8);
      a_exp_l.push_back(int'(a_sl));
      new_a();
    end
    if (b_sv && b_sr) begin
      b_exp_i.push_back(int'(b_xi) * int'(b_yi) - int'(b_xq) * int'(b_yq));
      b_exp_q.push_back(int'(b_xi) * int'(b_yq) + int'(b_xq) * int'(b_yi));
      b_exp_u.push_back(int'(b_xi[3:0]));
      new_b();
    end
    if (random_mode) begin
      a_sv <= 1'($urandom_range(3, 0) != 0);
      b_sv <= 1'($urandom_range(3, 0) != 0);
      a_mr <= 1'($urandom_range(2, 0) != 0);
      b_mr <= 1'($urandom_range(1, 0));
    end
  end

  initial begin
    a_sv = 0; b_sv = 0; a_mr = 0; b_mr = 0;
    new_a(); new_b();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    // drain
    random_mode = 1'b0;
    @(negedge clk); a_sv = 0; b_sv = 0; a_mr = 1; b_mr = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (a_exp_i.size() != 0 || b_exp_i.size() != 0) begin
      failures++; $display("outputs missing: %0d %0d", a_exp_i.size(), b_exp_i.size());
    end
    // latency and throughput: 50 back-to-back samples, ready always high
    begin
      int t0, first_out, cnt0;
      @(negedge clk);
      a_sv = 1; cnt0 = a_out; t0 = 0; first_out = -1;
      for (int c = 0; c < 60; c++) begin
        @(posedge clk);
        if (a_mv && first_out < 0) first_out = c;
        if (c == 49) begin @(negedge clk); a_sv = 0; end
      end
      checks++;
      if (first_out != 3) begin failures++; $display("latency %0d, expected 3", first_out); end
      checks++;
      if (a_out - cnt0 != 50) begin failures++; $display("throughput: %0d outputs", a_out - cnt0); end
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
