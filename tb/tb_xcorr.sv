// tb_xcorr: self-checking test of the dot-product correlator.
//
// Frames of N = 16 random symmetric 8-bit sample pairs (reference r, input x)
// are streamed with random valid and ready; tlast marks each frame's last pair
// and tuser carries a frame number. Each output must equal
// sum_m conj(r[m]) * x[m] computed in integers, with the frame number of its
// frame. One frame uses full-scale values (all +/-127) to check that the
// accumulator does not overflow. A back-to-back run checks that a frame's sum
// appears 4 cycles after its last sample is accepted.
module tb_xcorr;
  localparam int N = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              sv, sr, sl, mv, mr;
  logic signed [7:0] ri, rq, xi, xq;
  logic [3:0]        su, mu;
  logic signed [19:0] acc_i, acc_q;   // 8+8+log2(16) bits

  xcorr #(.A_BITS(8), .B_BITS(8), .N(N), .USER_BITS(4)) dut (
    .clk(clk), .rst_n(rst_n), .s_tvalid(sv), .s_tready(sr),
    .s_ref_i(ri), .s_ref_q(rq), .s_x_i(xi), .s_x_q(xq), .s_tlast(sl), .s_tuser(su),
    .m_tvalid(mv), .m_tready(mr), .m_i(acc_i), .m_q(acc_q), .m_tuser(mu));

  function automatic int srand_sym(int bits);
    int lim = (1 << (bits - 1)) - 1;
    return int'($urandom_range(2 * lim, 0)) - lim;
  endfunction

  int m = 0, frame = 0;
  longint sum_i = 0, sum_q = 0;
  longint e_i[$], e_q[$];
  int e_u[$];
  bit rnd = 1'b1;
  bit full_scale = 1'b0;
  int outs = 0;

  task automatic next_pair();
    if (full_scale) begin
      ri <= 8'sd127; rq <= -8'sd127; xi <= 8'sd127; xq <= 8'sd127;
    end else begin
      ri <= 8'(srand_sym(8)); rq <= 8'(srand_sym(8));
      xi <= 8'(srand_sym(8)); xq <= 8'(srand_sym(8));
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (mv && mr) begin
      checks++; outs++;
      if (longint'(acc_i) != e_i[0] || longint'(acc_q) != e_q[0] || int'(mu) != e_u[0]) begin
        failures++;
        if (failures <= 10) $display("got %0d,%0d (%0d) exp %0d,%0d (%0d)", acc_i, acc_q, mu, e_i[0], e_q[0], e_u[0]);
      end
      void'(e_i.pop_front()); void'(e_q.pop_front()); void'(e_u.pop_front());
    end
    if (sv && sr) begin
      // conj(r) * x
      sum_i += longint'(ri) * longint'(xi) + longint'(rq) * longint'(xq);
      sum_q += longint'(ri) * longint'(xq) - longint'(rq) * longint'(xi);
      if (sl) begin
        e_i.push_back(sum_i); e_q.push_back(sum_q); e_u.push_back(int'(su));
        sum_i = 0; sum_q = 0;
      end
      m = (m + 1) % N;
      if (m == 0) frame++;
      sl <= (m == N - 1);
      su <= 4'(frame);
      next_pair();
    end
    if (rnd) begin
      sv <= 1'($urandom_range(3, 0) != 0);
      mr <= 1'($urandom_range(3, 0) == 0);
    end
  end

  initial begin
    sv = 0; mr = 0; sl = 0; su = 0;
    next_pair();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    // let the current frame finish, then send one full-scale frame
    while (m != 0) @(posedge clk);
    full_scale = 1'b1;
    @(negedge clk); next_pair();
    while (m != N - 1) @(posedge clk);
    full_scale = 1'b0;
    while (m != 0) @(posedge clk);
    @(negedge clk);
    rnd = 1'b0; sv = 0; mr = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (e_i.size() != 0) begin failures++; $display("sums missing: %0d", e_i.size()); end
    // latency: one back-to-back frame with ready high
    begin
      int c_last, c_out;
      c_last = -1; c_out = -1;
      @(negedge clk); sv = 1;
      for (int c = 0; c < 40; c++) begin
        @(posedge clk);
        if (sv && sr && sl) c_last = c;
        if (mv && c_out < 0) c_out = c;
        if (sv && sr && sl) begin @(negedge clk); sv = 0; end
      end
      checks++;
      if (c_out - c_last != 4) begin failures++; $display("latency %0d, expected 4", c_out - c_last); end
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
