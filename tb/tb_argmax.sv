// tb_argmax: self-checking test of the squared-magnitude arg-max.
//
// Frames of 1 to 20 complex values (random length, tlast on the last one) are
// streamed with random valid and ready. Half the frames draw from a narrow value
// range so that ties are common. Each result must be the largest i^2+q^2 of its
// frame and the index of its first occurrence. A back-to-back frame checks that
// the result is valid 2 cycles after the last value is accepted.
module tb_argmax;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               sv, sr, sl, mv, mr;
  logic signed [11:0] xi, xq;
  logic [5:0]         idx, m_idx;
  logic [23:0]        m_mag;

  argmax #(.W(12), .IDX_BITS(6)) dut (
    .clk(clk), .rst_n(rst_n), .s_tvalid(sv), .s_tready(sr), .s_i(xi), .s_q(xq),
    .s_idx(idx), .s_tlast(sl), .m_tvalid(mv), .m_tready(mr), .m_mag(m_mag), .m_idx(m_idx));

  longint best, e_mag[$];
  int     best_idx, e_idx[$];
  int     len = 5, pos = 0;
  bit     narrow = 1'b0;
  bit     rnd = 1'b1;

  task automatic next_value();
    int lim;
    lim = narrow ? 3 : 2047;
    xi  <= 12'(int'($urandom_range(2 * lim, 0)) - lim);
    xq  <= 12'(int'($urandom_range(2 * lim, 0)) - lim);
    idx <= 6'(pos);
    sl  <= (pos == len - 1);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (mv && mr) begin
      checks++;
      if (longint'(m_mag) != e_mag[0] || int'(m_idx) != e_idx[0]) begin
        failures++;
        if (failures <= 10) $display("got %0d@%0d exp %0d@%0d", m_mag, m_idx, e_mag[0], e_idx[0]);
      end
      void'(e_mag.pop_front()); void'(e_idx.pop_front());
    end
    if (sv && sr) begin
      longint mg;
      mg = longint'(xi) * longint'(xi) + longint'(xq) * longint'(xq);
      if (pos == 0 || mg > best) begin best = mg; best_idx = pos; end
      if (sl) begin
        e_mag.push_back(best); e_idx.push_back(best_idx);
        pos = 0; len = int'($urandom_range(20, 1)); narrow = 1'($urandom_range(1, 0));
      end else pos++;
      next_value();
    end
    if (rnd) begin
      sv <= 1'($urandom_range(3, 0) != 0);
      mr <= 1'($urandom_range(2, 0) == 0);
    end
  end

  initial begin
    sv = 0; mr = 0;
    next_value();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    while (pos != 0) @(posedge clk);
    @(negedge clk); rnd = 1'b0; sv = 0; mr = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (e_mag.size() != 0) begin failures++; $display("results missing: %0d", e_mag.size()); end
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
      if (c_out - c_last != 2) begin failures++; $display("latency %0d, expected 2", c_out - c_last); end
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
