// tb_sig_gen: self-checking test of the numerically controlled oscillator.
//
// Instance A runs at 20 kHz for a 625 kHz sample rate with a 12-bit phase
// (increment round(20e3 * 4096 / 625e3) = 131); instance B runs at -3.5 kHz
// (increment 23 with the conjugate bit set). Samples are taken with a random
// ready, and every sample is compared with round(127*cos(2*pi*p/4096)) and
// +/-round(127*sin(2*pi*p/4096)) for the model phase p, rounded half away from
// zero. m_sync is pulsed now and then and must restart the phase at zero.
// Also checked: the peak amplitude reaches +/-127.
module tb_sig_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real TWO_PI = 6.283185307179586;

  logic              a_v, a_r, a_sync, b_v, b_r, b_sync;
  logic signed [7:0] a_cos, a_sin, b_cos, b_sin;

  sig_gen #(.PHASE_BITS(12), .N_BITS(8), .PHASE_INC(131), .CONJ(1'b0)) dut_a (
    .clk(clk), .rst_n(rst_n), .m_tvalid(a_v), .m_tready(a_r), .m_sync(a_sync),
    .m_cos(a_cos), .m_sin(a_sin));
  sig_gen #(.PHASE_BITS(12), .N_BITS(8), .PHASE_INC(23), .CONJ(1'b1)) dut_b (
    .clk(clk), .rst_n(rst_n), .m_tvalid(b_v), .m_tready(b_r), .m_sync(b_sync),
    .m_cos(b_cos), .m_sin(b_sin));

  function automatic int q127(real v);
    return (v >= 0.0) ? $rtoi(127.0 * v + 0.5) : -$rtoi(-127.0 * v + 0.5);
  endfunction

  int pa = 0, pb = 0;
  int a_max = -1000, a_min = 1000;

  task automatic check(string tag, int p, int sgn, logic signed [7:0] c, logic signed [7:0] s);
    int ec, es;
    ec = q127($cos(TWO_PI * real'(p) / 4096.0));
    es = sgn * q127($sin(TWO_PI * real'(p) / 4096.0));
    checks++;
    if (int'(c) != ec || int'(s) != es) begin
      failures++;
      if (failures <= 10) $display("%s phase %0d: got cos %0d sin %0d, expected %0d %0d", tag, p, c, s, ec, es);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (a_v && a_r) begin
      check("A", pa, 1, a_cos, a_sin);
      if (a_sin > a_max) a_max = a_sin;
      if (a_sin < a_min) a_min = a_sin;
      pa = a_sync ? 0 : (pa + 131) % 4096;
    end
    if (b_v && b_r) begin
      check("B", pb, -1, b_cos, b_sin);
      pb = b_sync ? 0 : (pb + 23) % 4096;
    end
    a_r    <= 1'($urandom_range(3, 0) != 0);
    b_r    <= 1'($urandom_range(1, 0));
    a_sync <= ($urandom_range(499, 0) == 0);
    b_sync <= ($urandom_range(299, 0) == 0);
  end

  initial begin
    a_r = 0; b_r = 0; a_sync = 0; b_sync = 0;
    repeat (3) @(posedge clk);
    // reset state: phase 0
    checks++;
    if (a_cos != 8'sd127 || a_sin != 8'sd0) begin failures++; $display("reset output wrong"); end
    rst_n = 1'b1;
    repeat (6000) @(posedge clk);
    checks++;
    if (a_max != 127 || a_min != -127) begin
      failures++; $display("amplitude %0d..%0d, expected -127..127", a_min, a_max);
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
