// tb_caf_full: end-to-end test of the CAF engine at its default size.
//
// The engine is instantiated with no parameter overrides: 1000 reference
// samples, a 2000-sample capture, 49 frequency lanes one phase step
// (625 kHz / 4096 = 152.6 Hz at the nominal sample rate) apart, 12-bit phase and
// 8-bit data. Four frames are run, each planting the reference at a random
// delay with a Doppler offset of +24, -24, 0 and -23 phase steps (top, bottom,
// centre and second lane); the reference is replaced before the third frame.
// caf_checker compares each result with a bit-exact model and with the planted
// delay and lane, and checks the frame latency of about a million cycles.
module tb_caf_full;
  localparam int N = 1000, NF = 49;
  localparam int LAG_BITS = $clog2(N + 1), F_BITS = $clog2(NF);
  localparam int MAG_BITS = 2 * (16 + $clog2(N));

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, s_ref_tvalid, s_ref_tready, s_cap_tvalid, s_cap_tready;
  logic [15:0]         s_ref_tdata, s_cap_tdata;
  logic                m_res_tvalid, m_res_tready, ref_loaded, busy, done;
  logic [LAG_BITS-1:0] m_res_lag;
  logic [F_BITS-1:0]   m_res_freq;
  logic [MAG_BITS-1:0] m_res_mag;
  int                  checks, failures;

  caf dut (
    .clk, .rst_n, .s_ref_tvalid, .s_ref_tready, .s_ref_tdata, .s_cap_tvalid, .s_cap_tready,
    .s_cap_tdata, .m_res_tvalid, .m_res_tready, .m_res_lag, .m_res_freq, .m_res_mag,
    .ref_loaded, .busy);

  caf_checker #(.N(N), .NF(NF), .STEP(1), .FRAMES(4), .LAG_BITS(LAG_BITS), .F_BITS(F_BITS),
                .MAG_BITS(MAG_BITS)) chk (
    .clk, .rst_n, .s_ref_tvalid, .s_ref_tready, .s_ref_tdata, .s_cap_tvalid, .s_cap_tready,
    .s_cap_tdata, .m_res_tvalid, .m_res_tready, .m_res_lag, .m_res_freq, .m_res_mag,
    .ref_loaded, .busy, .done, .checks, .failures);

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
