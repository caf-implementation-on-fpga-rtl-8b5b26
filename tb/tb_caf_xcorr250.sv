// tb_caf_xcorr250: a 250-sample cross correlation on the default-size engine.
//
// Workload: a 250-sample PRN-like reference whose copy sits 100 samples into
// the received block, with no Doppler offset. The default engine (N = 1000,
// NF = 49) is used unchanged: the reference is zero-padded to 1000 samples, so
// every dot product reduces to the 250-term correlation, and lags 0..750 cover
// the same span as a 250-sample design's full correlation. The result must be
// lag 100 in the centre (zero-offset) lane and bit-exact against the model in
// caf_checker. The expected peak is about 250 * 20000 * 127/256 = 2.5e6 in
// |chi| (250 terms of |r|^2 for r = +/-100 +/-100i, scaled by the frequency
// shift's truncation).
module tb_caf_xcorr250;
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

  caf_checker #(.N(N), .NF(NF), .STEP(1), .FRAMES(1), .REF_LEN(250), .PLANT_K0(100),
                .LANE0((NF - 1) / 2), .CHECK_MECH(1'b0),
                .LAG_BITS(LAG_BITS), .F_BITS(F_BITS), .MAG_BITS(MAG_BITS)) chk (
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
    repeat (1200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
