// tb_caf: end-to-end test of the CAF engine at reduced size.
//
// N = 32 reference samples, a 64-sample capture, NF = 5 frequency lanes spaced
// 128 phase steps (one DFT bin of a 32-sample window) apart, default 12-bit
// phase and 8-bit data. Four frames are run with a planted delay and Doppler
// offset each (positive, negative, zero and a second positive lane); caf_checker
// compares every result with a bit-exact model and with the planted values, and
// makes sure each mechanism of the engine happened.
module tb_caf;
  localparam int N = 32, NF = 5, STEP = 128;
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

  caf #(.N(N), .NF(NF), .FREQ_STEP_INC(STEP)) dut (
    .clk, .rst_n, .s_ref_tvalid, .s_ref_tready, .s_ref_tdata, .s_cap_tvalid, .s_cap_tready,
    .s_cap_tdata, .m_res_tvalid, .m_res_tready, .m_res_lag, .m_res_freq, .m_res_mag,
    .ref_loaded, .busy);

  caf_checker #(.N(N), .NF(NF), .STEP(STEP), .FRAMES(4), .LAG_BITS(LAG_BITS), .F_BITS(F_BITS),
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
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
