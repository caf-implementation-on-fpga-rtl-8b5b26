// tb_max_select: self-checking test of the cross-lane peak selection.
//
// NF = 5 lane results arrive one by one at random times; each lane holds its
// valid until acknowledged. Magnitudes come from a small range so that ties are
// frequent. The output must give the largest magnitude, the lane (frequency)
// index of its first occurrence and that lane's lag; the lanes must be
// acknowledged exactly when the output is taken. The clock edge that first sees
// every lane valid starts the scan; the result is valid NF edges later (seen
// here at the (NF+2)th edge counted from the one after the last lane rises).
module tb_max_select;
  localparam int NF = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NF-1:0] lv, lr;
  logic [15:0]   lmag [NF];
  logic [9:0]    llag [NF];
  logic          mv, mr;
  logic [15:0]   mmag;
  logic [9:0]    mlag;
  logic [2:0]    mfreq;

  max_select #(.NF(NF), .MAG_BITS(16), .LAG_BITS(10)) dut (
    .clk(clk), .rst_n(rst_n), .lane_valid(lv), .lane_ready(lr), .lane_mag(lmag), .lane_lag(llag),
    .m_tvalid(mv), .m_tready(mr), .m_mag(mmag), .m_lag(mlag), .m_freq(mfreq));

  initial begin
    lv = '0; mr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      int emag, efreq, elag, t_all, t_out;
      int order [NF];
      for (int j = 0; j < NF; j++) order[j] = j;
      order.shuffle();
      // present the lanes in random order with random gaps
      for (int j = 0; j < NF; j++) begin
        repeat ($urandom_range(3, 0)) @(negedge clk);
        @(negedge clk);
        lmag[order[j]] = 16'($urandom_range((round % 2) ? 4 : 60000, 0));
        llag[order[j]] = 10'($urandom_range(1000, 0));
        lv[order[j]]   = 1'b1;
      end
      emag = -1;
      for (int j = 0; j < NF; j++)
        if (int'(lmag[j]) > emag) begin emag = int'(lmag[j]); efreq = j; elag = int'(llag[j]); end
      t_all = 0; t_out = -1;
      while (t_out < 0 && t_all < 50) begin
        @(posedge clk); t_all++;
        if (mv) t_out = t_all;
        checks++;
        if (lr != '0) begin failures++; $display("lanes acknowledged early"); end
      end
      checks++;
      if (t_out != NF + 2) begin failures++; $display("latency %0d, expected %0d", t_out, NF + 2); end
      repeat ($urandom_range(3, 0)) @(negedge clk);
      @(negedge clk); mr = 1'b1;
      #1;
      checks++;
      if (lr != '1) begin failures++; $display("lanes not acknowledged"); end
      checks++;
      if (int'(mmag) != emag || int'(mfreq) != efreq || int'(mlag) != elag) begin
        failures++;
        if (failures <= 10)
          $display("got %0d f%0d l%0d exp %0d f%0d l%0d", mmag, mfreq, mlag, emag, efreq, elag);
      end
      @(posedge clk); #1;
      mr = 1'b0; lv = '0;
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
