// tb_capture_buffer: self-checking test of the capture buffer.
//
// A DEPTH = 20 buffer is filled from a stream with random valid gaps. The test
// checks that exactly DEPTH samples are taken, that 'full' rises and s_tready
// falls after the last one and stays so while more data is offered, that every
// address reads back its sample one cycle after rd_en, and that rd_data holds
// while rd_en is low. After a release pulse the buffer must take a second,
// different block and read that back.
module tb_capture_buffer;
  localparam int DEPTH = 20;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rel, sv, sr, full, rd_en;
  logic [15:0] sd, rd_data;
  logic [4:0]  rd_addr;

  capture_buffer #(.DEPTH(DEPTH), .W(16)) dut (
    .clk(clk), .rst_n(rst_n), .release_i(rel), .s_tvalid(sv), .s_tready(sr), .s_tdata(sd),
    .full(full), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  logic [15:0] model [DEPTH];

  task automatic fill(int seed);
    int n, idle;
    n = 0; idle = 0;
    while (n < DEPTH + 5 && idle < 20) begin
      @(negedge clk);
      sv = 1'($urandom_range(2, 0) != 0);
      sd = 16'($urandom);
      @(posedge clk);
      if (sv && sr) begin
        if (n < DEPTH) model[n] = sd;
        n++;
      end
      if (!sr) idle++;
      if (!sr && n >= DEPTH) break;
      if (n > DEPTH) break;
    end
    @(negedge clk); sv = 1'b1;     // keep offering: must be refused
    repeat (5) @(posedge clk);
    @(negedge clk); sv = 1'b0;
    checks++;
    if (n != DEPTH || !full || sr) begin
      failures++; $display("fill %0d: took %0d samples, full=%0b ready=%0b", seed, n, full, sr);
    end
  endtask

  task automatic read_all();
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = 5'(a);
      @(negedge clk); rd_en = 1'b0; rd_addr = 5'((a + 7) % DEPTH);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("addr %0d: %h exp %h", a, rd_data, model[a]); end
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("addr %0d: data not held", a); end
    end
  endtask

  initial begin
    rel = 0; sv = 0; sd = 0; rd_en = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    @(negedge clk);
    if (full || !sr) begin failures++; $display("not empty after reset"); end
    fill(1);
    read_all();
    @(negedge clk); rel = 1'b1;
    @(negedge clk); rel = 1'b0;
    checks++;
    if (full || !sr) begin failures++; $display("not empty after release"); end
    fill(2);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
