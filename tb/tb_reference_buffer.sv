// tb_reference_buffer: self-checking test of the reference buffer.
//
// A DEPTH = 16 buffer is loaded from a stream with random valid gaps. Checked:
// 'loaded' is low until the DEPTH-th sample and high after it; every address
// reads back its sample one cycle after rd_en and holds while rd_en is low;
// while 'lock' is high, s_tready is low and offered samples change nothing;
// a second load wraps to address 0 and replaces the whole reference.
module tb_reference_buffer;
  localparam int DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        lock, sv, sr, loaded, rd_en;
  logic [15:0] sd, rd_data;
  logic [3:0]  rd_addr;

  reference_buffer #(.DEPTH(DEPTH), .W(16)) dut (
    .clk(clk), .rst_n(rst_n), .lock(lock), .s_tvalid(sv), .s_tready(sr), .s_tdata(sd),
    .loaded(loaded), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  logic [15:0] model [DEPTH];

  task automatic load();
    int n;
    n = 0;
    while (n < DEPTH) begin
      @(negedge clk);
      sv = 1'($urandom_range(2, 0) != 0);
      sd = 16'($urandom);
      @(posedge clk);
      if (sv && sr) begin
        model[n] = sd;
        n++;
      end
    end
    @(negedge clk); sv = 1'b0;
    checks++;
    if (!loaded) begin failures++; $display("loaded low after %0d samples", n); end
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = 4'(a);
      @(negedge clk); rd_en = 1'b0; rd_addr = 4'(a + 3);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("addr %0d: %h exp %h", a, rd_data, model[a]); end
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("addr %0d: data not held", a); end
    end
  endtask

  initial begin
    lock = 0; sv = 0; sd = 0; rd_en = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // partial load: loaded must stay low
    for (int i = 0; i < DEPTH - 1; i++) begin
      @(negedge clk); sv = 1'b1; sd = 16'($urandom); model[i] = sd;
    end
    @(negedge clk); sv = 1'b0;
    checks++;
    if (loaded) begin failures++; $display("loaded high after %0d samples", DEPTH - 1); end
    @(negedge clk); sv = 1'b1; sd = 16'($urandom); model[DEPTH - 1] = sd;
    @(negedge clk); sv = 1'b0;
    checks++;
    if (!loaded) begin failures++; $display("loaded low after a full load"); end
    read_all();
    // locked: writes refused
    @(negedge clk); lock = 1'b1; sv = 1'b1; sd = 16'hdead;
    repeat (4) @(negedge clk);
    checks++;
    if (sr) begin failures++; $display("s_tready high while locked"); end
    sv = 1'b0; lock = 1'b0;
    read_all();
    // second load replaces the reference from address 0
    load();
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
