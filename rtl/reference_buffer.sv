// reference_buffer: stores the reference signal the capture is correlated with.
//
// Samples arrive on an AXI4-Stream slave and are written to addresses 0, 1, ...
// DEPTH-1, after which the write pointer wraps to 0 so a new reference can be
// loaded over the old one. 'loaded' rises once DEPTH samples have been written
// and then stays high. While 'lock' is high (a correlation is running) writes
// are refused (s_tready low), so the reference cannot change mid-frame. The
// read port is a synchronous RAM read: rd_data shows mem[rd_addr] one cycle
// after rd_en and holds while rd_en is low.
//
// Storing the reference in its own buffer follows the design; loading it over a
// stream (rather than fixing it when the hardware is built) is this
// implementation's choice.
module reference_buffer #(
  parameter int unsigned DEPTH  = 1000,
  parameter int unsigned W      = 16,
  parameter int unsigned A_BITS = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lock,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic [W-1:0]      s_tdata,
  output logic              loaded,
  input  logic              rd_en,
  input  logic [A_BITS-1:0] rd_addr,
  output logic [W-1:0]      rd_data
);

  logic [W-1:0]      mem [DEPTH];
  logic [A_BITS-1:0] wr_ptr;

  assign s_tready = !lock;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      loaded <= 1'b0;
    end else if (s_tvalid && s_tready) begin
      if (wr_ptr == A_BITS'(DEPTH - 1)) begin
        loaded <= 1'b1;
        wr_ptr <= '0;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_tvalid && s_tready) mem[wr_ptr] <= s_tdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
