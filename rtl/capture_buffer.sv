// capture_buffer: holds one block of the received signal for the correlator.
//
// Samples arrive on an AXI4-Stream slave and are written to addresses 0, 1, ...
// DEPTH-1. Once DEPTH samples are stored, 'full' rises and s_tready falls, so
// the block stays frozen while the correlator reads it; a 'release_i' pulse
// empties the buffer and it accepts the next block. The read port is a plain
// synchronous RAM read: rd_data shows mem[rd_addr] one cycle after rd_en and
// keeps its value while rd_en is low, so the memory maps to block RAM.
//
// The capture holds twice the reference length so that every lag 0..N of an
// N-sample reference sees a full window. That size follows the design; the
// fill-then-freeze protocol is this implementation's choice.
module capture_buffer #(
  parameter int unsigned DEPTH  = 2000,
  parameter int unsigned W      = 16,
  parameter int unsigned A_BITS = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              release_i,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic [W-1:0]      s_tdata,
  output logic              full,
  input  logic              rd_en,
  input  logic [A_BITS-1:0] rd_addr,
  output logic [W-1:0]      rd_data
);

  logic [W-1:0]      mem [DEPTH];
  logic [A_BITS-1:0] wr_ptr;

  assign s_tready = !full;

  always_ff @(posedge clk) begin
    if (!rst_n || release_i) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (s_tvalid && s_tready) begin
      if (wr_ptr == A_BITS'(DEPTH - 1)) begin
        full   <= 1'b1;
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
