// byte_fifo: first-word-fall-through FIFO used as the transmit data buffer
// (host to modulator) and the receive data buffer (voted bytes to host).
//
// The data buffers are only named by the design description; this is the
// simplest buffer that does the job. rdata shows the oldest byte whenever
// empty is low; a read pops it. A write when full and a read when empty are
// ignored. count gives the fill level. Single clock, synchronous reset.
module byte_fifo #(
  parameter int DEPTH = 256,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         full,
  output logic         empty,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign full  = count == (AW+1)'(DEPTH);
  assign empty = count == '0;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  property no_overflow;
    @(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH);
  endproperty
  assert property (no_overflow);
endmodule
