// stream_fifo: synchronous first-in first-out buffer with valid/ready handshakes.
//
// Sits between the checksum units and the convolution kernel, one per direction, so that the
// checksum units never stall the kernel's stream for a cycle. A word moves on a port when valid
// and ready are both high in the same rising edge. Storage is a DEPTH-entry circular array with
// read and write pointers one bit wider than the address, so full and empty are told apart by
// the top bit. The head word is read straight from the array (first-word fall-through), so a
// word written on one edge is visible at out_data after that edge. DEPTH must be a power of two.
// The paper names these FIFOs but gives no depth or handshake; both are this design's choice.
module stream_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = wptr != rptr;
  assign out_data  = mem[rptr[AW-1:0]];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= in_data;
  end

  // A pushing producer must hold its word until it is taken.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wptr - rptr) <= (AW+1)'(DEPTH));
endmodule
