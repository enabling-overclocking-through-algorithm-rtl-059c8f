// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// The accelerator and its checksum units run in a clock domain of their own whose frequency is
// changed at run time; every stream entering or leaving that domain goes through one of these
// FIFOs, as the error-detecting architecture requires. The write side (wclk) and the read side
// (rclk) each keep a binary pointer one bit wider than the address and publish it in Gray code;
// the other side takes it through a two-flop synchroniser and compares against its own pointer
// for full (write side) or empty (read side). Both handshakes are valid/ready; the head word
// is read from the array without a register (first-word fall-through). DEPTH must be a power of
// two. The paper requires these FIFOs but does not describe their insides; the Gray-code
// scheme is this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] wbin_nxt, rbin_nxt;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Full: next-to-top bits of the Gray pointers differ in the two MSBs, rest equal
  assign in_ready  = wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};
  assign out_valid = rgray != wgray_r2;
  assign out_data  = mem[rbin[AW-1:0]];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign wbin_nxt  = wbin + (AW+1)'(do_wr);
  assign rbin_nxt  = rbin + (AW+1)'(do_rd);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= in_data;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
