// output_checksum: sums every output word of a tile as it streams out of the kernel.
//
// The tile's TM*R*C output words pass through unchanged (valid/ready joined combinationally)
// and are added, modulo 2^W, into sigma. After the tile's last word sigma is offered on a
// valid/ready port and the stream is held off until it has been taken, so each sigma belongs to
// exactly one tile. The accumulator adds no latency to the stream. That the output checksum is
// a plain accumulator over the convolution outputs follows the paper; the hand-off of sigma
// and the hold-off are this design's choices.
module output_checksum
  import aled_pkg::*;
#(
  parameter int unsigned WORDS = UNROLL_TM * LAYER_R * LAYER_C,  // output words per tile
  parameter int unsigned W     = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         sigma_valid,
  input  logic         sigma_ready,
  output logic [W-1:0] sigma
);
  localparam int unsigned CW = $clog2(WORDS + 1);

  logic [CW-1:0] cnt;
  logic [W-1:0]  acc;
  logic          fire;

  assign in_ready  = out_ready && !sigma_valid;
  assign out_valid = in_valid && !sigma_valid;
  assign out_data  = in_data;
  assign fire      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      acc         <= '0;
      sigma       <= '0;
      sigma_valid <= 1'b0;
    end else begin
      if (sigma_valid && sigma_ready) sigma_valid <= 1'b0;
      if (fire) begin
        if (cnt == CW'(WORDS - 1)) begin
          cnt         <= '0;
          acc         <= '0;
          sigma       <= acc + in_data;
          sigma_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc + in_data;
        end
      end
    end
  end
endmodule
