// checksum_compare: flags a tile as erroneous when its two checksums differ.
//
// Waits until both the input-checksum rho (computed from the tile's inputs and weights) and
// the output-checksum sigma (the sum of the tile's outputs) are offered, then issues one status
// word whose error bit is (rho != sigma). Both checksums are consumed in the cycle the status
// is accepted, so tiles are judged strictly in order. All three ports are valid/ready; the
// status is registered, one cycle after both checksums are present. Comparing the two checksums
// is the paper's mechanism; the handshakes are this design's choice.
module checksum_compare
  import aled_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rho_valid,
  output logic         rho_ready,
  input  logic [W-1:0] rho,
  input  logic         sigma_valid,
  output logic         sigma_ready,
  input  logic [W-1:0] sigma,
  output logic         status_valid,
  input  logic         status_ready,
  output tile_status_t status
);
  logic take;

  assign take        = rho_valid && sigma_valid && (!status_valid || status_ready);
  assign rho_ready   = take;
  assign sigma_ready = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_valid <= 1'b0;
      status       <= '0;
    end else if (take) begin
      status_valid <= 1'b1;
      status.error <= (rho != sigma);
    end else if (status_ready) begin
      status_valid <= 1'b0;
    end
  end
endmodule
