// aled_conv_top: overclockable convolution-layer accelerator with algorithm-level error detection.
//
// The accelerator runs in its own clock domain (acc_clk), which is meant to be pushed beyond
// its static-timing limit. Everything that enters or leaves that domain passes through an
// asynchronous FIFO:
//
//   sys in --async_fifo--> input_checksum --stream_fifo--> conv_kernel --stream_fifo-->
//            output_checksum --async_fifo--> sys out
//   input_checksum.rho --stream_fifo--> checksum_compare <-- output_checksum.sigma
//   checksum_compare --async_fifo--> sys status
//   sys status --> freq_scaler --> freq / freq_update (to the clock manager)
//
// Tiles are macro-pipelined: while the kernel computes tile t, tile t+1 streams in through the
// input-checksum and tile t-1 streams out through the output-checksum, so several rho values
// can be waiting for their sigma; they queue in order in a small FIFO.
//
// The host sends each tile as one word stream (TM*N*K*K weights, m,n,i,j order, then
// N*(R+K-1)*(C+K-1) inputs, n,row,column order) and receives TM*R*C outputs (m,r,c order)
// plus, per tile, one status pulse whose error bit says that the sum of the outputs differs from
// the checksum predicted from the inputs. The host is expected to re-send an erroneous tile
// if exact results are wanted. The clock manager itself is outside this module: freq is the
// target acc_clk frequency in MHz and freq_update asks for a retune.
//
// The arrangement of the checksum units around the kernel and the FIFOs, the asynchronous
// FIFOs at the clock-domain boundary and the frequency-scaling loop follow the paper. Passing
// the verdict through a third asynchronous FIFO, running the scaling algorithm in hardware
// rather than host software, the rho queue and the FIFO depths are this design's choices.
module aled_conv_top
  import aled_pkg::*;
#(
  parameter int unsigned N       = LAYER_N,
  parameter int unsigned TM      = UNROLL_TM,
  parameter int unsigned TN      = UNROLL_TN,
  parameter int unsigned R       = LAYER_R,
  parameter int unsigned C       = LAYER_C,
  parameter int unsigned K       = LAYER_K,
  parameter int unsigned W       = WORD_W,
  parameter int unsigned AF_DEPTH = 16,
  parameter int unsigned SF_DEPTH = 16,
  parameter int unsigned RQ_DEPTH = 4,
  parameter int unsigned FW      = FREQ_W,
  parameter int unsigned F_START = FREQ_START,
  parameter int unsigned F_MIN   = FREQ_START,
  parameter int unsigned F_MAX   = 400,
  parameter int unsigned G       = FREQ_STEP,
  parameter int unsigned I       = FREQ_IVAL
) (
  // system side
  input  logic          sys_clk,
  input  logic          sys_rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic          tile_done,     // one pulse per finished tile
  output logic          tile_error,    // with tile_done: the tile's checksums differ
  output logic [FW-1:0] freq,          // target accelerator frequency, MHz
  output logic          freq_update,
  output logic          freq_ramping,
  // accelerator clock domain
  input  logic          acc_clk,
  input  logic          acc_rst_n,
  output logic          acc_busy
);
  // ------------------------------------------------------------ accelerator-domain streams
  logic         a_in_v,  a_in_r;   logic [W-1:0] a_in_d;    // async FIFO -> input checksum
  logic         k_in_v,  k_in_r;   logic [W-1:0] k_in_d;    // input checksum -> FIFO
  logic         kq_v,    kq_r;     logic [W-1:0] kq_d;      // FIFO -> kernel
  logic         k_out_v, k_out_r;  logic [W-1:0] k_out_d;   // kernel -> FIFO
  logic         oq_v,    oq_r;     logic [W-1:0] oq_d;      // FIFO -> output checksum
  logic         a_out_v, a_out_r;  logic [W-1:0] a_out_d;   // output checksum -> async FIFO

  logic         rho_v, rho_r, sig_v, sig_r, rq_v, rq_r;
  logic [W-1:0] rho, sigma, rq;
  logic         st_v, st_r;
  tile_status_t st;
  logic         sst_v;
  tile_status_t sst;

  async_fifo #(.WIDTH(W), .DEPTH(AF_DEPTH)) u_afifo_in (
    .wclk(sys_clk), .wrst_n(sys_rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .rclk(acc_clk), .rrst_n(acc_rst_n),
    .out_valid(a_in_v), .out_ready(a_in_r), .out_data(a_in_d));

  input_checksum #(.N(N), .TM(TM), .R(R), .C(C), .K(K), .W(W)) u_in_csum (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(a_in_v), .in_ready(a_in_r), .in_data(a_in_d),
    .out_valid(k_in_v), .out_ready(k_in_r), .out_data(k_in_d),
    .rho_valid(rho_v), .rho_ready(rho_r), .rho(rho));

  stream_fifo #(.WIDTH(W), .DEPTH(SF_DEPTH)) u_fifo_in (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(k_in_v), .in_ready(k_in_r), .in_data(k_in_d),
    .out_valid(kq_v), .out_ready(kq_r), .out_data(kq_d));

  // rho of up to RQ_DEPTH tiles waiting for their sigma
  stream_fifo #(.WIDTH(W), .DEPTH(RQ_DEPTH)) u_rho_q (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(rho_v), .in_ready(rho_r), .in_data(rho),
    .out_valid(rq_v), .out_ready(rq_r), .out_data(rq));

  conv_kernel #(.N(N), .TM(TM), .TN(TN), .R(R), .C(C), .K(K), .W(W)) u_kernel (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(kq_v), .in_ready(kq_r), .in_data(kq_d),
    .out_valid(k_out_v), .out_ready(k_out_r), .out_data(k_out_d),
    .busy(acc_busy));

  stream_fifo #(.WIDTH(W), .DEPTH(SF_DEPTH)) u_fifo_out (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(k_out_v), .in_ready(k_out_r), .in_data(k_out_d),
    .out_valid(oq_v), .out_ready(oq_r), .out_data(oq_d));

  output_checksum #(.WORDS(TM * R * C), .W(W)) u_out_csum (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .in_valid(oq_v), .in_ready(oq_r), .in_data(oq_d),
    .out_valid(a_out_v), .out_ready(a_out_r), .out_data(a_out_d),
    .sigma_valid(sig_v), .sigma_ready(sig_r), .sigma(sigma));

  async_fifo #(.WIDTH(W), .DEPTH(AF_DEPTH)) u_afifo_out (
    .wclk(acc_clk), .wrst_n(acc_rst_n),
    .in_valid(a_out_v), .in_ready(a_out_r), .in_data(a_out_d),
    .rclk(sys_clk), .rrst_n(sys_rst_n),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));

  checksum_compare #(.W(W)) u_cmp (
    .clk(acc_clk), .rst_n(acc_rst_n),
    .rho_valid(rq_v), .rho_ready(rq_r), .rho(rq),
    .sigma_valid(sig_v), .sigma_ready(sig_r), .sigma(sigma),
    .status_valid(st_v), .status_ready(st_r), .status(st));

  async_fifo #(.WIDTH($bits(tile_status_t)), .DEPTH(4)) u_afifo_status (
    .wclk(acc_clk), .wrst_n(acc_rst_n),
    .in_valid(st_v), .in_ready(st_r), .in_data(st),
    .rclk(sys_clk), .rrst_n(sys_rst_n),
    .out_valid(sst_v), .out_ready(1'b1), .out_data(sst));

  assign tile_done  = sst_v;
  assign tile_error = sst_v && sst.error;

  freq_scaler #(.FW(FW), .F_START(F_START), .F_MIN(F_MIN), .F_MAX(F_MAX), .G(G), .I(I)) u_fscale (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .status_valid(sst_v), .status_error(sst.error),
    .freq(freq), .freq_update(freq_update), .ramping(freq_ramping));
endmodule
