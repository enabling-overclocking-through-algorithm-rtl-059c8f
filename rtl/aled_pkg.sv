// aled_pkg: shared constants and types of the error-detecting convolution accelerator.
//
// The layer defaults are the fifth convolution layer of AlexNet (N=192 input channels,
// M=128 output channels, 13x13 output, 3x3 kernel, unit stride), the configuration the
// accelerator is evaluated on. The 16-bit word length and the 160 multipliers per cycle
// (TM=32 output channels x TN=5 input channels) are the main configuration; the split of the
// 160 multipliers into TM and TN is this design's choice. The frequency-scaling constants
// (1 MHz step, 100-tile interval, 100 MHz start) are the values used in the evaluation.
package aled_pkg;

  // Layer geometry (AlexNet conv5)
  parameter int unsigned LAYER_N = 192;
  parameter int unsigned LAYER_M = 128;
  parameter int unsigned LAYER_R = 13;
  parameter int unsigned LAYER_C = 13;
  parameter int unsigned LAYER_K = 3;

  // Word length of data, weights, outputs and checksums
  parameter int unsigned WORD_W = 16;

  // Parallelism of the convolution kernel: TM replicated trees of TN multipliers
  parameter int unsigned UNROLL_TM = 32;
  parameter int unsigned UNROLL_TN = 5;

  // Frequency scaling (MHz)
  parameter int unsigned FREQ_W     = 12;
  parameter int unsigned FREQ_START = 100;
  parameter int unsigned FREQ_STEP  = 1;
  parameter int unsigned FREQ_IVAL  = 100;

  // Per-tile verdict handed from the accelerator clock domain to the system side
  typedef struct packed {
    logic error;   // input- and output-checksum differ
  } tile_status_t;

endpackage
