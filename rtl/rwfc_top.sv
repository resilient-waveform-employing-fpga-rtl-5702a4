// rwfc_top: the complete design. A run-time reconfigurable QAM transceiver
// whose bit loading (4-, 16-, 64- or 256-QAM) is chosen by `mode` on both
// sides at once, next to the switches-to-displays modulator demonstrator.
//
//   tx_bits -> ogfdm_tx -> dac_* ports   (to the digital-to-analogue converter)
//   adc_* ports -> ogfdm_rx -> rx_bits   (from the analogue-to-digital converter)
//   sw -> qam_board_demo -> hex0..hex4   (demonstrator, format fixed by DEMO_BITS)
//
// The converters, antennas and radio link are outside the FPGA; in a
// back-to-back test the dac_* samples are fed to the adc_* ports. `mode`
// may change only when both chains are empty. Timing and framing are given
// in ogfdm_tx and ogfdm_rx. The partition into transmitter, receiver and
// demonstrator follows the reference design; sizes are this design's
// choices.
module rwfc_top
  import qam_pkg::*;
#(
  parameter int unsigned L         = 4,
  parameter int unsigned N         = 64,
  parameter int unsigned CP        = 16,
  parameter int unsigned SAMPLE_W  = 8,
  parameter int unsigned DEMO_BITS = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 mode,
  // transmitter
  input  logic                       tx_valid,
  output logic                       tx_ready,
  input  logic [7:0]                 tx_bits,
  output logic                       dac_valid,
  input  logic                       dac_ready,
  output logic signed [SAMPLE_W-1:0] dac_re,
  output logic signed [SAMPLE_W-1:0] dac_im,
  // receiver
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_re,
  input  logic signed [SAMPLE_W-1:0] adc_im,
  output logic                       rx_valid,
  output logic [7:0]                 rx_bits,
  // demonstrator
  input  logic [9:0]                 sw,
  output logic [6:0]                 hex0,
  output logic [6:0]                 hex1,
  output logic [6:0]                 hex2,
  output logic [6:0]                 hex3,
  output logic [6:0]                 hex4
);

  ogfdm_tx #(.L(L), .N(N), .CP(CP), .SAMPLE_W(SAMPLE_W)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (qam_mode_e'(mode)),
    .in_valid  (tx_valid),
    .in_ready  (tx_ready),
    .in_bits   (tx_bits),
    .dac_valid (dac_valid),
    .dac_ready (dac_ready),
    .dac_re    (dac_re),
    .dac_im    (dac_im)
  );

  ogfdm_rx #(.L(L), .N(N), .CP(CP), .SAMPLE_W(SAMPLE_W)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (qam_mode_e'(mode)),
    .adc_valid (adc_valid),
    .adc_re    (adc_re),
    .adc_im    (adc_im),
    .out_valid (rx_valid),
    .out_bits  (rx_bits)
  );

  qam_board_demo #(.BITS(DEMO_BITS)) u_demo (
    .sw   (sw),
    .hex0 (hex0),
    .hex1 (hex1),
    .hex2 (hex2),
    .hex3 (hex3),
    .hex4 (hex4)
  );

endmodule
