// ogfdm_tx: the digital part of the transmitter. Bit tokens are mapped to
// QAM points (qam_mapper, format chosen at run time by `mode`), oversampled
// by L (upsampler), pulse-shaped (shaping_filter) and framed into blocks of
// N samples, each preceded by a cyclic prefix of CP samples (cp_insert).
// The prefixed samples leave for the digital-to-analogue converter.
//
// Interface: tokens enter by valid/ready (in_bits right-aligned as in
// qam_mapper); samples leave by valid/ready (a converter that takes every
// sample ties dac_ready high). A block leaves only once it is complete, so
// a transmission is a whole number of blocks of N/L symbols. `mode` must
// only change while the chain is empty. Throughput with the sink always
// ready: N/L symbols per N + (N+CP) cycles. Stage order follows the
// reference transmitter; sizes are this design's choices.
module ogfdm_tx
  import qam_pkg::*;
#(
  parameter int unsigned L        = 4,   // oversampling factor
  parameter int unsigned N        = 64,  // samples per block
  parameter int unsigned CP       = 16,  // cyclic-prefix samples
  parameter int unsigned SAMPLE_W = 8    // converter sample width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  qam_mode_e                  mode,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [MAX_BITS-1:0]        in_bits,
  output logic                       dac_valid,
  input  logic                       dac_ready,
  output logic signed [SAMPLE_W-1:0] dac_re,
  output logic signed [SAMPLE_W-1:0] dac_im
);

  level_t sym_re, sym_im;
  logic up_valid, up_ready;
  level_t up_re, up_im;
  logic sh_valid, sh_ready;
  logic signed [SAMPLE_W-1:0] sh_re, sh_im;

  qam_mapper u_map (
    .mode (mode),
    .bits (in_bits),
    .re   (sym_re),
    .im   (sym_im)
  );

  upsampler #(.L(L), .W(LEVEL_W)) u_up (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_re     (sym_re),
    .in_im     (sym_im),
    .out_valid (up_valid),
    .out_ready (up_ready),
    .out_re    (up_re),
    .out_im    (up_im)
  );

  shaping_filter #(.NTAPS(L), .IN_W(LEVEL_W), .OUT_W(SAMPLE_W)) u_shape (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (up_valid),
    .in_ready  (up_ready),
    .in_re     (up_re),
    .in_im     (up_im),
    .out_valid (sh_valid),
    .out_ready (sh_ready),
    .out_re    (sh_re),
    .out_im    (sh_im)
  );

  cp_insert #(.N(N), .CP(CP), .W(SAMPLE_W)) u_cp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sh_valid),
    .in_ready  (sh_ready),
    .in_re     (sh_re),
    .in_im     (sh_im),
    .out_valid (dac_valid),
    .out_ready (dac_ready),
    .out_re    (dac_re),
    .out_im    (dac_im)
  );

endmodule
