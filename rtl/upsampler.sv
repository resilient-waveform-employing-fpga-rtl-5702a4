// upsampler: the oversampling stage of the transmitter. Each accepted
// complex symbol is followed by L-1 zero samples, so the output runs at L
// samples per symbol (zero insertion; the shaping filter then fills the
// gaps).
//
// Interface: valid/ready on both sides. A symbol is accepted when
// in_valid && in_ready; in_ready is high only while no sample of the
// previous symbol is still waiting to leave. Output samples move when
// out_valid && out_ready. Latency: the symbol itself appears one cycle after
// it is accepted. That the transmitter oversamples follows the reference
// design; zero insertion and the factor L are this design's choices.
// Assertions check the handshake: a stalled output sample is held unchanged.
module upsampler #(
  parameter int unsigned L = 4,   // oversampling factor
  parameter int unsigned W = 5    // width of each signed part
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] phase;   // index of the sample on the output, 0..L-1

  // Ready for a new symbol when the output holds nothing or its last sample
  // of the current symbol is leaving now.
  assign in_ready = !out_valid || (out_ready && phase == CW'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      phase     <= '0;
      out_re    <= in_re;
      out_im    <= in_im;
    end else if (out_valid && out_ready) begin
      if (phase == CW'(L - 1)) begin
        out_valid <= 1'b0;
      end else begin
        phase  <= phase + 1'b1;
        out_re <= '0;
        out_im <= '0;
      end
    end
  end

  // Handshake rule: a sample offered on the output stays offered and
  // unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_re) && $stable(out_im));

endmodule
