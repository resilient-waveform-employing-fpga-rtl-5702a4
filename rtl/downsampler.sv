// downsampler: the down-sampling stage of the receiver. Counts valid input
// samples modulo L and passes on only the one at position PHASE, giving one
// sample per symbol. With the default rectangular pulse the matched-filter
// peak of a symbol is the last of its L samples, hence PHASE = L-1.
//
// Interface: one sample per cycle when in_valid is high; the output is
// registered (one cycle later, with out_valid). The phase count starts at
// reset. Down sampling is from the reference design; the fixed phase (no
// timing recovery) is this design's choice, valid for the back-to-back link.
module downsampler #(
  parameter int unsigned L     = 4,
  parameter int unsigned PHASE = 3,   // kept sample position, 0..L-1
  parameter int unsigned W     = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && (cnt == CW'(PHASE));
      if (in_valid) begin
        cnt <= (cnt == CW'(L - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(PHASE)) begin
          out_re <= in_re;
          out_im <= in_im;
        end
      end
    end
  end

endmodule
