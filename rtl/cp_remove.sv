// cp_remove: strips the cyclic prefix in the receiver. The incoming sample
// stream is counted in groups of N+CP; the first CP samples of each group
// are dropped and the N block samples are passed on.
//
// Interface: one sample per cycle when in_valid is high (the converter
// cannot be stalled). Output is registered: out_valid and the sample follow
// one cycle after an accepted block sample. Group alignment starts at reset,
// so the first sample after reset must be the first prefix sample.
// Removal of the prefix is from the reference design; the framing by a
// counter from reset is this design's choice.
module cp_remove #(
  parameter int unsigned N  = 64,
  parameter int unsigned CP = 16,
  parameter int unsigned W  = 8
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

  localparam int unsigned CW = $clog2(N + CP + 1);

  logic [CW-1:0] cnt;   // position within the current N+CP group

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && (cnt >= CW'(CP));
      if (in_valid) begin
        out_re <= in_re;
        out_im <= in_im;
        cnt    <= (cnt == CW'(N + CP - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
