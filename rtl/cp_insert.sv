// cp_insert: adds the guard interval (cyclic prefix) at the end of the
// transmitter's digital processing. Each block of N shaped samples is
// stored, then sent as its last CP samples followed by the whole block, so
// N samples in give N+CP samples out.
//
// Works in two phases on one N-entry buffer: FILL accepts N samples
// (in_ready high), EMIT sends the N+CP samples (in_ready low) and returns to
// FILL after the last one. Output data is read straight from the buffer;
// out_valid is high throughout EMIT and a sample moves when out_ready is
// high. From the first accepted sample of a block to its last prefixed
// sample takes N + (N+CP) cycles with both sides always ready.
// That a cyclic prefix guards each block is from the reference design; N,
// CP and the single-buffer organisation are this design's choices.
// Assertions check the handshake: a stalled output sample is held unchanged.
module cp_insert #(
  parameter int unsigned N  = 64,  // samples per block
  parameter int unsigned CP = 16,  // prefix length, CP <= N
  parameter int unsigned W  = 8    // width of each signed part
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

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = $clog2(N + CP + 1);

  typedef enum logic {FILL, EMIT} state_e;

  state_e               state;
  logic [AW-1:0]        wr_addr;
  logic [CW-1:0]        rd_cnt;
  logic [AW-1:0]        rd_addr;
  logic signed [W-1:0]  buf_re [N];
  logic signed [W-1:0]  buf_im [N];

  assign in_ready  = (state == FILL);
  assign out_valid = (state == EMIT);

  // Prefix samples come from the tail of the block, then the block in order.
  always_comb begin
    if (rd_cnt < CW'(CP)) rd_addr = AW'(rd_cnt + CW'(N - CP));
    else                  rd_addr = AW'(rd_cnt - CW'(CP));
  end

  assign out_re = buf_re[rd_addr];
  assign out_im = buf_im[rd_addr];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      buf_re[wr_addr] <= in_re;
      buf_im[wr_addr] <= in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= FILL;
      wr_addr <= '0;
      rd_cnt  <= '0;
    end else begin
      case (state)
        FILL: if (in_valid) begin
          if (wr_addr == AW'(N - 1)) begin
            wr_addr <= '0;
            state   <= EMIT;
          end else begin
            wr_addr <= wr_addr + 1'b1;
          end
        end
        EMIT: if (out_ready) begin
          if (rd_cnt == CW'(N + CP - 1)) begin
            rd_cnt <= '0;
            state  <= FILL;
          end else begin
            rd_cnt <= rd_cnt + 1'b1;
          end
        end
        default: state <= FILL;
      endcase
    end
  end

  // Handshake rule: a sample offered on the output stays offered and
  // unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_re) && $stable(out_im));

  // No input is taken while a block is being sent.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> !in_ready);

endmodule
