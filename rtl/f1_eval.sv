// f1_eval: correctness term F1 of the filter fitness, the sum over the
// interior pixels of |filtered - original|. Border pixels are flagged by the
// filter (interior = 0) and are not counted, so an M x N frame contributes
// (M-2)*(N-2) differences. The mean difference per pixel (MDPP) is
// f1 / count; the division is left to the reader of the result.
//
// One pixel pair is taken per cycle when valid is high. On the pair marked
// last the frame's totals appear on f1 and count with done high for one
// cycle, and the accumulators restart for the next frame. Result latency: one
// clock after the last pair. Accumulator width ACC_W = 32 holds a 512 x 512
// frame's worst case (510*510*255 < 2^27). Reset is synchronous, active low.
// The formula is the source's; the streaming interface is this design's.
module f1_eval
  import ehw_pkg::*;
#(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned CNT_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [PIX_W-1:0] fi,
  input  logic [PIX_W-1:0] oi,
  input  logic             interior,
  input  logic             last,
  output logic             done,
  output logic [ACC_W-1:0] f1,
  output logic [CNT_W-1:0] count
);

  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] cnt;
  logic [PIX_W-1:0] diff;
  logic [ACC_W-1:0] acc_next;
  logic [CNT_W-1:0] cnt_next;

  assign diff     = (fi > oi) ? fi - oi : oi - fi;
  assign acc_next = interior ? acc + ACC_W'(diff) : acc;
  assign cnt_next = interior ? cnt + 1'b1 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      f1    <= '0;
      count <= '0;
    end else begin
      done <= 1'b0;
      if (valid) begin
        if (last) begin
          f1    <= acc_next;
          count <= cnt_next;
          done  <= 1'b1;
          acc   <= '0;
          cnt   <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt_next;
        end
      end
    end
  end

endmodule
