// vtap_window - eight-row vertical tap window for one sample stream.
//
// A vertical 8-tap filter needs, for anchor row y, the rows y-3 .. y+4 of its
// input. This window keeps the last eight rows pushed into it (win[0] oldest,
// win[7] newest); each `shift` pushes `din` and drops the oldest row. With the
// newest row y+4 at win[7], the anchor row y sits at win[3]. Only registers
// of eight rows are kept, never a block-sized buffer of intermediates.
// `shift` is the clock enable, so a stream that is idle in a round holds still.
module vtap_window #(
  parameter int LANES = 8,
  parameter int W     = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic [W-1:0] din [LANES],
  output logic [W-1:0] win [fme_pkg::NTAPS][LANES]
);
  import fme_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NTAPS; r++)
        for (int x = 0; x < LANES; x++) win[r][x] <= '0;
    end else if (shift) begin
      for (int r = 0; r < NTAPS-1; r++) win[r] <= win[r+1];
      win[NTAPS-1] <= din;
    end
  end
endmodule
