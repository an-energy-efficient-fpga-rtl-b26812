// window_gen: sliding KxK window over a raster-scanned image stream.
//
// Pixels enter one per cycle (in_valid) in row-major order. A shift register
// of (K-1)*W+K words holds the last K-1 rows plus K pixels, so every window
// element is a fixed tap of it. When the pixel just taken completes a full
// window (row >= K-1 and column >= K-1, i.e. a "valid" convolution with no
// padding), win_valid is high in the next cycle and win[] holds the window,
// win[i*K+j] being row i, column j counted from the top-left corner.
// The row/column counters wrap at the end of a frame, so frames can follow
// each other back to back without a gap; clear restarts them at (0,0).
// A tag travels with each pixel and comes out with its window.
// This line-buffer structure is the design's own choice; the published design only
// states that one window is convolved per clock cycle.
module window_gen
  import cnn_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  act_t             in_px,
  input  logic [TAG_W-1:0] in_tag,
  output logic             win_valid,
  output logic [TAG_W-1:0] win_tag,
  output act_t             win [KK]
);
  localparam int unsigned N = (K - 1) * W + K;

  act_t sr [N];
  logic [$clog2(W)-1:0] col, row;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sr[0] <= in_px;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      win_tag   <= '0;
    end else if (clear) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (row >= ($clog2(W))'(K - 1)) && (col >= ($clog2(W))'(K - 1));
      if (in_valid) begin
        win_tag <= in_tag;
        if (col == ($clog2(W))'(W - 1)) begin
          col <= '0;
          row <= (row == ($clog2(W))'(W - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        win[i*K + j] = sr[(K-1-i)*W + (K-1-j)];
  end

endmodule
