// maxpool2x2: streaming 2x2 max pooling with stride two.
//
// Values of an OW x OW map arrive in raster order, one per in_valid. On an
// even row the larger of each horizontal pair is kept in a row buffer of
// OW/2 words; on the following odd row the pair maximum is compared with
// the buffered one and the maximum of the 2x2 patch is output. out_valid is
// high for one cycle, one cycle after the bottom-right value of a patch
// arrived. Counters wrap at the end of a map, so maps may follow back to
// back; clear restarts them. Max pooling with 2x2 windows and a down-sampling
// factor of two is the published design's; the row-buffer structure is this design's.
module maxpool2x2
  import cnn_pkg::*;
#(
  parameter int unsigned OW = 28
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  act_t in_val,
  output logic out_valid,
  output act_t out_val
);
  localparam int unsigned CW = $clog2(OW);

  act_t rowbuf [OW/2];
  act_t hold;
  logic [CW-1:0] col, row;
  act_t pair;

  assign pair = (in_val > hold) ? in_val : hold;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (!col[0]) hold <= in_val;
      else if (!row[0]) rowbuf[col[CW-1:1]] <= pair;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_val   <= '0;
    end else if (clear) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && col[0] && row[0];
      if (in_valid) begin
        if (col[0] && row[0])
          out_val <= (pair > rowbuf[col[CW-1:1]]) ? pair : rowbuf[col[CW-1:1]];
        if (col == CW'(OW - 1)) begin
          col <= '0;
          row <= (row == CW'(OW - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
