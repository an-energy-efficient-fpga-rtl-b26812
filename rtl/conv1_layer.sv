// conv1_layer: first convolutional layer fused with the first max-pool layer.
//
// The 32x32 input image is read from its buffer one pixel per cycle, three
// times in a row, once for each of the three 5x5 kernels: 3072 reads without
// a pause. A line-buffer window generator turns the pixel stream into 5x5
// windows (28x28 per pass, no padding), one convolution engine of 25
// multipliers computes one output pixel per cycle, the bias is added, the
// sum is requantised to 16 bits and passed through ReLU, and a streaming
// 2x2 max pool reduces each 28x28 map to 14x14. Pooled values are written
// to the output buffer in order map, row, column (address = map*196 +
// row*14 + col), 588 words in all.
//
// Interface: start (one-cycle pulse) begins a pass; busy is high until done
// pulses for one cycle after the last write. The image buffer is read with
// one cycle of latency. Kernel weights (address map*25 + row*5 + col) and
// biases (address map) are written through w_we/b_we while idle.
// Timing: done comes 3072 cycles plus the pipeline depth (6 cycles)
// after start; the published design reports 3144 cycles for this layer pair.
// One engine with 25 multipliers, ReLU and max pooling follow the published design;
// streaming the three maps back to back is this design's choice.
module conv1_layer
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // input image buffer read port
  output logic [9:0] img_raddr,
  input  act_t       img_rdata,
  // output feature map buffer write port (3 x 14 x 14)
  output logic       o_we,
  output logic [9:0] o_waddr,
  output act_t       o_wdata,
  // coefficient load
  input  logic       w_we,
  input  logic [6:0] w_addr,
  input  wt_t        w_data,
  input  logic       b_we,
  input  logic [1:0] b_addr,
  input  bias_t      b_data
);
  localparam int unsigned NPIX = IMG_W * IMG_W;          // 1024
  localparam int unsigned NOUT = C1_N * P1_W * P1_W;     // 588

  wt_t   wmem [C1_N * KK];
  bias_t bmem [C1_N];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr] <= w_data;
    if (b_we) bmem[b_addr] <= b_data;
  end

  // ---- read sequencer ----
  logic        run;
  logic [11:0] cnt;
  logic        rd_v;
  logic [1:0]  rd_tag;

  assign img_raddr = cnt[9:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      cnt    <= '0;
      rd_v   <= 1'b0;
      rd_tag <= '0;
    end else begin
      rd_v   <= run;
      rd_tag <= cnt[11:10];
      if (start) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (cnt == 12'(C1_N * NPIX - 1)) run <= 1'b0;
      end
    end
  end

  // ---- window, engine, ReLU, pool ----
  logic       win_v;
  logic [1:0] win_tag;
  act_t       win [KK];
  wt_t        kern [KK];
  logic       eng_v;
  logic [1:0] eng_tag;
  acc_t       eng_sum;
  act_t       act;
  logic       pool_v;
  act_t       pool_val;

  window_gen #(.W(IMG_W), .TAG_W(2)) u_win (
    .clk, .rst_n, .clear(start),
    .in_valid(rd_v), .in_px(img_rdata), .in_tag(rd_tag),
    .win_valid(win_v), .win_tag(win_tag), .win(win)
  );

  always_comb begin
    for (int k = 0; k < KK; k++) kern[k] = wmem[32'(win_tag) * KK + k];
  end

  conv_engine #(.TAG_W(2)) u_eng (
    .clk, .rst_n, .in_valid(win_v), .in_tag(win_tag), .win(win), .kern(kern),
    .out_valid(eng_v), .out_tag(eng_tag), .sum(eng_sum)
  );

  assign act = requant(eng_sum + acc_t'(bmem[eng_tag]), 1'b1);

  maxpool2x2 #(.OW(C1_OW)) u_pool (
    .clk, .rst_n, .clear(start),
    .in_valid(eng_v), .in_val(act),
    .out_valid(pool_v), .out_val(pool_val)
  );

  // ---- output writer ----
  logic [9:0] ocnt;
  assign o_we    = pool_v;
  assign o_waddr = ocnt;
  assign o_wdata = pool_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ocnt <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ocnt <= '0;
        busy <= 1'b1;
      end else if (pool_v) begin
        ocnt <= ocnt + 1'b1;
        if (ocnt == 10'(NOUT - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A new start may only come while the layer is idle.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
