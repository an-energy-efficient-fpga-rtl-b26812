// conv2_layer: second convolutional layer fused with the second max-pool layer.
//
// Twelve 5x5 output maps are computed from the three 14x14 maps of the first
// layer by three convolution engines (75 multipliers); engine e produces
// maps 4e .. 4e+3, one per round. In each of the four rounds the three input
// maps are streamed one after the other (3 x 196 reads, no gap between maps
// or rounds). All engines see the same window; each uses its own kernel.
// Per engine, a buffer of 100 partial sums (one per 10x10 output position)
// is loaded with sum+bias for input map 0 and accumulated for maps 1 and 2;
// while input map 2 passes, the final sum is requantised, passed through
// ReLU and fed to a 2x2 max pool, which yields the 5x5 map. The 12 pooled
// maps go to 12 output banks of 25 words (address row*5 + col), so that the
// hidden layer can read all maps in parallel.
//
// Interface: start pulse, busy, done pulse after the last write. The input
// buffer (address map*196 + row*14 + col) is read with one cycle latency.
// Weights are at address (outmap*3 + inmap)*25 + row*5 + col, biases at outmap.
// Timing: done comes 2352 + 6 cycles after start; the published design
// reports 3599 cycles for this layer pair. Three engines of 25 multipliers,
// each serving four maps, follow the published design; the order of work and the
// partial-sum buffer are this design's choice.
module conv2_layer
  import cnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // input feature map buffer read port (3 x 14 x 14)
  output logic [9:0]        i_raddr,
  input  act_t              i_rdata,
  // output banks, one per map (12 x 25)
  output logic [C2_N-1:0]   o_we,
  output logic [4:0]        o_waddr,
  output act_t              o_wdata [C2_N],
  // coefficient load
  input  logic              w_we,
  input  logic [9:0]        w_addr,
  input  wt_t               w_data,
  input  logic              b_we,
  input  logic [3:0]        b_addr,
  input  bias_t             b_data
);
  localparam int unsigned NPIX  = P1_W * P1_W;      // 196
  localparam int unsigned NPOS  = C2_OW * C2_OW;    // 100
  localparam int unsigned NPOOL = P2_W * P2_W;      // 25
  localparam int unsigned ROUNDS = C2_N / C2_ENG;   // 4

  wt_t   wmem [C2_N * C1_N * KK];
  bias_t bmem [C2_N];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr] <= w_data;
    if (b_we) bmem[b_addr] <= b_data;
  end

  // ---- read sequencer: round r, input map c, pixel i ----
  logic       run;
  logic [1:0] r, c;
  logic [7:0] i;
  logic       rd_v;
  logic [3:0] rd_tag;

  assign i_raddr = 10'(c * NPIX) + 10'(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; r <= '0; c <= '0; i <= '0;
      rd_v <= 1'b0; rd_tag <= '0;
    end else begin
      rd_v   <= run;
      rd_tag <= {r, c};
      if (start) begin
        run <= 1'b1; r <= '0; c <= '0; i <= '0;
      end else if (run) begin
        if (i == 8'(NPIX - 1)) begin
          i <= '0;
          if (c == 2'(C1_N - 1)) begin
            c <= '0;
            r <= r + 1'b1;
            if (r == 2'(ROUNDS - 1)) run <= 1'b0;
          end else begin
            c <= c + 1'b1;
          end
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

  // ---- shared window ----
  logic       win_v;
  logic [3:0] win_tag;
  act_t       win [KK];

  window_gen #(.W(P1_W), .TAG_W(4)) u_win (
    .clk, .rst_n, .clear(start),
    .in_valid(rd_v), .in_px(i_rdata), .in_tag(rd_tag),
    .win_valid(win_v), .win_tag(win_tag), .win(win)
  );

  // ---- engines, partial sums, pools ----
  logic [C2_ENG-1:0] eng_v;
  logic [3:0]        eng_tag [C2_ENG];
  acc_t              eng_sum [C2_ENG];
  logic [6:0]        pos;
  logic [C2_ENG-1:0] pool_v;
  act_t              pool_val [C2_ENG];
  logic [1:0]        e_r, e_c;

  assign e_r = eng_tag[0][3:2];
  assign e_c = eng_tag[0][1:0];

  for (genvar e = 0; e < C2_ENG; e++) begin : g_eng
    wt_t  kern [KK];
    acc_t psum [NPOS];
    acc_t nsum;
    act_t act;

    always_comb begin
      for (int k = 0; k < KK; k++)
        kern[k] = wmem[((32'(e) * ROUNDS + 32'(win_tag[3:2])) * C1_N
                        + 32'(win_tag[1:0])) * KK + k];
    end

    conv_engine #(.TAG_W(4)) u_eng (
      .clk, .rst_n, .in_valid(win_v), .in_tag(win_tag), .win(win), .kern(kern),
      .out_valid(eng_v[e]), .out_tag(eng_tag[e]), .sum(eng_sum[e])
    );

    assign nsum = (e_c == 2'd0)
                ? eng_sum[e] + acc_t'(bmem[e * ROUNDS + 32'(e_r)])
                : eng_sum[e] + psum[pos];
    assign act  = requant(nsum, 1'b1);

    always_ff @(posedge clk) begin
      if (eng_v[e]) psum[pos] <= nsum;
    end

    maxpool2x2 #(.OW(C2_OW)) u_pool (
      .clk, .rst_n, .clear(start),
      .in_valid(eng_v[e] && e_c == 2'(C1_N - 1)), .in_val(act),
      .out_valid(pool_v[e]), .out_val(pool_val[e])
    );

    for (genvar m = 0; m < ROUNDS; m++) begin : g_bank
      assign o_wdata[e*ROUNDS + m] = pool_val[e];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos <= '0;
    else if (start) pos <= '0;
    else if (eng_v[0]) pos <= (pos == 7'(NPOS - 1)) ? '0 : pos + 1'b1;
  end

  // ---- output writer: round o_r, position o_p ----
  logic [1:0] o_r;
  logic [4:0] o_p;
  assign o_waddr = o_p;

  always_comb begin
    for (int b = 0; b < C2_N; b++)
      o_we[b] = pool_v[b / ROUNDS] && (32'(o_r) == b % ROUNDS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_r <= '0; o_p <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        o_r <= '0; o_p <= '0; busy <= 1'b1;
      end else if (pool_v[0]) begin
        if (o_p == 5'(NPOOL - 1)) begin
          o_p <= '0;
          o_r <= o_r + 1'b1;
          if (o_r == 2'(ROUNDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          o_p <= o_p + 1'b1;
        end
      end
    end
  end

  // A new start may only come while the layer is idle.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
