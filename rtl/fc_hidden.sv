// fc_hidden: hidden fully connected layer, 300 inputs to 48 nodes, ReLU.
//
// The 300 inputs are the twelve pooled 5x5 maps of the second layer,
// flattened map by map (input index = map*25 + row*5 + col). There is one
// multiplier path per map: each cycle the twelve map banks are read at the
// same address j and twelve products are formed in parallel, so a node
// takes 25 cycles. The twelve products are added in a tree, accumulated
// over the 25 steps on top of the node's bias, and the total is requantised
// to 16 bits and passed through ReLU into the 48-word output register file
// hid[]. Node n+1 follows node n without a gap.
//
// Interface: start pulse, busy, done pulse after the last node. The twelve
// input banks share one read address and return data one cycle later.
// Weights are loaded through w_we with w_addr = {map (4 bits), node*25 + j
// (11 bits)}, biases at the node number. Each map has its own weight memory
// so that all twelve weights of a step are read in the same cycle.
// Timing: done comes 48*25 = 1200 cycles plus 3 after start; the published design
// reports 1878 cycles for this layer. Twelve parallel paths, one per map,
// and ReLU follow the published design; the pipeline and load format are this
// design's choice.
module fc_hidden
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // input banks (12 maps x 25), shared read address
  output logic [4:0]  i_raddr,
  input  act_t        i_rdata [C2_N],
  // node outputs
  output act_t        hid [HID_N],
  // coefficient load
  input  logic        w_we,
  input  logic [14:0] w_addr,
  input  wt_t         w_data,
  input  logic        b_we,
  input  logic [5:0]  b_addr,
  input  bias_t       b_data
);
  localparam int unsigned NJ = P2_W * P2_W;  // 25 steps per node

  wt_t   wmem [C2_N][HID_N * NJ];
  bias_t bmem [HID_N];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr[14:11]][w_addr[10:0]] <= w_data;
    if (b_we) bmem[b_addr] <= b_data;
  end

  // ---- sequencer: node n, step j ----
  logic       run;
  logic [5:0] n;
  logic [4:0] j;
  assign i_raddr = j;

  // stage 1: data from the banks
  logic       v1, first1, last1;
  logic [5:0] n1;
  logic [10:0] widx1;
  // stage 2: products
  logic       v2, first2, last2;
  logic [5:0] n2;
  acc_t       prod [C2_N];
  acc_t       tree, acc, nacc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; n <= '0; j <= '0;
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; n1 <= '0; widx1 <= '0;
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; n2 <= '0;
    end else begin
      v1     <= run;
      first1 <= (j == 5'd0);
      last1  <= (j == 5'(NJ - 1));
      n1     <= n;
      widx1  <= 11'(n * NJ) + 11'(j);
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      n2     <= n1;
      if (start) begin
        run <= 1'b1; n <= '0; j <= '0;
      end else if (run) begin
        if (j == 5'(NJ - 1)) begin
          j <= '0;
          n <= n + 1'b1;
          if (n == 6'(HID_N - 1)) run <= 1'b0;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < C2_N; b++)
      prod[b] <= acc_t'(i_rdata[b]) * acc_t'(wmem[b][widx1]);
  end

  always_comb begin
    tree = '0;
    for (int b = 0; b < C2_N; b++) tree = tree + prod[b];
    nacc = (first2 ? acc_t'(bmem[n2]) : acc) + tree;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int h = 0; h < HID_N; h++) hid[h] <= '0;
    end else begin
      done <= 1'b0;
      if (start) busy <= 1'b1;
      if (v2) begin
        acc <= nacc;
        if (last2) begin
          hid[n2] <= requant(nacc, 1'b1);
          if (n2 == 6'(HID_N - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // A new start may only come while the layer is idle.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
