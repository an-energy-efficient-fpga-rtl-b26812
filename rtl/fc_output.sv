// fc_output: output fully connected layer, 48 inputs to 10 class scores,
// followed by the choice of the class.
//
// Eight multipliers work in parallel: in step j (0..5) of node n, path k
// multiplies input j*8+k by its weight, so a node takes six cycles and the
// ten nodes 60 cycles. The eight products are added in a tree and
// accumulated on top of the node's bias. The last layer has no activation:
// its 32-bit sums are the class scores. When all ten are known, the index
// of the largest score (the lowest index on a tie) is the class.
//
// Interface: start pulse, busy, done pulse when scores and class are valid;
// they hold until the next start. Inputs are read directly from the hidden
// layer's output registers. Weights are at address node*48 + input, biases
// at the node number. Timing: done comes 60 + 3 cycles after start; the
// document reports 160 cycles for this layer. Eight multipliers and 10
// output nodes follow the published design; the input interleaving, the score width
// and the class choice are this design's.
module fc_output
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  input  act_t       hid [HID_N],
  output acc_t       score [OUT_N],
  output logic [3:0] class_id,
  // coefficient load
  input  logic       w_we,
  input  logic [8:0] w_addr,
  input  wt_t        w_data,
  input  logic       b_we,
  input  logic [3:0] b_addr,
  input  bias_t      b_data
);
  localparam int unsigned NJ = HID_N / OUT_PAR;  // 6 steps per node

  wt_t   wmem [OUT_N * HID_N];
  bias_t bmem [OUT_N];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr] <= w_data;
    if (b_we) bmem[b_addr] <= b_data;
  end

  logic       run;
  logic [3:0] n;
  logic [2:0] j;
  logic       v1, first1, last1;
  logic [3:0] n1;
  acc_t       prod [OUT_PAR];
  acc_t       tree, acc, nacc;
  logic       fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; n <= '0; j <= '0;
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; n1 <= '0;
    end else begin
      v1     <= run;
      first1 <= (j == 3'd0);
      last1  <= (j == 3'(NJ - 1));
      n1     <= n;
      if (start) begin
        run <= 1'b1; n <= '0; j <= '0;
      end else if (run) begin
        if (j == 3'(NJ - 1)) begin
          j <= '0;
          n <= n + 1'b1;
          if (n == 4'(OUT_N - 1)) run <= 1'b0;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < OUT_PAR; k++)
      prod[k] <= acc_t'(hid[32'(j) * OUT_PAR + k])
               * acc_t'(wmem[32'(n) * HID_N + 32'(j) * OUT_PAR + k]);
  end

  always_comb begin
    tree = '0;
    for (int k = 0; k < OUT_PAR; k++) tree = tree + prod[k];
    nacc = (first1 ? acc_t'(bmem[n1]) : acc) + tree;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; fin <= 1'b0; busy <= 1'b0; done <= 1'b0; class_id <= '0;
      for (int o = 0; o < OUT_N; o++) score[o] <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) busy <= 1'b1;
      if (v1) begin
        acc <= nacc;
        if (last1) begin
          score[n1] <= nacc;
          if (n1 == 4'(OUT_N - 1)) fin <= 1'b1;
        end
      end
      if (fin) begin
        class_id <= argmax(score);
        busy     <= 1'b0;
        done     <= 1'b1;
      end
    end
  end

  function automatic logic [3:0] argmax(input acc_t s [OUT_N]);
    logic [3:0] best;
    best = '0;
    for (int o = 1; o < OUT_N; o++)
      if (s[o] > s[best]) best = 4'(o);
    return best;
  endfunction

  // A new start may only come while the layer is idle.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
