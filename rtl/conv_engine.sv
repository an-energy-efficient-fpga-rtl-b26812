// conv_engine: one 5x5 convolution per clock cycle.
//
// Twenty-five multipliers (one DSP slice each on the FPGA) take the window
// and the kernel in parallel; their products are registered, and in the
// next stage an adder tree in general logic sums them. The result is the
// plain sum of products at ACC_W bits; bias, accumulation across input
// maps, requantisation and ReLU are left to the layer around the engine.
// Latency: out_valid and sum follow in_valid by two cycles; a new window
// can be taken every cycle. A tag is carried along with the data.
// The 25 parallel multipliers and one output pixel per cycle follow the
// document; the two-stage pipeline is this design's choice.
module conv_engine
  import cnn_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  act_t             win [KK],
  input  wt_t              kern [KK],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output acc_t             sum
);
  acc_t prod [KK];
  logic             v1;
  logic [TAG_W-1:0] t1;
  acc_t             tree;

  always_ff @(posedge clk) begin
    for (int k = 0; k < KK; k++)
      prod[k] <= acc_t'(win[k]) * acc_t'(kern[k]);
  end

  always_comb begin
    tree = '0;
    for (int k = 0; k < KK; k++) tree = tree + prod[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      t1        <= '0;
      out_tag   <= '0;
      sum       <= '0;
    end else begin
      v1        <= in_valid;
      t1        <= in_tag;
      out_valid <= v1;
      out_tag   <= t1;
      sum       <= tree;
    end
  end

endmodule
