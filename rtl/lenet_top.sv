// lenet_top: LeNet-style CNN accelerator for 32x32 grayscale digit images.
//
// Network: conv 5x5 (3 maps) + ReLU + 2x2 max pool -> 14x14x3;
// conv 5x5 (12 maps) + ReLU + 2x2 max pool -> 5x5x12 = 300 values;
// fully connected 300 -> 48 + ReLU; fully connected 48 -> 10 class scores.
// Every layer is a dedicated circuit and all data and coefficients stay in
// on-chip memory: the image buffer (1024 words), the first feature-map
// buffer (588 words), twelve 25-word banks for the second layer's maps and
// the hidden layer's 48 output registers. A small sequencer starts the
// layers one after another for an image: conv1 -> conv2 -> hidden -> output.
//
// Interface: the host writes the image (16-bit activations, address
// row*32 + col) through img_we and the coefficients through cfg_we with
// cfg_sel choosing the memory (see cnn_pkg::cfg_sel_e and each layer's
// address format); weights use the low 8 bits of cfg_data, biases all 32.
// Both may be written only while busy is low. A start pulse runs one image;
// done pulses when score[] and class_id are valid, and cycles then holds the
// number of clock cycles from start to done (about 6,750, against 8,781 in
// the published design's implementation, i.e. more than 14K images/s at 125 MHz).
// The layer structure, word widths and multiplier counts follow the
// document; the host load port and the handshakes are this design's.
module lenet_top
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // image load
  input  logic        img_we,
  input  logic [9:0]  img_waddr,
  input  act_t        img_wdata,
  // coefficient load
  input  logic        cfg_we,
  input  cfg_sel_e    cfg_sel,
  input  logic [14:0] cfg_addr,
  input  bias_t       cfg_data,
  // control and result
  input  logic        start,
  output logic        busy,
  output logic        done,
  output acc_t        score [OUT_N],
  output logic [3:0]  class_id,
  output logic [15:0] cycles
);
  typedef enum logic [2:0] {S_IDLE, S_C1, S_C2, S_HID, S_OUT} state_e;
  state_e state;

  logic c1_start, c1_busy, c1_done;
  logic c2_start, c2_busy, c2_done;
  logic h_start,  h_busy,  h_done;
  logic o_start,  o_busy,  o_done;

  // ---- sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cycles <= '0;
    end else begin
      if (state != S_IDLE) cycles <= cycles + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin state <= S_C1; cycles <= 16'd1; end
        S_C1:   if (c1_done) state <= S_C2;
        S_C2:   if (c2_done) state <= S_HID;
        S_HID:  if (h_done)  state <= S_OUT;
        S_OUT:  if (o_done)  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign c1_start = (state == S_IDLE) && start;
  assign c2_start = c1_done;
  assign h_start  = c2_done;
  assign o_start  = h_done;
  assign done     = o_done;
  assign busy     = (state != S_IDLE);

  // ---- image buffer ----
  logic [9:0] img_raddr;
  act_t       img_rdata;

  act_ram #(.DEPTH(IMG_W * IMG_W)) u_img (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  // ---- layer 1 ----
  logic       f1_we;
  logic [9:0] f1_waddr, f1_raddr;
  act_t       f1_wdata, f1_rdata;

  conv1_layer u_conv1 (
    .clk, .rst_n, .start(c1_start), .busy(c1_busy), .done(c1_done),
    .img_raddr, .img_rdata,
    .o_we(f1_we), .o_waddr(f1_waddr), .o_wdata(f1_wdata),
    .w_we(cfg_we && cfg_sel == CFG_C1_W), .w_addr(cfg_addr[6:0]), .w_data(wt_t'(cfg_data)),
    .b_we(cfg_we && cfg_sel == CFG_C1_B), .b_addr(cfg_addr[1:0]), .b_data(cfg_data)
  );

  act_ram #(.DEPTH(C1_N * P1_W * P1_W)) u_fmap1 (
    .clk, .we(f1_we), .waddr(f1_waddr), .wdata(f1_wdata),
    .raddr(f1_raddr), .rdata(f1_rdata)
  );

  // ---- layer 2 ----
  logic [C2_N-1:0] f2_we;
  logic [4:0]      f2_waddr, f2_raddr;
  act_t            f2_wdata [C2_N];
  act_t            f2_rdata [C2_N];

  conv2_layer u_conv2 (
    .clk, .rst_n, .start(c2_start), .busy(c2_busy), .done(c2_done),
    .i_raddr(f1_raddr), .i_rdata(f1_rdata),
    .o_we(f2_we), .o_waddr(f2_waddr), .o_wdata(f2_wdata),
    .w_we(cfg_we && cfg_sel == CFG_C2_W), .w_addr(cfg_addr[9:0]), .w_data(wt_t'(cfg_data)),
    .b_we(cfg_we && cfg_sel == CFG_C2_B), .b_addr(cfg_addr[3:0]), .b_data(cfg_data)
  );

  for (genvar b = 0; b < C2_N; b++) begin : g_fmap2
    act_ram #(.DEPTH(P2_W * P2_W)) u_bank (
      .clk, .we(f2_we[b]), .waddr(f2_waddr), .wdata(f2_wdata[b]),
      .raddr(f2_raddr), .rdata(f2_rdata[b])
    );
  end

  // ---- hidden layer ----
  act_t hid [HID_N];

  fc_hidden u_hidden (
    .clk, .rst_n, .start(h_start), .busy(h_busy), .done(h_done),
    .i_raddr(f2_raddr), .i_rdata(f2_rdata), .hid(hid),
    .w_we(cfg_we && cfg_sel == CFG_H_W), .w_addr(cfg_addr), .w_data(wt_t'(cfg_data)),
    .b_we(cfg_we && cfg_sel == CFG_H_B), .b_addr(cfg_addr[5:0]), .b_data(cfg_data)
  );

  // ---- output layer ----
  fc_output u_output (
    .clk, .rst_n, .start(o_start), .busy(o_busy), .done(o_done),
    .hid(hid), .score(score), .class_id(class_id),
    .w_we(cfg_we && cfg_sel == CFG_O_W), .w_addr(cfg_addr[8:0]), .w_data(wt_t'(cfg_data)),
    .b_we(cfg_we && cfg_sel == CFG_O_B), .b_addr(cfg_addr[3:0]), .b_data(cfg_data)
  );

  // A layer is busy only while the sequencer is in its state.
  a_layers_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({c1_busy, c2_busy, h_busy, o_busy}));

endmodule
