// cnn_pkg: number formats, network dimensions and shared arithmetic of the
// LeNet-style accelerator.
//
// Word widths follow the fixed-point model the network was trained with:
// 8-bit weights, 16-bit activations and 32-bit biases. The binary point is
// this design's choice: weights carry WFRAC fraction bits, activations are
// integers of any scale, and a bias is stored at the scale of an
// activation x weight product. A layer therefore adds the bias to its
// product sum, shifts right by WFRAC bits and saturates to 16 bits
// (requant). ReLU is applied after that in every layer but the last.
//
// Network dimensions (32x32 input, 5x5 kernels, 3 and 12 feature maps,
// 2x2 pooling, 48 hidden and 10 output nodes) are the published design's.
package cnn_pkg;

  localparam int unsigned WT_W   = 8;   // weight width
  localparam int unsigned ACT_W  = 16;  // activation width
  localparam int unsigned BIAS_W = 32;  // bias width
  localparam int unsigned ACC_W  = 32;  // accumulator width (= bias width)
  localparam int unsigned WFRAC  = 7;   // fraction bits of a weight

  localparam int unsigned K      = 5;   // convolution kernel size
  localparam int unsigned KK     = K * K;
  localparam int unsigned IMG_W  = 32;  // input image side
  localparam int unsigned C1_N   = 3;   // conv 1 feature maps
  localparam int unsigned C1_OW  = IMG_W - K + 1;  // 28
  localparam int unsigned P1_W   = C1_OW / 2;      // 14
  localparam int unsigned C2_N   = 12;  // conv 2 feature maps
  localparam int unsigned C2_ENG = 3;   // conv 2 engines, four maps each
  localparam int unsigned C2_OW  = P1_W - K + 1;   // 10
  localparam int unsigned P2_W   = C2_OW / 2;      // 5
  localparam int unsigned FC_IN  = C2_N * P2_W * P2_W;  // 300
  localparam int unsigned HID_N  = 48;  // hidden nodes
  localparam int unsigned OUT_N  = 10;  // output nodes (digits)
  localparam int unsigned OUT_PAR = 8;  // output layer multipliers

  typedef logic signed [WT_W-1:0]   wt_t;
  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [BIAS_W-1:0] bias_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Selects the coefficient memory written through the load port.
  typedef enum logic [2:0] {
    CFG_C1_W = 3'd0, CFG_C1_B = 3'd1,
    CFG_C2_W = 3'd2, CFG_C2_B = 3'd3,
    CFG_H_W  = 3'd4, CFG_H_B  = 3'd5,
    CFG_O_W  = 3'd6, CFG_O_B  = 3'd7
  } cfg_sel_e;

  // Arithmetic right shift by WFRAC, saturation to ACT_W bits, optional ReLU.
  function automatic act_t requant(input acc_t acc, input logic relu);
    acc_t s;
    act_t r;
    s = acc >>> WFRAC;
    if (s > acc_t'(32767))       r = 16'sh7fff;
    else if (s < acc_t'(-32768)) r = 16'sh8000;
    else                         r = act_t'(s);
    if (relu && r[ACT_W-1]) r = '0;
    return r;
  endfunction

endpackage
