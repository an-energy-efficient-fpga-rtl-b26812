// lenet_top_tb: end-to-end test of the accelerator at its full size.
// It loads a random set of coefficients for all four layers through the
// load port, then classifies three images back to back (small pixel values,
// large values that saturate, and a sparse digit-like stroke pattern) and
// compares the ten scores and the class with the reference model of the
// whole network. It also checks the total cycle count against the
// document's 8781 cycles per image, the cycle counter output, that each
// layer's done pulse was seen once per image, and that ReLU clipping and
// saturation happened at least once.
module lenet_top_tb;
  import cnn_pkg::*;
  import lenet_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        img_we = 0;
  logic [9:0]  img_waddr = 0;
  act_t        img_wdata = 0;
  logic        cfg_we = 0;
  cfg_sel_e    cfg_sel = CFG_C1_W;
  logic [14:0] cfg_addr = 0;
  bias_t       cfg_data = 0;
  logic        start = 0, busy, done;
  acc_t        score [OUT_N];
  logic [3:0]  class_id;
  logic [15:0] cycles;

  lenet_top dut (.*);

  shortint img [1024];
  byte     c1w [75];    int c1b [3];
  byte     c2w [900];   int c2b [12];
  byte     hw  [14400]; int hb [48];
  byte     ow  [480];   int ob [10];
  shortint f1 [588];
  shortint f2 [300];
  shortint h  [48];
  int      exp_s [10];
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_h = 0, n_o = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.c1_done) n_c1++;
    if (dut.c2_done) n_c2++;
    if (dut.h_done)  n_h++;
    if (dut.o_done)  n_o++;
  end

  task automatic cfg(cfg_sel_e sel, int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 15'(addr); cfg_data = data;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 75; k++) begin c1w[k] = byte'($urandom); cfg(CFG_C1_W, k, int'(c1w[k])); end
    for (int k = 0; k < 3; k++)  begin c1b[k] = $urandom_range(0, 8191) - 4096; cfg(CFG_C1_B, k, int'(c1b[k])); end
    for (int k = 0; k < 900; k++) begin c2w[k] = byte'($urandom); cfg(CFG_C2_W, k, int'(c2w[k])); end
    for (int k = 0; k < 12; k++) begin c2b[k] = $urandom_range(0, 65535) - 32768; cfg(CFG_C2_B, k, int'(c2b[k])); end
    for (int n = 0; n < 48; n++)
      for (int i = 0; i < 300; i++) begin
        hw[n*300 + i] = byte'($urandom);
        cfg(CFG_H_W, (i / 25) * 2048 + n*25 + i % 25, int'(hw[n*300 + i]));
      end
    for (int k = 0; k < 48; k++) begin hb[k] = $urandom_range(0, 65535) - 32768; cfg(CFG_H_B, k, int'(hb[k])); end
    for (int k = 0; k < 480; k++) begin ow[k] = byte'($urandom); cfg(CFG_O_W, k, int'(ow[k])); end
    for (int k = 0; k < 10; k++) begin ob[k] = $urandom_range(0, 65535) - 32768; cfg(CFG_O_B, k, int'(ob[k])); end
    @(negedge clk) cfg_we = 0;

    for (int run = 0; run < 3; run++) begin
      automatic int cyc = 0;
      automatic int exp_c;
      for (int p = 0; p < 1024; p++) begin
        case (run)
          0: img[p] = shortint'($urandom_range(0, 255));
          1: img[p] = shortint'($urandom_range(0, 20000));
          default: img[p] = ((p % 32) inside {[10:13]} || (p / 32) inside {[14:16]}) ? 16'sd255 : 16'sd0;
        endcase
        @(negedge clk) img_we = 1; img_waddr = 10'(p); img_wdata = img[p];
      end
      @(negedge clk) img_we = 0;
      conv1(img, c1w, c1b, f1);
      conv2(f1, c2w, c2b, f2);
      hidden(f2, hw, hb, h);
      exp_c = outlayer(h, ow, ob, exp_s);

      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int n = 0; n < 10; n++) begin
        checks++;
        if (score[n] !== exp_s[n]) begin
          failures++; $display("image %0d score[%0d]: got %0d expected %0d", run, n, score[n], exp_s[n]);
        end
      end
      checks++;
      if (int'(class_id) != exp_c) begin failures++; $display("image %0d class %0d expected %0d", run, class_id, exp_c); end
      $display("image %0d: class %0d, %0d cycles (counter %0d)", run, class_id, cyc, cycles);
      checks++;
      if (cyc != 6702 || cyc > 8781) begin failures++; $display("unexpected cycle count"); end
      checks++;
      if (int'(cycles) != cyc) begin failures++; $display("cycle counter %0d", cycles); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end

    $display("layer runs: conv1 %0d conv2 %0d hidden %0d output %0d; ReLU %0d, saturation %0d",
             n_c1, n_c2, n_h, n_o, n_relu, n_sat);
    checks++;
    if (n_c1 != 3 || n_c2 != 3 || n_h != 3 || n_o != 3) begin failures++; $display("layer run count"); end
    checks++;
    if (n_relu == 0) begin failures++; $display("ReLU never exercised"); end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
