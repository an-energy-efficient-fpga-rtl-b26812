// conv1_layer_tb: loads random kernels and biases into the first layer, runs
// it on two images (one with small pixel values, one with large ones that
// drive the requantisation into saturation) and compares all 588 pooled
// outputs of each run with the reference model. It also checks the output
// addresses, the run time against the published design's 3144 cycles for this
// layer pair, and that ReLU and saturation both occurred.
module conv1_layer_tb;
  import cnn_pkg::*;
  import lenet_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, done;
  logic [9:0] img_raddr;
  act_t       img_rdata;
  logic       o_we;
  logic [9:0] o_waddr;
  act_t       o_wdata;
  logic       w_we = 0, b_we = 0;
  logic [6:0] w_addr = 0;
  logic [1:0] b_addr = 0;
  wt_t        w_data = 0;
  bias_t      b_data = 0;

  conv1_layer dut (.*);

  shortint img [1024];
  byte     w [75];
  int      b [3];
  shortint exp_f1 [588];
  shortint got [588];
  int      nwr;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) img_rdata <= img[img_raddr];
  always @(posedge clk) if (o_we) begin
    if (int'(o_waddr) != nwr) begin
      failures++; $display("write %0d to address %0d", nwr, o_waddr);
    end
    got[o_waddr] = o_wdata;
    nwr++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 75; k++) begin
      w[k] = byte'($urandom);
      @(negedge clk) w_we = 1; w_addr = 7'(k); w_data = w[k];
    end
    @(negedge clk) w_we = 0;
    for (int m = 0; m < 3; m++) begin
      b[m] = $urandom_range(0, 8191) - 4096;
      @(negedge clk) b_we = 1; b_addr = 2'(m); b_data = b[m];
    end
    @(negedge clk) b_we = 0;

    for (int run = 0; run < 2; run++) begin
      automatic int cyc = 0;
      for (int p = 0; p < 1024; p++)
        img[p] = (run == 0) ? shortint'($urandom_range(0, 255))
                            : shortint'($urandom_range(0, 20000));
      conv1(img, w, b, exp_f1);
      nwr = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int a = 0; a < 588; a++) begin
        checks++;
        if (got[a] !== exp_f1[a]) begin
          failures++;
          if (failures < 10) $display("run %0d f1[%0d]: got %0d expected %0d", run, a, got[a], exp_f1[a]);
        end
      end
      checks++;
      if (nwr != 588) begin failures++; $display("%0d writes", nwr); end
      checks++;
      $display("run %0d: %0d cycles from start to done", run, cyc);
      if (cyc != 3072 + 6 || cyc > 3144) begin failures++; $display("unexpected cycle count"); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    checks++;
    $display("relu %0d saturations %0d", n_relu, n_sat);
    if (n_relu == 0 || n_sat == 0) begin failures++; $display("ReLU or saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
