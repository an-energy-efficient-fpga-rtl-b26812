// conv2_layer_tb: loads random kernels and biases into the second layer,
// runs it twice on random 3x14x14 input maps (small and large values) and
// compares the 12 pooled 5x5 maps, bank by bank, with the reference model.
// It checks the run time against the published design's 3599 cycles for this layer
// pair and that ReLU and saturation both occurred.
module conv2_layer_tb;
  import cnn_pkg::*;
  import lenet_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start = 0, busy, done;
  logic [9:0]      i_raddr;
  act_t            i_rdata;
  logic [C2_N-1:0] o_we;
  logic [4:0]      o_waddr;
  act_t            o_wdata [C2_N];
  logic            w_we = 0, b_we = 0;
  logic [9:0]      w_addr = 0;
  logic [3:0]      b_addr = 0;
  wt_t             w_data = 0;
  bias_t           b_data = 0;

  conv2_layer dut (.*);

  shortint f1 [588];
  byte     w [900];
  int      b [12];
  shortint exp_f2 [300];
  shortint got [300];
  int      nwr;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) i_rdata <= f1[i_raddr];
  always @(posedge clk)
    for (int m = 0; m < 12; m++)
      if (o_we[m]) begin got[m*25 + int'(o_waddr)] = o_wdata[m]; nwr++; end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 900; k++) begin
      w[k] = byte'($urandom);
      @(negedge clk) w_we = 1; w_addr = 10'(k); w_data = w[k];
    end
    @(negedge clk) w_we = 0;
    for (int m = 0; m < 12; m++) begin
      b[m] = $urandom_range(0, 65535) - 32768;
      @(negedge clk) b_we = 1; b_addr = 4'(m); b_data = b[m];
    end
    @(negedge clk) b_we = 0;

    for (int run = 0; run < 2; run++) begin
      automatic int cyc = 0;
      for (int p = 0; p < 588; p++)
        f1[p] = (run == 0) ? shortint'($urandom_range(0, 1000))
                           : shortint'($urandom_range(0, 32767));
      conv2(f1, w, b, exp_f2);
      nwr = 0;
      for (int a = 0; a < 300; a++) got[a] = -1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int a = 0; a < 300; a++) begin
        checks++;
        if (got[a] !== exp_f2[a]) begin
          failures++;
          if (failures < 10) $display("run %0d f2[%0d]: got %0d expected %0d", run, a, got[a], exp_f2[a]);
        end
      end
      checks++;
      if (nwr != 300) begin failures++; $display("%0d writes", nwr); end
      checks++;
      $display("run %0d: %0d cycles from start to done", run, cyc);
      if (cyc != 2352 + 6 || cyc > 3599) begin failures++; $display("unexpected cycle count"); end
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
