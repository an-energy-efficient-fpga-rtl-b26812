// fc_hidden_tb: loads random weights and biases into the hidden layer, runs
// it on random 300-value inputs held in twelve 25-word banks and compares
// the 48 outputs with the reference model. It checks the run time against
// the published design's 1878 cycles for this layer and that ReLU occurred.
module fc_hidden_tb;
  import cnn_pkg::*;
  import lenet_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy, done;
  logic [4:0]  i_raddr;
  act_t        i_rdata [C2_N];
  act_t        hid [HID_N];
  logic        w_we = 0, b_we = 0;
  logic [14:0] w_addr = 0;
  logic [5:0]  b_addr = 0;
  wt_t         w_data = 0;
  bias_t       b_data = 0;

  fc_hidden dut (.*);

  shortint f2 [300];
  byte     w [14400];
  int      b [48];
  shortint exp_h [48];
  int checks = 0, failures = 0;

  always_ff @(posedge clk)
    for (int m = 0; m < 12; m++) i_rdata[m] <= f2[m*25 + int'(i_raddr)];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 48; n++)
      for (int i = 0; i < 300; i++) begin
        w[n*300 + i] = byte'($urandom);
        @(negedge clk) w_we = 1;
        w_addr = {4'(i / 25), 11'(n*25 + i % 25)};
        w_data = w[n*300 + i];
      end
    @(negedge clk) w_we = 0;
    for (int n = 0; n < 48; n++) begin
      b[n] = $urandom_range(0, 65535) - 32768;
      @(negedge clk) b_we = 1; b_addr = 6'(n); b_data = b[n];
    end
    @(negedge clk) b_we = 0;

    for (int run = 0; run < 2; run++) begin
      automatic int cyc = 0;
      automatic int relu0 = n_relu;
      for (int p = 0; p < 300; p++)
        f2[p] = (run == 0) ? shortint'($urandom_range(0, 300))
                           : shortint'($urandom_range(0, 32767));
      hidden(f2, w, b, exp_h);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int n = 0; n < 48; n++) begin
        checks++;
        if (hid[n] !== exp_h[n]) begin
          failures++;
          if (failures < 10) $display("run %0d hid[%0d]: got %0d expected %0d", run, n, hid[n], exp_h[n]);
        end
      end
      checks++;
      $display("run %0d: %0d cycles from start to done, %0d ReLU", run, cyc, n_relu - relu0);
      if (cyc != 1200 + 3 || cyc > 1878) begin failures++; $display("unexpected cycle count"); end
    end
    checks++;
    if (n_relu == 0) begin failures++; $display("ReLU never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
