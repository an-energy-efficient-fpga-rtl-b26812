// fc_output_tb: loads random weights and biases into the output layer, runs
// it on several random 48-value inputs and compares the ten scores and the
// chosen class with the reference model. One run has all-zero weights so
// that every score ties with the bias; it checks the run time against the
// document's 160 cycles for this layer.
module fc_output_tb;
  import cnn_pkg::*;
  import lenet_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, done;
  act_t       hid [HID_N];
  acc_t       score [OUT_N];
  logic [3:0] class_id;
  logic       w_we = 0, b_we = 0;
  logic [8:0] w_addr = 0;
  logic [3:0] b_addr = 0;
  wt_t        w_data = 0;
  bias_t      b_data = 0;

  fc_output dut (.*);

  shortint h [48];
  byte     w [480];
  int      b [10];
  int      exp_s [10];
  int checks = 0, failures = 0;
  int classes_seen [10];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      automatic int cyc = 0;
      automatic int exp_c;
      for (int k = 0; k < 480; k++) begin
        w[k] = (run == 7) ? 8'sd0 : byte'($urandom);
        @(negedge clk) w_we = 1; w_addr = 9'(k); w_data = w[k];
      end
      @(negedge clk) w_we = 0;
      for (int n = 0; n < 10; n++) begin
        b[n] = (run == 7) ? ((n == 3 || n == 6) ? 50 : 7) : int'($urandom_range(0, 65535)) - 32768;
        @(negedge clk) b_we = 1; b_addr = 4'(n); b_data = b[n];
      end
      @(negedge clk) b_we = 0;
      for (int i = 0; i < 48; i++) h[i] = shortint'($urandom_range(0, 32767));
      for (int i = 0; i < 48; i++) hid[i] = h[i];
      exp_c = outlayer(h, w, b, exp_s);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int n = 0; n < 10; n++) begin
        checks++;
        if (score[n] !== exp_s[n]) begin
          failures++; $display("run %0d score[%0d]: got %0d expected %0d", run, n, score[n], exp_s[n]);
        end
      end
      checks++;
      if (int'(class_id) != exp_c) begin failures++; $display("run %0d class %0d expected %0d", run, class_id, exp_c); end
      classes_seen[exp_c]++;
      checks++;
      if (cyc != 60 + 3 || cyc > 160) begin failures++; $display("run %0d: %0d cycles", run, cyc); end
    end
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
