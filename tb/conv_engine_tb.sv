// conv_engine_tb: feeds random 5x5 windows and kernels to the convolution
// engine, one per cycle with random gaps, and checks every sum, its tag and
// the two-cycle latency against a sum of products worked out here.
module conv_engine_tb;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, out_valid;
  logic [3:0] in_tag = 0, out_tag;
  act_t       win [KK];
  wt_t        kern [KK];
  acc_t       sum;

  conv_engine #(.TAG_W(4)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_q [$];
  int     tag_q [$];
  int     cyc_q [$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic longint e = exp_q.pop_front();
    automatic int t = tag_q.pop_front();
    automatic int c = cyc_q.pop_front();
    checks++;
    if (longint'(sum) != e || int'(out_tag) != t || cyc - c != 2) begin
      failures++;
      $display("mismatch: got %0d tag %0d lat %0d, expected %0d tag %0d", sum, out_tag, cyc - c, e, t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        automatic longint e = 0;
        for (int k = 0; k < KK; k++) begin
          win[k]  = (n < 20) ? 16'sh7fff - 16'(k) : act_t'($urandom);
          kern[k] = (n < 10) ? 8'sh80 : wt_t'($urandom);
          e += longint'(win[k]) * longint'(kern[k]);
        end
        in_tag = 4'($urandom);
        exp_q.push_back(e);
        tag_q.push_back(int'(in_tag));
        cyc_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs: %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
