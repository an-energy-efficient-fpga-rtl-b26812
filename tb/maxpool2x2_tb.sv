// maxpool2x2_tb: streams three random 28x28 maps back to back (with random
// idle cycles) into the pooling unit and compares each 2x2 maximum, in
// order, with a pooled map worked out here.
module maxpool2x2_tb;
  import cnn_pkg::*;
  localparam int OW = 28;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, in_valid = 0, out_valid;
  act_t in_val = 0, out_val;

  maxpool2x2 #(.OW(OW)) dut (.*);

  int checks = 0, failures = 0;
  shortint exp_q [$];
  shortint m [OW][OW];

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic shortint e = exp_q.pop_front();
    checks++;
    if (out_val !== e) begin failures++; $display("mismatch: got %0d expected %0d", out_val, e); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < OW; y++)
        for (int x = 0; x < OW; x++) m[y][x] = shortint'($urandom);
      for (int y = 0; y < OW/2; y++)
        for (int x = 0; x < OW/2; x++) begin
          automatic shortint e = m[2*y][2*x];
          if (m[2*y][2*x+1] > e) e = m[2*y][2*x+1];
          if (m[2*y+1][2*x] > e) e = m[2*y+1][2*x];
          if (m[2*y+1][2*x+1] > e) e = m[2*y+1][2*x+1];
          exp_q.push_back(e);
        end
      for (int y = 0; y < OW; y++)
        for (int x = 0; x < OW; x++) begin
          @(negedge clk);
          while (f == 1 && $urandom_range(0, 4) == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
          in_valid = 1;
          in_val = m[y][x];
        end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs: %0d", exp_q.size()); end
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
