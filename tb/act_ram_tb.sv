// act_ram_tb: writes random words to random addresses of the buffer while
// reading others, and checks that each read returns, one cycle later, the
// last word written there according to a copy kept here.
module act_ram_tb;
  import cnn_pkg::*;
  localparam int DEPTH = 588;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  act_t       wdata = 0, rdata;

  act_ram #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  shortint model [DEPTH];
  bit      known [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = act_t'($urandom);
      model[a] = wdata; known[a] = 1;
    end
    for (int n = 0; n < 3000; n++) begin
      int ra;
      shortint e;
      @(negedge clk);
      ra = $urandom_range(0, DEPTH - 1);
      raddr = 10'(ra);
      e = model[ra];
      we = $urandom_range(0, 1);
      waddr = 10'($urandom_range(0, DEPTH - 1));
      wdata = act_t'($urandom);
      if (we && waddr != raddr) model[waddr] = wdata;
      else we = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== e) begin failures++; $display("addr %0d: got %0d expected %0d", ra, rdata, e); end
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
