// act_ram: on-chip activation buffer (block RAM style).
//
// Simple dual-port memory of DEPTH words of ACT_W bits: one synchronous write
// port and one synchronous read port, read data valid one cycle after the
// address. It holds the input image and the feature maps handed from one
// layer to the next. Keeping all data in internal memory is the published design's;
// the port arrangement is this design's choice. Contents are not reset.
module act_ram
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  act_t          wdata,
  input  logic [AW-1:0] raddr,
  output act_t          rdata
);
  act_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
