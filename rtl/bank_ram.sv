// One data RAM of the four-bank radix-4 memory: simple dual-port, one write and one
// registered read per cycle (read latency 1). A read of the address being written in the
// same cycle returns the old word. Written as an array so synthesis maps it to block or
// distributed RAM.
module bank_ram
  import dsi_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cplx_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cplx_t                    rdata
);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
