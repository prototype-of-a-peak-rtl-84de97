// Symbol buffer: RAM that collects the data sub-carriers of one OFDM symbol as they arrive
// serially and replays them, by index, for every dummy-sequence iteration of that symbol
// (the serial-to-parallel stage in front of the IFFTs). One write and one registered read
// per cycle; rdata is valid one cycle after raddr. DEPTH = N - L data sub-carriers.
module input_buffer
  import dsi_pkg::*;
#(
  parameter int DEPTH = 201
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
