// bram_sdp: simple dual-port block RAM, 512 words of 72 bits by default.
//
// This is the memory of the block-RAM organisation of the TCAM: one write port
// used to program the RAM and one read port addressed by a sub-key. The read is
// synchronous (data appear one clock after the address) and happens only while
// `re` is high. With `re` low the port does nothing and `rdata` keeps its old
// value, which is how a unit that is switched off by the hierarchical search
// saves the read power of its RAMs (the port enable acts as a clock enable of
// the RAM's read side).
//
// Timing: write at the clock edge where `we` is high; read data valid the
// cycle after `re`. Reading and writing the same address in one cycle returns
// the old word (read-first).
// The contents start at zero, as an FPGA block RAM does after configuration;
// the output register is not initialised (readers qualify it with the enable).
module bram_sdp #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 72,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
