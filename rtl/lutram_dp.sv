// lutram_dp: dual-port distributed (LUT) RAM, 32 words of 6 bits by default.
//
// This is the primitive of the LUT-RAM organisation of the TCAM. Writes are
// synchronous through the write port; the read port is asynchronous, as LUT RAM
// is: `rdata` follows `raddr` in the same cycle. The enclosing unit registers
// the read data with a clock enable, so a switched-off unit does not toggle
// its read path.
// The contents start at zero, as LUT RAM does after configuration.
module lutram_dp #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 6,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
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

  assign rdata = mem[raddr];

endmodule
