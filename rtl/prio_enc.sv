// prio_enc: priority encoder for a TCAM match vector.
//
// Returns the index of the lowest-numbered set bit of `req` (entry 0 has the
// highest priority) and `hit` when any bit is set; `idx` is 0 when none is.
// Purely combinational; the unit registers its outputs.
module prio_enc #(
  parameter int unsigned N = 72,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          hit,
  output logic [IW-1:0] idx
);

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (req[i]) begin
        hit = 1'b1;
        idx = IW'(i);
      end
    end
  end

endmodule
