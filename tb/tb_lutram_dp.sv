// tb_lutram_dp: self-checking test of the 32 x 6 distributed RAM.
//
// Random writes and reads against a shadow array. Checked: zero contents
// after configuration, asynchronous read (data follow the read address in
// the same cycle) and that a write is visible from the next cycle on.
module tb_lutram_dp;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 6;
  localparam int unsigned AW    = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;

  lutram_dp dut (.*);

  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) shadow[i] = '0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      raddr = AW'(i);
      #1;
      checks++;
      if (rdata !== '0) begin
        failures++;
        $display("FAIL: word %0d not zero after start: %h", i, rdata);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      // two reads in the same cycle, at different addresses
      for (int r = 0; r < 2; r++) begin
        raddr = AW'($urandom_range(0, DEPTH - 1));
        #1;
        checks++;
        if (rdata !== shadow[raddr]) begin
          failures++;
          $display("FAIL: word %0d read %h expected %h", raddr, rdata, shadow[raddr]);
        end
      end
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
