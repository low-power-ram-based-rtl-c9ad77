// tb_bram_sdp: self-checking test of the 512 x 72 simple dual-port RAM.
//
// Writes random words to random addresses while a shadow array records them,
// then reads with random enables and addresses. Checked: read data one cycle
// after an enabled read, the output held while the read enable is low,
// read-first behaviour when the same word is written and read in one cycle,
// and zero contents of words never written.
module tb_bram_sdp;

  localparam int unsigned DEPTH = 512;
  localparam int unsigned WIDTH = 72;
  localparam int unsigned AW    = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we, re;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;

  bram_sdp dut (.*);

  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;
  int n_hold = 0, n_rfirst = 0;

  function automatic logic [WIDTH-1:0] rand_word();
    logic [95:0] r;
    r = {$urandom, $urandom, $urandom};
    return r[WIDTH-1:0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp_q, last;
    bit               en_q;
    for (int i = 0; i < int'(DEPTH); i++) shadow[i] = '0;
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    last = '0; en_q = 1'b0; exp_q = '0;

    // fill the lower half, the upper half stays zero
    for (int i = 0; i < int'(DEPTH) / 2; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = rand_word();
      shadow[i] = wdata;
    end
    @(negedge clk) we = 1'b0;

    // a read that was enabled sets `last`; reads not enabled must keep it
    @(negedge clk);
    re = 1'b1; raddr = '0;
    @(negedge clk);
    last = shadow[0];
    for (int i = 0; i < 4000; i++) begin
      // check the result of the previous cycle's request
      if (en_q) last = exp_q;
      checks++;
      if (rdata !== last) begin
        failures++;
        $display("FAIL cycle %0d: rdata=%h expected %h (re=%0b)", i, rdata, last, en_q);
      end
      if (!en_q) n_hold++;
      // new request
      re    = ($urandom_range(0, 3) != 0);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we    = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, DEPTH / 2 - 1));
      wdata = rand_word();
      en_q  = re;
      exp_q = shadow[raddr];                 // read-first
      if (re && we && waddr == raddr) n_rfirst++;
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
    end

    $display("held=%0d read-first=%0d", n_hold, n_rfirst);
    if (n_hold == 0 || n_rfirst == 0) begin
      failures++;
      $display("FAIL: a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
