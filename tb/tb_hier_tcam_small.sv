// tb_hier_tcam_small: the hierarchical TCAM on a small, fully enumerated rule
// table: eight 8-bit ternary rules in two priority groups of four (unit 0 holds
// rules 0-3, unit 1 rules 4-7), with 4-bit sub-keys, so each unit has two
// 16 x 4 RAMs.
//
//   rule  value      rule  value
//   0     0000 1010  4     X001 1010
//   1     0X01 0010  5     0001 1001
//   2     1001 100X  6     1000 1000
//   3     1X10 1000  7     1111 1101
//
// The testbench fills the RAMs from the table, then searches all 256 keys
// back to back and checks hit, address, the number of units read and the
// latency against a direct comparison with the rules. Keys matching unit 0
// must leave unit 1 unread; rules 1-4 each match two keys through their X bit.
// The rules do not overlap, so every matching key matches exactly one rule.
module tb_hier_tcam_small;

  localparam int unsigned KEY_W   = 8;
  localparam int unsigned SUB_W   = 4;
  localparam int unsigned ENTRIES = 4;
  localparam int unsigned STAGES  = 2;
  localparam int unsigned NSUB    = 2;
  localparam int unsigned NRULE   = 8;
  localparam int unsigned LAT     = 2 * STAGES + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic [KEY_W-1:0]   in_key;
  logic               out_valid, out_hit;
  logic [2:0]         out_addr;
  logic [1:0]         out_reads;
  logic               wr_en;
  logic [0:0]         wr_unit, wr_sub;
  logic [SUB_W-1:0]   wr_addr;
  logic [ENTRIES-1:0] wr_data;

  hier_tcam #(
    .KEY_W(KEY_W), .SUB_W(SUB_W), .ENTRIES(ENTRIES), .PRIM_W(ENTRIES), .STAGES(STAGES)
  ) dut (.*);

  // care bit 0 = X
  logic [7:0] r_val  [NRULE] = '{8'b0000_1010, 8'b0001_0010, 8'b1001_1000, 8'b1010_1000,
                                 8'b0001_1010, 8'b0001_1001, 8'b1000_1000, 8'b1111_1101};
  logic [7:0] r_care [NRULE] = '{8'b1111_1111, 8'b1011_1111, 8'b1111_1110, 8'b1011_1111,
                                 8'b0111_1111, 8'b1111_1111, 8'b1111_1111, 8'b1111_1111};

  int checks = 0, failures = 0, cyc = 0;
  int n_hit0 = 0, n_hit1 = 0, n_miss = 0, n_xmatch = 0, n_wide = 0;
  int exp_idx [$];
  int exp_issue [$];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_search(logic [7:0] k, output int nm);
    int best;
    best = -1; nm = 0;
    for (int e = NRULE - 1; e >= 0; e--)
      if (((k ^ r_val[e]) & r_care[e]) == 8'h00) begin
        best = e;
        nm++;
      end
    return best;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e, t, reads;
      e = exp_idx.pop_front();
      t = exp_issue.pop_front();
      reads = (e < 0) ? STAGES : e / ENTRIES + 1;
      checks++;
      if ((e < 0 && out_hit) || (e >= 0 && (!out_hit || out_addr != 3'(e))) ||
          out_reads != 2'(reads) || cyc - (t + 1) != int'(LAT)) begin
        failures++;
        $display("FAIL: hit=%0b addr=%0d reads=%0d expected idx=%0d reads=%0d", out_hit,
                 out_addr, out_reads, e, reads);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_key = '0;
    wr_en = 1'b0; wr_unit = '0; wr_sub = '0; wr_addr = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < int'(STAGES); u++)
      for (int j = 0; j < int'(NSUB); j++)
        for (int a = 0; a < 16; a++) begin
          @(negedge clk);
          wr_en = 1'b1; wr_unit = 1'(u); wr_sub = 1'(j); wr_addr = 4'(a);
          for (int n = 0; n < int'(ENTRIES); n++) begin
            int e;
            e = u * ENTRIES + n;
            wr_data[n] = (((4'(a) ^ r_val[e][j*4 +: 4]) & r_care[e][j*4 +: 4]) == 4'h0);
          end
        end
    @(negedge clk) wr_en = 1'b0;

    for (int k = 0; k < 256; k++) begin
      int e, nm;
      @(negedge clk);
      in_valid = 1'b1;
      in_key = 8'(k);
      e = ref_search(8'(k), nm);
      exp_idx.push_back(e);
      exp_issue.push_back(cyc);
      if (e < 0) n_miss++;
      else if (e < int'(ENTRIES)) n_hit0++;
      else n_hit1++;
      if (nm > 1) n_xmatch++;
      if (e >= 0 && r_care[e] != 8'hFF) n_wide++;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);

    checks++;
    if (exp_idx.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_idx.size());
    end
    $display("hit unit 0=%0d hit unit 1=%0d miss=%0d several rules=%0d ternary hits=%0d",
             n_hit0, n_hit1, n_miss, n_xmatch, n_wide);
    checks++;
    if (n_xmatch != 0) begin
      failures++;
      $display("FAIL: reference finds overlapping rules");
    end
    if (n_hit0 == 0 || n_hit1 == 0 || n_miss == 0 || n_wide == 0) begin
      failures++;
      $display("FAIL: a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
