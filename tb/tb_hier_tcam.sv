// tb_hier_tcam: end-to-end test of the hierarchical TCAM at its default size
// (180-bit key, 7 units of 72 entries in 512 x 72 block RAMs).
//
// The testbench keeps all the ternary rules itself and, acting as the host,
// fills every sub-key RAM word from them (bit n of word a of RAM j of unit u
// is 1 when rule u*72+n accepts value a in key slice j). It then streams keys
// -- some back to back, some with gaps -- aimed at rules, one bit away from a
// rule, or random. A reference compares each key with all rules and expects
// the lowest matching global index, and as the number of units read the index
// of the matching unit plus one (all units on a miss). Each result must come
// out exactly 2*STAGES+1 cycles after its key. Halfway, the rules of unit 0 are
// replaced and that unit is reprogrammed.
// Mechanisms counted (each must occur): lower units switched off by an earlier
// match, miss through all units, match in the last unit, a key matching rules
// in several units, a key matching several rules of the winning unit, keys on
// consecutive cycles, and a rule update.
module tb_hier_tcam;

  localparam int unsigned KEY_W   = tcam_pkg::CAM_KEY_W;
  localparam int unsigned SUB_W   = tcam_pkg::BRAM_SUB_W;
  localparam int unsigned ENTRIES = tcam_pkg::UNIT_ENTRIES;
  localparam int unsigned STAGES  = tcam_pkg::BRAM_STAGES;
  localparam int unsigned NSUB    = tcam_pkg::num_sub(KEY_W, SUB_W);
  localparam int unsigned NRULE   = STAGES * ENTRIES;
  localparam int unsigned SW      = $clog2(NSUB);
  localparam int unsigned UW      = $clog2(STAGES);
  localparam int unsigned AW      = $clog2(NRULE);
  localparam int unsigned CW      = $clog2(STAGES + 1);
  localparam int unsigned LAT     = 2 * STAGES + 1;
  localparam int unsigned NKEYS   = 1500;   // per search phase

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic [KEY_W-1:0]   in_key;
  logic               out_valid, out_hit;
  logic [AW-1:0]      out_addr;
  logic [CW-1:0]      out_reads;
  logic               wr_en;
  logic [UW-1:0]      wr_unit;
  logic [SW-1:0]      wr_sub;
  logic [SUB_W-1:0]   wr_addr;
  logic [ENTRIES-1:0] wr_data;

  hier_tcam dut (.*);

  logic [KEY_W-1:0] r_val  [NRULE];
  logic [KEY_W-1:0] r_care [NRULE];
  bit               r_ok   [NRULE];

  typedef struct {
    int idx;
    int reads;
    int issue;
  } exp_t;
  exp_t exp_q[$];

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_skip = 0, n_miss = 0, n_last = 0, n_xunit = 0, n_inunit = 0;
  int n_b2b = 0, n_update = 0, n_results = 0;
  longint reads_total = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [KEY_W-1:0] rand_key();
    logic [191:0] r;
    r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return r[KEY_W-1:0];
  endfunction

  function automatic logic [ENTRIES-1:0] ram_word(int u, int j, int a);
    logic [ENTRIES-1:0] w;
    for (int n = 0; n < int'(ENTRIES); n++) begin
      int  e;
      logic ok;
      e  = u * ENTRIES + n;
      ok = r_ok[e];
      for (int b = 0; b < int'(SUB_W); b++) begin
        int kb;
        kb = j * SUB_W + b;
        if (kb < int'(KEY_W) && r_care[e][kb] && (r_val[e][kb] != a[b])) ok = 1'b0;
      end
      w[n] = ok;
    end
    return w;
  endfunction

  task automatic program_unit(int u);
    for (int j = 0; j < int'(NSUB); j++)
      for (int a = 0; a < (1 << SUB_W); a++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_unit = UW'(u); wr_sub = SW'(j); wr_addr = SUB_W'(a);
        wr_data = ram_word(u, j, a);
      end
    @(negedge clk) wr_en = 1'b0;
  endtask

  function automatic void new_rule(int e);
    r_val[e]  = rand_key();
    r_care[e] = rand_key() | rand_key() | rand_key();
    r_ok[e]   = 1'b1;
  endfunction

  function automatic void copy_rule(int dst, int src);
    r_val[dst]  = r_val[src];
    r_care[dst] = r_care[src];
    r_ok[dst]   = r_ok[src];
  endfunction

  // reference search: lowest matching index, number of units / entries hit
  function automatic int ref_search(logic [KEY_W-1:0] k, output int units, output int in_first);
    int best;
    best = -1; units = 0; in_first = 0;
    for (int u = 0; u < int'(STAGES); u++) begin
      int cnt;
      cnt = 0;
      for (int n = 0; n < int'(ENTRIES); n++) begin
        int e;
        e = u * ENTRIES + n;
        if (r_ok[e] && (((k ^ r_val[e]) & r_care[e]) == '0)) begin
          if (best < 0) best = e;
          cnt++;
        end
      end
      if (cnt > 0) begin
        if (units == 0) in_first = cnt;
        units++;
      end
    end
    return best;
  endfunction

  // result monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: result with no key outstanding");
      end else begin
        e = exp_q.pop_front();
        n_results++;
        reads_total += out_reads;
        if ((e.idx < 0 && out_hit !== 1'b0) ||
            (e.idx >= 0 && (out_hit !== 1'b1 || out_addr !== AW'(e.idx))) ||
            out_reads !== CW'(e.reads) || cyc - (e.issue + 1) != int'(LAT)) begin
          failures++;
          $display("FAIL: hit=%0b addr=%0d reads=%0d latency=%0d, expected idx=%0d reads=%0d latency=%0d",
                   out_hit, out_addr, out_reads, cyc - (e.issue + 1), e.idx, e.reads, LAT);
        end
      end
    end
  end

  task automatic search_phase(int nkeys);
    bit prev;
    prev = 1'b0;
    for (int i = 0; i < nkeys; i++) begin
      int kind, t, units, in_first;
      exp_t e;
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        prev = 1'b0;
        i--;
        continue;
      end
      kind = $urandom_range(0, 9);
      t    = $urandom_range(0, NRULE - 1);
      if (kind < 6)
        in_key = (r_val[t] & r_care[t]) | (rand_key() & ~r_care[t]);
      else if (kind < 8) begin
        int b;
        in_key = (r_val[t] & r_care[t]) | (rand_key() & ~r_care[t]);
        do b = $urandom_range(0, KEY_W - 1); while (!r_care[t][b]);
        in_key[b] = ~in_key[b];
      end else
        in_key = rand_key();
      in_valid = 1'b1;
      if (prev) n_b2b++;
      prev = 1'b1;
      e.idx   = ref_search(in_key, units, in_first);
      e.reads = (e.idx < 0) ? int'(STAGES) : e.idx / int'(ENTRIES) + 1;
      e.issue = cyc;
      exp_q.push_back(e);
      if (e.idx < 0) n_miss++;
      else begin
        if (e.reads < int'(STAGES)) n_skip++;
        else n_last++;
        if (units > 1) n_xunit++;
        if (in_first > 1) n_inunit++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_key = '0;
    wr_en = 1'b0; wr_unit = '0; wr_sub = '0; wr_addr = '0; wr_data = '0;

    for (int e = 0; e < int'(NRULE); e++) new_rule(e);
    // overlaps across units: later units repeat rules of earlier ones
    for (int k = 0; k < 10; k++) copy_rule(4 * ENTRIES + 10 + k, 1 * ENTRIES + 30 + k);
    for (int k = 0; k < 5; k++) copy_rule(6 * ENTRIES + k, 2 * ENTRIES + 50 + k);
    // overlap inside a unit: entry 20 of unit 3 generalises entry 50
    r_val[3 * ENTRIES + 20]  = r_val[3 * ENTRIES + 50];
    r_care[3 * ENTRIES + 20] = r_care[3 * ENTRIES + 50] >> 90;
    // catch-all for keys whose top nibble is A, last entry of the last unit
    r_val[NRULE - 1]  = {4'hA, {(KEY_W - 4){1'b0}}};
    r_care[NRULE - 1] = {4'hF, {(KEY_W - 4){1'b0}}};
    // some empty entries
    for (int n = 60; n < 66; n++) r_ok[5 * ENTRIES + n] = 1'b0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < int'(STAGES); u++) program_unit(u);

    search_phase(NKEYS);

    // rule update: unit 0 gets new rules, one of them a copy of a rule of
    // the last unit, which from now on wins for that rule's keys
    for (int n = 0; n < int'(ENTRIES); n++) new_rule(n);
    copy_rule(7, (STAGES - 1) * ENTRIES + 40);
    program_unit(0);
    n_update++;

    search_phase(NKEYS);

    checks++;
    if (exp_q.size() != 0 || n_results != 2 * int'(NKEYS)) begin
      failures++;
      $display("FAIL: %0d results for %0d keys", n_results, 2 * NKEYS);
    end
    $display("results=%0d  mean units read per key=%0.2f of %0d",
             n_results, real'(reads_total) / real'(n_results), STAGES);
    $display("lower units switched off=%0d miss=%0d hit in last unit=%0d several units=%0d several entries=%0d back-to-back=%0d updates=%0d",
             n_skip, n_miss, n_last, n_xunit, n_inunit, n_b2b, n_update);
    if (n_skip == 0 || n_miss == 0 || n_last == 0 || n_xunit == 0 || n_inunit == 0 ||
        n_b2b == 0 || n_update == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
