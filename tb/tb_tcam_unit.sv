// tb_tcam_unit: self-checking test of one TCAM unit in both RAM organisations.
//
// Two units see the same 72 ternary rules and the same keys: one built from
// 512 x 72 block RAMs (9-bit sub-keys, 20 RAMs), one from 32 x 6 LUT RAMs
// (5-bit sub-keys, 36 x 12 primitives). The testbench fills every RAM word from
// the rules (bit n of word a of RAM j = rule n accepts value a in slice j),
// then searches with keys aimed at rules, keys one cared bit away from a rule,
// and random keys. A reference compares each key with every rule directly and
// takes the lowest matching rule. Checked: hit, index and `active` exactly two
// cycles after the key, and that a unit with `en` low reads nothing and
// reports no hit.
module tb_tcam_unit;

  localparam int unsigned KEY_W   = tcam_pkg::CAM_KEY_W;
  localparam int unsigned ENTRIES = tcam_pkg::UNIT_ENTRIES;
  localparam int unsigned B_SW    = tcam_pkg::BRAM_SUB_W;
  localparam int unsigned L_SW    = tcam_pkg::LUT_SUB_W;
  localparam int unsigned B_NSUB  = tcam_pkg::num_sub(KEY_W, B_SW);
  localparam int unsigned L_NSUB  = tcam_pkg::num_sub(KEY_W, L_SW);
  localparam int unsigned IW      = $clog2(ENTRIES);
  localparam int unsigned NKEYS   = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               en;
  logic [KEY_W-1:0]   key;
  logic               b_active, b_hit, l_active, l_hit;
  logic [IW-1:0]      b_idx, l_idx;
  logic               b_wr_en, l_wr_en;
  logic [$clog2(B_NSUB)-1:0] b_wr_sub;
  logic [$clog2(L_NSUB)-1:0] l_wr_sub;
  logic [B_SW-1:0]    b_wr_addr;
  logic [L_SW-1:0]    l_wr_addr;
  logic [ENTRIES-1:0] b_wr_data, l_wr_data;

  tcam_unit u_bram (
    .clk(clk), .rst_n(rst_n), .en(en), .key(key),
    .active(b_active), .hit(b_hit), .idx(b_idx),
    .wr_en(b_wr_en), .wr_sub(b_wr_sub), .wr_addr(b_wr_addr), .wr_data(b_wr_data)
  );

  tcam_unit #(
    .SUB_W(L_SW), .PRIM_W(tcam_pkg::LUT_PRIM_W), .USE_BRAM(1'b0)
  ) u_lut (
    .clk(clk), .rst_n(rst_n), .en(en), .key(key),
    .active(l_active), .hit(l_hit), .idx(l_idx),
    .wr_en(l_wr_en), .wr_sub(l_wr_sub), .wr_addr(l_wr_addr), .wr_data(l_wr_data)
  );

  // rules: care bit 1 = compared, 0 = don't care
  logic [KEY_W-1:0] r_val  [ENTRIES];
  logic [KEY_W-1:0] r_care [ENTRIES];
  bit               r_ok   [ENTRIES];

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_multi = 0, n_off = 0;

  function automatic logic [KEY_W-1:0] rand_key();
    logic [191:0] r;
    r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return r[KEY_W-1:0];
  endfunction

  function automatic logic [ENTRIES-1:0] ram_word(int sw, int j, int a);
    logic [ENTRIES-1:0] w;
    for (int n = 0; n < int'(ENTRIES); n++) begin
      logic ok;
      ok = r_ok[n];
      for (int b = 0; b < sw; b++) begin
        int kb;
        kb = j * sw + b;
        if (kb < int'(KEY_W) && r_care[n][kb] && (r_val[n][kb] != a[b])) ok = 1'b0;
      end
      w[n] = ok;
    end
    return w;
  endfunction

  // lowest matching rule, -1 for none; nm = number of matching rules
  function automatic int ref_idx(logic [KEY_W-1:0] k, output int nm);
    int best;
    best = -1;
    nm = 0;
    for (int n = ENTRIES - 1; n >= 0; n--) begin
      if (r_ok[n] && (((k ^ r_val[n]) & r_care[n]) == '0)) begin
        best = n;
        nm++;
      end
    end
    return best;
  endfunction

  typedef struct {
    bit en;
    int idx;
  } exp_t;
  exp_t exp_d1, exp_d2;

  task automatic check_out(exp_t e);
    bit exp_hit;
    exp_hit = e.en && (e.idx >= 0);
    checks++;
    if (b_active !== e.en || b_hit !== exp_hit || (exp_hit && b_idx !== IW'(e.idx))) begin
      failures++;
      $display("FAIL bram: en=%0b exp idx=%0d got active=%0b hit=%0b idx=%0d",
               e.en, e.idx, b_active, b_hit, b_idx);
    end
    checks++;
    if (l_active !== e.en || l_hit !== exp_hit || (exp_hit && l_idx !== IW'(e.idx))) begin
      failures++;
      $display("FAIL lut: en=%0b exp idx=%0d got active=%0b hit=%0b idx=%0d",
               e.en, e.idx, l_active, l_hit, l_idx);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; key = '0;
    b_wr_en = 1'b0; b_wr_sub = '0; b_wr_addr = '0; b_wr_data = '0;
    l_wr_en = 1'b0; l_wr_sub = '0; l_wr_addr = '0; l_wr_data = '0;

    // rules: mostly narrow, a few with many don't-cares, some overlapping,
    // a few disabled
    for (int n = 0; n < int'(ENTRIES); n++) begin
      r_val[n]  = rand_key();
      r_care[n] = rand_key() | rand_key() | rand_key();   // ~12% don't care
      r_ok[n]   = 1'b1;
    end
    for (int n = 40; n < 48; n++) begin                    // copies of 2..9
      r_val[n]  = r_val[n-38];
      r_care[n] = r_care[n-38];
    end
    r_care[20] = r_care[50] & {KEY_W{1'b1}} >> 60;         // 20 generalises 50
    r_val[20]  = r_val[50];
    r_care[71] = {4'hF, {(KEY_W-4){1'b0}}};                // catch-all for top nibble A
    r_val[71]  = {4'hA, {(KEY_W-4){1'b0}}};
    for (int n = 60; n < 64; n++) r_ok[n] = 1'b0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int j = 0; j < int'(B_NSUB); j++)
      for (int a = 0; a < (1 << B_SW); a++) begin
        @(negedge clk);
        b_wr_en = 1'b1; b_wr_sub = $bits(b_wr_sub)'(j); b_wr_addr = B_SW'(a);
        b_wr_data = ram_word(B_SW, j, a);
      end
    @(negedge clk) b_wr_en = 1'b0;
    for (int j = 0; j < int'(L_NSUB); j++)
      for (int a = 0; a < (1 << L_SW); a++) begin
        @(negedge clk);
        l_wr_en = 1'b1; l_wr_sub = $bits(l_wr_sub)'(j); l_wr_addr = L_SW'(a);
        l_wr_data = ram_word(L_SW, j, a);
      end
    @(negedge clk) l_wr_en = 1'b0;

    exp_d1 = '{en: 1'b0, idx: -1};
    exp_d2 = '{en: 1'b0, idx: -1};
    for (int i = 0; i < int'(NKEYS) + 2; i++) begin
      exp_t e;
      int nm, t, kind;
      @(negedge clk);
      if (i >= 2) check_out(exp_d2);
      exp_d2 = exp_d1;
      if (i < int'(NKEYS)) begin
        kind = $urandom_range(0, 9);
        t    = $urandom_range(0, ENTRIES - 1);
        if (kind < 6)
          key = (r_val[t] & r_care[t]) | (rand_key() & ~r_care[t]);
        else if (kind < 8) begin
          int b;
          key = (r_val[t] & r_care[t]) | (rand_key() & ~r_care[t]);
          do b = $urandom_range(0, KEY_W - 1); while (!r_care[t][b]);
          key[b] = ~key[b];
        end else
          key = rand_key();
        en = ($urandom_range(0, 7) != 0);
        e.en  = en;
        e.idx = ref_idx(key, nm);
        if (!en) n_off++;
        else if (e.idx < 0) n_miss++;
        else begin
          n_hit++;
          if (nm > 1) n_multi++;
        end
      end else begin
        en = 1'b0;
        e = '{en: 1'b0, idx: -1};
      end
      exp_d1 = e;
    end

    $display("hits=%0d misses=%0d multi-match=%0d disabled=%0d", n_hit, n_miss, n_multi, n_off);
    if (n_hit == 0 || n_miss == 0 || n_multi == 0 || n_off == 0) begin
      failures++;
      $display("FAIL: a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
