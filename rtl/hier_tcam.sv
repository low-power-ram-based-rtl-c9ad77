// hier_tcam: RAM-based ternary CAM with hierarchical (priority-ordered) search.
//
// The TCAM is a chain of STAGES units (tcam_unit), each holding ENTRIES rules.
// Unit 0 holds the highest-priority rules, and inside a unit entry 0 comes
// first, so the global address of entry n of unit s is s*ENTRIES + n and the
// lowest matching address wins. The key flows down the chain, two clock
// cycles per unit. Each key carries a `found` flag: once a unit has matched,
// every later unit is not enabled for that key, so its RAMs are not read and
// the lower-priority search costs no read power. A key that matches early
// therefore reads only the units up to the first match; a miss reads all of
// them. The result is the same as a full parallel search followed by a
// priority encoder over all units.
//
// Defaults are the block-RAM organisation: 180-bit key, 9-bit sub-keys in
// 512 x 72 RAMs (20 per unit), 72 entries per unit, 7 units = 504 entries in
// 140 block RAMs. The LUT-RAM organisation is USE_BRAM = 0, SUB_W = 5,
// PRIM_W = 6, STAGES = 9 (648 entries, 36 x 12 RAMs of 32 x 6 per unit).
//
// Interface
//   search : `in_valid`/`in_key` accept one key per cycle (no back-pressure).
//            After LATENCY = 2*STAGES + 1 cycles `out_valid` brings
//            `out_hit`, `out_addr` (global entry index) and `out_reads`
//            (number of units whose RAMs were read for that key).
//   write  : `wr_en` stores `wr_data` (one bit per entry of the unit) in word
//            `wr_addr` of sub-key RAM `wr_sub` of unit `wr_unit`. Bit n of word
//            a in RAM j must be 1 exactly when entry n accepts the value a in
//            key bits [j*SUB_W +: SUB_W]; an entry whose column is all zero in
//            some RAM never matches. Filling the RAMs from rules is the host's
//            job. Writes may be mixed with searches; a search that meets a
//            rewrite of the same word sees either word.
// The priority order across units, the disable chain and the sizes follow the
// RAM-based hierarchical TCAM; the per-unit pipeline depth, the output
// register, the read counter and the raw RAM write port are this design's
// choices.
module hier_tcam #(
  parameter int unsigned KEY_W    = tcam_pkg::CAM_KEY_W,
  parameter int unsigned SUB_W    = tcam_pkg::BRAM_SUB_W,
  parameter int unsigned ENTRIES  = tcam_pkg::UNIT_ENTRIES,
  parameter int unsigned PRIM_W   = tcam_pkg::BRAM_PRIM_W,
  parameter int unsigned STAGES   = tcam_pkg::BRAM_STAGES,
  parameter bit          USE_BRAM = 1'b1,
  localparam int unsigned NSUB = tcam_pkg::num_sub(KEY_W, SUB_W),
  localparam int unsigned SW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned UW   = (STAGES > 1) ? $clog2(STAGES) : 1,
  localparam int unsigned IW   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned AW   = $clog2(STAGES * ENTRIES),
  localparam int unsigned CW   = $clog2(STAGES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  logic               in_valid,
  input  logic [KEY_W-1:0]   in_key,
  output logic               out_valid,
  output logic               out_hit,
  output logic [AW-1:0]      out_addr,
  output logic [CW-1:0]      out_reads,
  // programming
  input  logic               wr_en,
  input  logic [UW-1:0]      wr_unit,
  input  logic [SW-1:0]      wr_sub,
  input  logic [SUB_W-1:0]   wr_addr,
  input  logic [ENTRIES-1:0] wr_data
);

  // State of a key at the input of each stage (index STAGES = after the last).
  logic             s_valid [STAGES+1];
  logic [KEY_W-1:0] s_key   [STAGES+1];
  logic             s_found [STAGES+1];
  logic [AW-1:0]    s_addr  [STAGES+1];
  logic [CW-1:0]    s_reads [STAGES+1];

  // the input of stage 0 is registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_valid[0] <= 1'b0;
    else        s_valid[0] <= in_valid;
  end
  always_ff @(posedge clk) s_key[0] <= in_key;
  assign s_found[0] = 1'b0;
  assign s_addr[0]  = '0;
  assign s_reads[0] = '0;

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    logic          u_en, u_active, u_hit;
    logic [IW-1:0] u_idx;

    // hierarchical search: search this unit only if no earlier unit matched
    assign u_en = s_valid[s] && !s_found[s];

    tcam_unit #(
      .KEY_W   (KEY_W),
      .SUB_W   (SUB_W),
      .ENTRIES (ENTRIES),
      .PRIM_W  (PRIM_W),
      .USE_BRAM(USE_BRAM)
    ) u_unit (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (u_en),
      .key     (s_key[s]),
      .active  (u_active),
      .hit     (u_hit),
      .idx     (u_idx),
      .wr_en   (wr_en && (wr_unit == UW'(s))),
      .wr_sub  (wr_sub),
      .wr_addr (wr_addr),
      .wr_data (wr_data)
    );

    // the key and its state travel alongside the unit's two-cycle pipeline
    logic             valid_q [2];
    logic [KEY_W-1:0] key_q   [2];
    logic             found_q [2];
    logic [AW-1:0]    addr_q  [2];
    logic [CW-1:0]    reads_q [2];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q <= '{default: 1'b0};
        found_q <= '{default: 1'b0};
      end else begin
        valid_q[0] <= s_valid[s];
        valid_q[1] <= valid_q[0];
        found_q[0] <= s_found[s];
        found_q[1] <= found_q[0];
      end
    end
    always_ff @(posedge clk) begin
      key_q[0]   <= s_key[s];
      key_q[1]   <= key_q[0];
      addr_q[0]  <= s_addr[s];
      addr_q[1]  <= addr_q[0];
      reads_q[0] <= s_reads[s];
      reads_q[1] <= reads_q[0];
    end

    assign s_valid[s+1] = valid_q[1];
    assign s_key[s+1]   = key_q[1];
    assign s_found[s+1] = found_q[1] || u_hit;
    assign s_addr[s+1]  = found_q[1] ? addr_q[1]
                                     : AW'(s * ENTRIES) + AW'(u_idx);
    assign s_reads[s+1] = reads_q[1] + CW'(u_active);

    // a disabled unit never reports a hit, and a key already found never
    // enables a unit
    assert property (@(posedge clk) disable iff (!rst_n) u_hit |-> u_active);
    assert property (@(posedge clk) disable iff (!rst_n) u_active |-> !found_q[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_addr  <= '0;
      out_reads <= '0;
    end else begin
      out_valid <= s_valid[STAGES];
      out_hit   <= s_valid[STAGES] && s_found[STAGES];
      out_addr  <= (s_valid[STAGES] && s_found[STAGES]) ? s_addr[STAGES] : '0;
      out_reads <= s_valid[STAGES] ? s_reads[STAGES] : '0;
    end
  end

endmodule
