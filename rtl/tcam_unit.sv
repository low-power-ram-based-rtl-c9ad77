// tcam_unit: one RAM-based TCAM unit, i.e. one level of the search hierarchy.
//
// The unit holds ENTRIES ternary entries of KEY_W bits. The key is cut into
// NSUB = ceil(KEY_W / SUB_W) sub-keys; sub-key j = key[j*SUB_W +: SUB_W] (a key
// that is not a multiple of SUB_W is padded with zeros at the top). Sub-key j
// addresses RAM j, a 2^SUB_W x ENTRIES memory in which bit n of word a is 1
// when entry n accepts value a in that slice of the key, taking its don't-care
// bits into account. The AND of the NSUB words read out is the match vector;
// a priority encoder picks the lowest-numbered matching entry.
//
// RAM j is built from ENTRIES / PRIM_W primitives placed side by side:
//   USE_BRAM = 1 : bram_sdp primitives (512 x 72 for SUB_W = 9), read enable
//                  = `en`, synchronous read.
//   USE_BRAM = 0 : lutram_dp primitives (32 x 6 for SUB_W = 5), asynchronous
//                  read captured in a register clock-enabled by `en`.
// Either way the RAM read of a unit that is not enabled does not happen, which
// is the power saving of the hierarchical search; a disabled search reports no
// hit.
//
// Programming: a write stores `wr_data` (one bit per entry) at word `wr_addr`
// of sub-key RAM `wr_sub`. Working out those words from a rule is left to the
// host (see the top level).
//
// Timing: `en` and `key` are sampled at edge 0; RAM data are there after edge 0;
// the match is encoded and registered at edge 1, so `hit`, `idx` and `active`
// are valid two cycles after the key. One key per cycle.
// The split into sub-key RAMs, the AND of their words and the priority
// encoder follow the usual RAM-based TCAM emulation; the two-register pipeline,
// the write port and the sub-key order are this design's choices.
module tcam_unit
#(
  parameter int unsigned KEY_W   = tcam_pkg::CAM_KEY_W,
  parameter int unsigned SUB_W   = tcam_pkg::BRAM_SUB_W,
  parameter int unsigned ENTRIES = tcam_pkg::UNIT_ENTRIES,
  parameter int unsigned PRIM_W  = tcam_pkg::BRAM_PRIM_W,
  parameter bit          USE_BRAM = 1'b1,
  localparam int unsigned NSUB = tcam_pkg::num_sub(KEY_W, SUB_W),
  localparam int unsigned SW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned IW   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  logic               en,
  input  logic [KEY_W-1:0]   key,
  output logic               active,  // this unit read its RAMs for the key
  output logic               hit,
  output logic [IW-1:0]      idx,
  // programming
  input  logic               wr_en,
  input  logic [SW-1:0]      wr_sub,
  input  logic [SUB_W-1:0]   wr_addr,
  input  logic [ENTRIES-1:0] wr_data
);

  localparam int unsigned NPRIM = ENTRIES / PRIM_W;

  initial begin
    assert (ENTRIES % PRIM_W == 0)
      else $error("ENTRIES must be a multiple of PRIM_W");
  end

  logic [NSUB*SUB_W-1:0] key_pad;
  assign key_pad = (NSUB*SUB_W)'(key);

  logic [ENTRIES-1:0] word [NSUB];   // RAM words, valid the cycle after `en`
  logic               en_q;

  for (genvar j = 0; j < int'(NSUB); j++) begin : g_sub
    logic sel;
    assign sel = wr_en && (wr_sub == SW'(j));
    for (genvar p = 0; p < int'(NPRIM); p++) begin : g_prim
      if (USE_BRAM) begin : g_bram
        bram_sdp #(.DEPTH(2**SUB_W), .WIDTH(PRIM_W)) u_ram (
          .clk   (clk),
          .we    (sel),
          .waddr (wr_addr),
          .wdata (wr_data[p*PRIM_W +: PRIM_W]),
          .re    (en),
          .raddr (key_pad[j*SUB_W +: SUB_W]),
          .rdata (word[j][p*PRIM_W +: PRIM_W])
        );
      end else begin : g_lut
        logic [PRIM_W-1:0] rd;
        lutram_dp #(.DEPTH(2**SUB_W), .WIDTH(PRIM_W)) u_ram (
          .clk   (clk),
          .we    (sel),
          .waddr (wr_addr),
          .wdata (wr_data[p*PRIM_W +: PRIM_W]),
          .raddr (key_pad[j*SUB_W +: SUB_W]),
          .rdata (rd)
        );
        logic [PRIM_W-1:0] rd_q;
        always_ff @(posedge clk) begin
          if (en) rd_q <= rd;
        end
        assign word[j][p*PRIM_W +: PRIM_W] = rd_q;
      end
    end
  end

  // AND of all sub-key words, masked when the unit did not read
  logic [ENTRIES-1:0] match_vec;
  always_comb begin
    match_vec = {ENTRIES{en_q}};
    for (int j = 0; j < int'(NSUB); j++) match_vec &= word[j];
  end

  logic          pe_hit;
  logic [IW-1:0] pe_idx;
  prio_enc #(.N(ENTRIES)) u_pe (.req(match_vec), .hit(pe_hit), .idx(pe_idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q   <= 1'b0;
      active <= 1'b0;
      hit    <= 1'b0;
      idx    <= '0;
    end else begin
      en_q   <= en;
      active <= en_q;
      hit    <= pe_hit;
      idx    <= pe_idx;
    end
  end

  // a write must name an existing sub-key RAM
  assert property (@(posedge clk) wr_en |-> int'(wr_sub) < int'(NSUB));

endmodule
