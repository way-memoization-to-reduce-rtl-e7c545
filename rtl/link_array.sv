// link_array: way-memoization state kept beside the tags and the words.
//
// Per cache line (sub-bank, way) it holds a sequential link - a valid bit and
// the way of the next line in the following sub-bank - and an overflow bit,
// set when a branch link to this line is created (zero-link invalidation).
// Per pair of instruction words it holds a branch link: a valid bit and the
// way holding the branch target. Links hold only a way; the set and word come
// from the fetch address, so a valid link names a unique cache location.
//
// Read ports are combinational. The fetch port returns the sequential link of
// a line and the branch link of one word pair; as in the low-energy design,
// a way field is read out only when its valid bit is set (it reads as zero
// otherwise). The victim port returns the overflow bit of a line.
// Update ports act at the clock edge: link write (sets a sequential or branch
// link valid with a way), sequential-link clear, overflow set, line reset on
// refill (all links of the line invalid, overflow bit loaded) and flash clear
// of every branch-link valid bit in the cache. Flash clear wins over a
// refill reset and a link write; a refill reset wins over the other writes
// to the same line. Reset clears all valid and overflow bits.
//
// The fields and their placement follow the published scheme (one sequential link
// and one overflow bit per line, one branch link per instruction pair); the
// port set and priorities are this design's choices. NSETS, NWAYS and
// WORDS_PER_LINE must be powers of two (line number = {sub-bank, way}).
module link_array #(
  parameter int unsigned NSETS          = 8,
  parameter int unsigned NWAYS          = 64,
  parameter int unsigned WORDS_PER_LINE = 8,
  localparam int unsigned SET_W  = wm_pkg::clog2u(NSETS),
  localparam int unsigned WAY_W  = wm_pkg::clog2u(NWAYS),
  localparam int unsigned PAIRS  = WORDS_PER_LINE / 2,
  localparam int unsigned PAIR_W = wm_pkg::clog2u(PAIRS),
  localparam int unsigned NLINES = NSETS * NWAYS
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch read-out
  input  logic [SET_W-1:0]  rd_bank,
  input  logic [WAY_W-1:0]  rd_way,
  input  logic [PAIR_W-1:0] rd_pair,
  output logic              rd_seq_valid,
  output logic [WAY_W-1:0]  rd_seq_way,
  output logic              rd_br_valid,
  output logic [WAY_W-1:0]  rd_br_way,
  // victim read-out
  input  logic [SET_W-1:0]  vic_bank,
  input  logic [WAY_W-1:0]  vic_way,
  output logic              vic_overflow,
  // link write
  input  logic              lw_en,
  input  logic              lw_is_branch,
  input  logic [SET_W-1:0]  lw_bank,
  input  logic [WAY_W-1:0]  lw_way,
  input  logic [PAIR_W-1:0] lw_pair,
  input  logic [WAY_W-1:0]  lw_target_way,
  // sequential link clear
  input  logic              sc_en,
  input  logic [SET_W-1:0]  sc_bank,
  input  logic [WAY_W-1:0]  sc_way,
  // overflow bit set
  input  logic              os_en,
  input  logic [SET_W-1:0]  os_bank,
  input  logic [WAY_W-1:0]  os_way,
  // refill: reset the links of a line, load its overflow bit
  input  logic              fill_en,
  input  logic [SET_W-1:0]  fill_bank,
  input  logic [WAY_W-1:0]  fill_way,
  input  logic              fill_overflow,
  // flash clear of all branch-link valid bits
  input  logic              flash_clr
);

  logic [NLINES-1:0]       seq_v;
  logic [WAY_W-1:0]        seq_way [NLINES];
  logic [NLINES-1:0]       ovf;
  logic [NLINES*PAIRS-1:0] br_v;
  logic [WAY_W-1:0]        br_way  [NLINES*PAIRS];

  // line number = {sub-bank, way}; pair number = {line, pair}
  typedef logic [SET_W+WAY_W-1:0]        line_t;
  typedef logic [SET_W+WAY_W+PAIR_W-1:0] pair_t;

  line_t rd_l, vic_l, lw_l, sc_l, os_l, fill_l;
  assign rd_l   = {rd_bank, rd_way};
  assign vic_l  = {vic_bank, vic_way};
  assign lw_l   = {lw_bank, lw_way};
  assign sc_l   = {sc_bank, sc_way};
  assign os_l   = {os_bank, os_way};
  assign fill_l = {fill_bank, fill_way};

  // valid and overflow bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_v <= '0;
      ovf   <= '0;
      br_v  <= '0;
    end else begin
      if (lw_en && !lw_is_branch) seq_v[lw_l] <= 1'b1;
      if (lw_en &&  lw_is_branch) br_v[{lw_l, lw_pair}] <= 1'b1;
      if (sc_en) seq_v[sc_l] <= 1'b0;
      if (os_en) ovf[os_l] <= 1'b1;
      if (fill_en) begin
        seq_v[fill_l] <= 1'b0;
        ovf[fill_l]   <= fill_overflow;
        for (int unsigned p = 0; p < PAIRS; p++) br_v[{fill_l, PAIR_W'(p)}] <= 1'b0;
      end
      if (flash_clr) br_v <= '0;
    end
  end

  // way fields
  always_ff @(posedge clk) begin
    if (lw_en && !lw_is_branch) seq_way[lw_l] <= lw_target_way;
    if (lw_en &&  lw_is_branch) br_way[{lw_l, lw_pair}] <= lw_target_way;
  end

  // read-out, way fields gated by their valid bits
  always_comb begin
    rd_seq_valid = seq_v[rd_l];
    rd_seq_way   = rd_seq_valid ? seq_way[rd_l] : '0;
    rd_br_valid  = br_v[{rd_l, rd_pair}];
    rd_br_way    = rd_br_valid ? br_way[{rd_l, rd_pair}] : '0;
    vic_overflow = ovf[vic_l];
  end

endmodule
