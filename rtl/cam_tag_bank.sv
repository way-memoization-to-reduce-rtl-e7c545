// cam_tag_bank: content-addressable tag memory of one cache sub-bank.
//
// Every way of the sub-bank holds a tag and a valid bit. A search compares
// the search tag with all valid entries at once, as a CAM does, and returns
// in the same cycle whether one matched and which way it was (one-hot match
// lines encoded to a way number). A write stores a tag in one way and marks
// it valid; it takes effect at the clock edge. The read port returns the tag
// and valid bit of one way; the cache uses it to read out the tag of the line
// chosen for eviction. Reset clears all valid bits; tags are not reset.
//
// The published scheme gives the CAM's function (search in one cycle, write of one
// way, tag read-out of the victim); the single-match encoder, the separate
// read port and the reset are this design's choices. A tag is never written
// while it is already present, so at most one match line is active.
module cam_tag_bank #(
  parameter int unsigned NWAYS = 64,
  parameter int unsigned TAG_W = 24,
  localparam int unsigned WAY_W = wm_pkg::clog2u(NWAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // search port (combinational)
  input  logic [TAG_W-1:0] search_tag,
  output logic             search_hit,
  output logic [WAY_W-1:0] search_way,
  // write port
  input  logic             wr_en,
  input  logic [WAY_W-1:0] wr_way,
  input  logic [TAG_W-1:0] wr_tag,
  // read-out port (combinational)
  input  logic [WAY_W-1:0] rd_way,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid
);

  logic [TAG_W-1:0] tags  [NWAYS];
  logic [NWAYS-1:0] valid;
  logic [NWAYS-1:0] match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (wr_en) valid[wr_way] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_way] <= wr_tag;
  end

  always_comb begin
    for (int unsigned w = 0; w < NWAYS; w++)
      match[w] = valid[w] && (tags[w] == search_tag);
  end

  always_comb begin
    search_hit = |match;
    search_way = '0;
    for (int unsigned w = 0; w < NWAYS; w++)
      if (match[w]) search_way = search_way | WAY_W'(w);
  end

  assign rd_tag   = tags[rd_way];
  assign rd_valid = valid[rd_way];

  // At most one way may hold a given tag.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("cam_tag_bank: several ways match one tag");

endmodule
