// cam_tag_array: the CAM tags of all sub-banks of the cache.
//
// One cam_tag_bank per sub-bank (one set each). The cache performs at most
// one tag search, one tag write and one tag read-out per cycle, each in a
// sub-bank named by its own bank input; the inputs of the other sub-banks are
// not enabled and their results are not selected. A search and a read-out
// are combinational, a write takes effect at the clock edge.
//
// Sub-banks of one set each follow from the published geometry (16 KB,
// 32-byte lines, 64 ways, 8 sub-banks); the single shared search/write/read
// ports are this design's choice.
module cam_tag_array #(
  parameter int unsigned NSETS = 8,
  parameter int unsigned NWAYS = 64,
  parameter int unsigned TAG_W = 24,
  localparam int unsigned WAY_W = wm_pkg::clog2u(NWAYS),
  localparam int unsigned SET_W = wm_pkg::clog2u(NSETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] search_bank,
  input  logic [TAG_W-1:0] search_tag,
  output logic             search_hit,
  output logic [WAY_W-1:0] search_way,
  input  logic             wr_en,
  input  logic [SET_W-1:0] wr_bank,
  input  logic [WAY_W-1:0] wr_way,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic [SET_W-1:0] rd_bank,
  input  logic [WAY_W-1:0] rd_way,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid
);

  logic             hit_b   [NSETS];
  logic [WAY_W-1:0] way_b   [NSETS];
  logic [TAG_W-1:0] rtag_b  [NSETS];
  logic             rval_b  [NSETS];

  for (genvar b = 0; b < NSETS; b++) begin : g_bank
    cam_tag_bank #(.NWAYS(NWAYS), .TAG_W(TAG_W)) u_bank (
      .clk        (clk),
      .rst_n      (rst_n),
      .search_tag (search_tag),
      .search_hit (hit_b[b]),
      .search_way (way_b[b]),
      .wr_en      (wr_en && (wr_bank == SET_W'(b))),
      .wr_way     (wr_way),
      .wr_tag     (wr_tag),
      .rd_way     (rd_way),
      .rd_tag     (rtag_b[b]),
      .rd_valid   (rval_b[b])
    );
  end

  assign search_hit = hit_b[search_bank];
  assign search_way = way_b[search_bank];
  assign rd_tag     = rtag_b[rd_bank];
  assign rd_valid   = rval_b[rd_bank];

endmodule
