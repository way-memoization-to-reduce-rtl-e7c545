// tb_cam_tag_array: self-checking test of the sub-banked CAM tag store.
//
// The same tag is written into different sub-banks at different ways, so a
// search must return the way of the selected sub-bank only. A reference
// model of all sub-banks checks search, read-out and write steering over
// random operations. Runs at the default 8 sub-banks x 64 ways.
module tb_cam_tag_array;
  localparam int unsigned NSETS = 8, NWAYS = 64, TAG_W = 24;
  localparam int unsigned SET_W = 3, WAY_W = 6;

  logic clk = 0, rst_n = 0;
  logic [SET_W-1:0] search_bank, wr_bank, rd_bank;
  logic [TAG_W-1:0] search_tag, wr_tag, rd_tag;
  logic [WAY_W-1:0] search_way, wr_way, rd_way;
  logic search_hit, wr_en, rd_valid;
  int checks = 0, failures = 0;

  cam_tag_array dut (.*);
  always #5 clk = ~clk;

  logic [TAG_W-1:0] ref_tag [NSETS][NWAYS];
  logic             ref_v   [NSETS][NWAYS];

  function automatic bit present(int b, logic [TAG_W-1:0] t, output int w);
    for (int i = 0; i < NWAYS; i++) if (ref_v[b][i] && ref_tag[b][i] == t) begin w = i; return 1; end
    w = -1; return 0;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, ew; bit eh;
    for (int b = 0; b < NSETS; b++) for (int i = 0; i < NWAYS; i++) ref_v[b][i] = 0;
    wr_en = 0; wr_bank = 0; wr_way = 0; wr_tag = 0;
    search_bank = 0; search_tag = 0; rd_bank = 0; rd_way = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      search_bank = SET_W'($urandom_range(NSETS - 1));
      search_tag  = TAG_W'($urandom_range(127));
      rd_bank     = SET_W'($urandom_range(NSETS - 1));
      rd_way      = WAY_W'($urandom_range(NWAYS - 1));
      #1;
      eh = present(int'(search_bank), search_tag, ew);
      check(search_hit == eh, "hit");
      if (eh) check(search_way == WAY_W'(ew), "way");
      check(rd_valid == ref_v[rd_bank][rd_way], "rd_valid");
      if (ref_v[rd_bank][rd_way]) check(rd_tag == ref_tag[rd_bank][rd_way], "rd_tag");
      wr_en = 1'($urandom_range(1));
      if (wr_en) begin
        wr_bank = SET_W'($urandom_range(NSETS - 1));
        wr_way  = WAY_W'($urandom_range(NWAYS - 1));
        do wr_tag = TAG_W'($urandom_range(127));
        while (present(int'(wr_bank), wr_tag, w) && w != int'(wr_way));
      end
      @(posedge clk); #1;
      if (wr_en) begin ref_tag[wr_bank][wr_way] = wr_tag; ref_v[wr_bank][wr_way] = 1; end
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
