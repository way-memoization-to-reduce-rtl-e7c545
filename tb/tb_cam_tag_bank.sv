// tb_cam_tag_bank: self-checking test of one CAM tag sub-bank.
//
// A reference copy of tags and valid bits is kept in the testbench. Random
// writes store tags that are unique within the sub-bank (a rewritten way
// first gives up its old tag); random searches use present tags, absent tags
// and tags of ways not yet written; the read-out port is checked at a random
// way each cycle. Search results are combinational and checked in the same
// cycle. Runs at the default 64 ways.
module tb_cam_tag_bank;
  localparam int unsigned NWAYS = 64;
  localparam int unsigned TAG_W = 24;
  localparam int unsigned WAY_W = 6;

  logic clk = 0, rst_n = 0;
  logic [TAG_W-1:0] search_tag, wr_tag, rd_tag;
  logic search_hit, wr_en, rd_valid;
  logic [WAY_W-1:0] search_way, wr_way, rd_way;
  int checks = 0, failures = 0;

  cam_tag_bank dut (.*);

  always #5 clk = ~clk;

  logic [TAG_W-1:0] ref_tag [NWAYS];
  logic             ref_v   [NWAYS];

  function automatic bit present(logic [TAG_W-1:0] t, output int w);
    for (int i = 0; i < NWAYS; i++) if (ref_v[i] && ref_tag[i] == t) begin w = i; return 1; end
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
    int w, exp_w;
    bit exp_hit;
    for (int i = 0; i < NWAYS; i++) ref_v[i] = 0;
    wr_en = 0; wr_way = 0; wr_tag = 0; search_tag = 0; rd_way = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // after reset nothing matches
    search_tag = 0; #1;
    check(!search_hit, "hit after reset");
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      // search
      case ($urandom_range(2))
        0: begin
             w = $urandom_range(NWAYS - 1);
             search_tag = ref_v[w] ? ref_tag[w] : TAG_W'($urandom);
           end
        1: search_tag = TAG_W'($urandom_range(63));   // small tag space: frequent hits
        default: search_tag = TAG_W'($urandom);
      endcase
      rd_way = WAY_W'($urandom_range(NWAYS - 1));
      #1;
      exp_hit = present(search_tag, exp_w);
      check(search_hit == exp_hit, $sformatf("hit tag=%h", search_tag));
      if (exp_hit) check(search_way == WAY_W'(exp_w), $sformatf("way tag=%h got %0d exp %0d", search_tag, search_way, exp_w));
      check(rd_valid == ref_v[rd_way], "rd_valid");
      if (ref_v[rd_way]) check(rd_tag == ref_tag[rd_way], "rd_tag");
      // write a unique tag
      wr_en = $urandom_range(3) == 0;
      if (wr_en) begin
        wr_way = WAY_W'($urandom_range(NWAYS - 1));
        do wr_tag = TAG_W'($urandom_range(63)); while (present(wr_tag, w) && w != int'(wr_way));
      end
      @(posedge clk); #1;
      if (wr_en) begin ref_tag[wr_way] = wr_tag; ref_v[wr_way] = 1; end
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
