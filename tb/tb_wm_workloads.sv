// tb_wm_workloads: the full-size cache under program profiles of different
// footprints, reporting the figures of merit of way memoization.
//
// Three synthetic MIPS-like programs are run one after the other, each from
// reset: a 4 KB loop kernel that fits in the cache (media-kernel like), a
// 12 KB program that nearly fills it, and a 48 KB program three times the
// cache size with a hot region that drifts (large integer code). Control flow
// is built as in tb_wm_icache: fixed-target branches taken from odd-numbered
// delay slots, short backward loops, some far jumps, no indirect jumps in the
// kernel. For each profile the testbench reports tag searches per fetch, the
// share of fetches that are not intra-line (what a cache without links would
// search), misses, and the share of evictions of a valid line that
// flash-clear all branch links. Checks: every word against memory; for the
// kernel, which evicts nothing, no sequential or branch transition that was
// taken before needs a tag search again (its link must still be valid); in
// every profile links remove tag searches.
module tb_wm_workloads;
  import wm_pkg::*;
  import wm_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid;
  logic [31:0] req_addr, rsp_instr, mem_req_addr, mem_rsp_data;
  fetch_kind_e req_kind;
  logic mem_req_valid, mem_rsp_valid;
  wm_events_t ev;

  wm_icache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_kind,
    .rsp_valid, .rsp_instr, .mem_req_valid, .mem_req_addr,
    .mem_rsp_valid, .mem_rsp_data, .events(ev)
  );

  wm_mem_model #(.LATENCY(11), .WORDS(8)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  longint n_search, n_intra, n_miss, n_victim, n_flash;
  always @(posedge clk) if (rst_n) begin
    if (ev.tag_search)   n_search++;
    if (ev.intra_line)   n_intra++;
    if (ev.miss)         n_miss++;
    if (ev.victim_valid) n_victim++;
    if (ev.flash_clear)  n_flash++;
  end

  localparam logic [31:0] BASE = 32'h0040_0000;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one fetch: present, wait for acceptance and response, check the word
  task automatic fetch(logic [31:0] pc, fetch_kind_e kind, output bit searched);
    int lat = 0;
    req_valid = 1; req_addr = pc; req_kind = kind;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    searched = ev.tag_search;
    do begin
      @(negedge clk); #1; lat++;
      req_valid = 0;
    end while (!rsp_valid && lat < 200);
    check(rsp_valid && rsp_instr == mem_word(pc), $sformatf("data at %h", pc));
  endtask

  // run one program profile from reset
  task automatic run_profile(string name, int unsigned space, int unsigned hot,
                             int unsigned nfetch, int unsigned phase, bit kernel);
    logic [31:0] pc, nxt, region, tgt, h;
    fetch_kind_e kind;
    logic [31:0] prev_pc;
    bit searched;
    bit seen [logic [63:0]];
    longint repeat_search = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    n_search = 0; n_intra = 0; n_miss = 0; n_victim = 0; n_flash = 0;
    rst_n = 1;
    region = BASE; pc = BASE; kind = FK_INDIRECT;
    for (int unsigned n = 0; n < nfetch; n++) begin
      fetch(pc, kind, searched);
      // a control-flow edge taken before must find its link valid
      if (n > 0 && kind != FK_INDIRECT) begin
        if (seen.exists({prev_pc, pc}) && searched) repeat_search++;
        seen[{prev_pc, pc}] = 1;
      end
      prev_pc = pc;
      if (phase != 0 && n % phase == phase - 1) begin
        region = BASE + 32'(($urandom_range(space / hot - 1)) * hot);
        nxt = region; kind = FK_INDIRECT;
      end else begin
        h = hash32(pc ^ 32'h1234_5678);
        tgt = (h[3:0] < 4'd12) ? pc - 32'((h[31:8] % 96) * 4) - 32'd4
                               : region + 32'((h[31:8] % (hot / 4)) * 4);
        if (pc[2] && hash32(pc) % 5 == 0 && $urandom_range(99) < 70 &&
            tgt >= region && tgt < region + hot) begin
          nxt = tgt; kind = FK_BRANCH;
        end else if (pc + 4 < region + hot) begin
          nxt = pc + 4; kind = FK_SEQ;
        end else begin
          // wrap to the top of the region
          nxt = region; kind = FK_INDIRECT;
        end
      end
      pc = nxt;
    end
    $display("%-8s footprint %0d B: fetches %0d, tag searches %0.2f%%, not intra-line %0.2f%%, misses %0d, flash clears on %0.1f%% of %0d evictions",
             name, hot, nfetch, 100.0 * n_search / nfetch, 100.0 * (nfetch - n_intra) / nfetch,
             n_miss, n_victim ? 100.0 * n_flash / n_victim : 0.0, n_victim);
    check(n_search < nfetch - n_intra, {name, ": links removed no tag search"});
    if (kernel) begin
      check(n_victim == 0, {name, ": kernel evicted lines"});
      check(repeat_search == 0, $sformatf("%s: %0d tag searches on edges taken before", name, repeat_search));
    end
  endtask

  initial begin
    req_valid = 0; req_addr = BASE; req_kind = FK_INDIRECT;
    repeat (2) @(negedge clk);
    run_profile("kernel", 4096, 4096, 100000, 0, 1);
    run_profile("medium", 12288, 12288, 150000, 0, 0);
    run_profile("large", 49152, 8192, 250000, 25000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
