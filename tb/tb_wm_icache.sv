// tb_wm_icache: end-to-end test of the way-memoizing cache at full size.
//
// The cache runs with its default parameters (16 KB, 64-way CAM tags, 8
// sub-banks, 32-byte lines) in front of a behavioural memory whose line
// reads make a miss cost 20 cycles more than a hit. A synthetic fetch stream
// plays the role of a MIPS processor:
//  * code is a set of hot regions; the working set moves between phases so
//    that lines are evicted and links into them must be invalidated;
//  * some odd-numbered words are "delay slots" of branches: after fetching
//    one, the stream takes the branch to a target fixed by the delay slot's
//    address, with a probability; the target is mostly a short backward jump
//    (a loop) and sometimes far away. Only odd words are delay slots, so no
//    instruction pair holds two, as in MIPS code without back-to-back branches;
//  * rarely, an indirect jump goes anywhere.
// Every returned word is compared with the memory's contents for the fetch
// address, so a link that points to a wrong way shows up as a data error.
// Also checked: hit/link fetches take one cycle and misses 1 + 20 cycles;
// each fetch is served by exactly one of intra-line, sequential link, branch
// link or tag search; intra-line fetches are exactly the FK_SEQ fetches with a
// non-zero word offset; a sub-bank stall lasts one cycle and happens on
// roughly one link write in eight (one of 8 sub-banks); link writes come one
// cycle after their search; the E-1 search, the flash clear and the memory
// request come in the second cycle after a miss. Each mechanism of
// the cache must happen at least once. Tag searches per fetch are reported.
module tb_wm_icache;
  import wm_pkg::*;
  import wm_tb_pkg::*;

  localparam int unsigned NFETCH   = 400000;
  localparam int unsigned MEM_LAT  = 11;
  localparam int unsigned MISS_LAT = 1 + 20;   // cycles from accept to response on a miss

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

  wm_mem_model #(.LATENCY(MEM_LAT), .WORDS(8)) u_mem (
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

  // ---------------------------------------------------------------- events
  typedef enum int {
    E_INTRA, E_SEQL, E_BRL, E_SEARCH, E_HIT, E_MISS, E_SEQMADE, E_BRMADE,
    E_OVF, E_STALL, E_VICTIM, E_SEQINV, E_FLASH, E_REFILL, E_NUM
  } ev_e;
  localparam string EV_NAME [E_NUM] = '{"intra_line", "seq_link", "br_link",
    "tag_search", "hit", "miss", "seq_link_made", "br_link_made", "overflow_set",
    "bank_stall", "victim_valid", "seq_inval", "flash_clear", "refill_done"};
  longint cnt [E_NUM];
  int stall_run = 0;

  // Figure-5 timing: cycle numbers of the last tag search and the last miss
  longint cyc = 0, search_cyc = -10, miss_cyc = -10;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // links are written the cycle after the search that found them invalid
    if (ev.seq_link_made || ev.br_link_made)
      check(cyc == search_cyc + 1, "link written other than one cycle after its search");
    // line E-1 search, branch-link flash clear and memory request in miss cycle 2
    if (ev.seq_inval || ev.flash_clear || ev.victim_valid)
      check(cyc == miss_cyc + 2, "victim invalidation other than in miss cycle 2");
    if (mem_req_valid) check(cyc == miss_cyc + 2, "memory request other than in miss cycle 2");
    if (ev.overflow_set) check(ev.hit && req_kind == FK_BRANCH, "overflow bit set outside a branch-target hit");
    if (ev.tag_search) search_cyc = cyc;
    if (ev.miss) miss_cyc = cyc;
    if (ev.intra_line)    cnt[E_INTRA]++;
    if (ev.seq_link)      cnt[E_SEQL]++;
    if (ev.br_link)       cnt[E_BRL]++;
    if (ev.tag_search)    cnt[E_SEARCH]++;
    if (ev.hit)           cnt[E_HIT]++;
    if (ev.miss)          cnt[E_MISS]++;
    if (ev.seq_link_made) cnt[E_SEQMADE]++;
    if (ev.br_link_made)  cnt[E_BRMADE]++;
    if (ev.overflow_set)  cnt[E_OVF]++;
    if (ev.bank_stall)    cnt[E_STALL]++;
    if (ev.victim_valid)  cnt[E_VICTIM]++;
    if (ev.seq_inval)     cnt[E_SEQINV]++;
    if (ev.flash_clear)   cnt[E_FLASH]++;
    if (ev.refill_done)   cnt[E_REFILL]++;
    stall_run = ev.bank_stall ? stall_run + 1 : 0;
    if (ev.bank_stall) check(stall_run == 1, "sub-bank stall longer than one cycle");
  end

  // ---------------------------------------------------------------- stream
  localparam logic [31:0] CODE_BASE = 32'h0040_0000;
  localparam int unsigned REGION_BYTES = 6144;     // hot region of one phase
  localparam int unsigned SPACE_BYTES  = 65536;    // whole program
  localparam int unsigned PHASE_LEN    = 20000;    // fetches per phase

  logic [31:0] region_base;

  function automatic bit is_delay_slot(logic [31:0] pc);
    return pc[2] && (hash32(pc) % 5 == 0);
  endfunction

  function automatic logic [31:0] branch_target(logic [31:0] pc);
    logic [31:0] h = hash32(pc ^ 32'h1234_5678);
    if (h[3:0] < 4'd12)   // short backward loop
      return pc - 32'((h[31:8] % 96) * 4) - 32'd4;
    else                  // far jump inside the program
      return CODE_BASE + 32'((h[31:8] % (SPACE_BYTES / 4)) * 4);
  endfunction

  function automatic bit in_region(logic [31:0] a);
    return a >= region_base && a < region_base + REGION_BYTES;
  endfunction

  initial begin
    repeat (NFETCH * 4 + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pc, nxt;
    fetch_kind_e kind;
    bit prev_valid, miss, exp_intra;
    int lat, n_served;
    longint cycles = 0;
    for (int i = 0; i < E_NUM; i++) cnt[i] = 0;
    req_valid = 0; req_addr = CODE_BASE; req_kind = FK_INDIRECT;
    region_base = CODE_BASE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    pc = CODE_BASE; kind = FK_INDIRECT; prev_valid = 0;
    for (int n = 0; n < NFETCH; n++) begin
      // present the fetch (we are just after a negedge)
      req_valid = 1; req_addr = pc; req_kind = kind;
      #1;
      while (!req_ready) begin
        @(negedge clk); #1;
      end
      exp_intra = prev_valid && kind == FK_SEQ && pc[4:2] != 3'd0;
      check(ev.intra_line == exp_intra, $sformatf("intra-line decision at %h", pc));
      n_served = int'(ev.intra_line) + int'(ev.seq_link) + int'(ev.br_link) + int'(ev.tag_search);
      check(n_served == 1, $sformatf("fetch %h served %0d ways", pc, n_served));
      miss = ev.miss;
      if (kind == FK_INDIRECT) check(!ev.seq_link && !ev.br_link, "link used on indirect fetch");
      // wait for the response
      lat = 0;
      do begin
        @(negedge clk); #1; lat++;
        req_valid = 0;
      end while (!rsp_valid && lat < 200);
      check(rsp_valid, "no response");
      check(lat == (miss ? int'(MISS_LAT) : 1),
            $sformatf("latency %0d (miss=%0d) at %h", lat, miss, pc));
      check(rsp_instr == mem_word(pc), $sformatf("data at %h: %h exp %h", pc, rsp_instr, mem_word(pc)));
      prev_valid = 1;
      // next program counter
      if (n % PHASE_LEN == PHASE_LEN - 1) begin
        region_base = CODE_BASE + 32'(($urandom_range(SPACE_BYTES / REGION_BYTES - 1)) * REGION_BYTES);
        nxt = region_base + 32'($urandom_range(REGION_BYTES / 4 - 1) * 4);
        kind = FK_INDIRECT;
      end else if ($urandom_range(999) == 0) begin
        nxt = region_base + 32'($urandom_range(REGION_BYTES / 4 - 1) * 4);
        kind = FK_INDIRECT;
      end else if (is_delay_slot(pc) && $urandom_range(99) < 70 && in_region(branch_target(pc))) begin
        nxt = branch_target(pc);
        kind = FK_BRANCH;
      end else if (in_region(pc + 4)) begin
        nxt = pc + 4;
        kind = FK_SEQ;
      end else begin
        nxt = region_base;
        kind = FK_INDIRECT;
      end
      // occasionally a far branch leaves the region briefly
      if (kind == FK_SEQ && is_delay_slot(pc) && $urandom_range(99) < 3) begin
        nxt = branch_target(pc);
        kind = FK_BRANCH;
      end
      pc = nxt;
    end
    cycles = longint'($time / 10);

    $display("fetches=%0d cycles=%0d", NFETCH, cycles);
    for (int i = 0; i < E_NUM; i++) begin
      $display("  %-14s %0d", EV_NAME[i], cnt[i]);
      check(cnt[i] > 0, $sformatf("mechanism %s never happened", EV_NAME[i]));
    end
    $display("tag searches per fetch: %0.2f%%  (fetches not intra-line: %0.2f%%)",
             100.0 * cnt[E_SEARCH] / NFETCH, 100.0 * (NFETCH - cnt[E_INTRA]) / NFETCH);
    check(cnt[E_SEARCH] < NFETCH - cnt[E_INTRA], "links removed no tag search");
    // with 8 sub-banks, roughly one link write in eight meets a fetch to its sub-bank
    $display("sub-bank stalls per link write: %0.3f (1/8 = 0.125)",
             real'(cnt[E_STALL]) / real'(cnt[E_SEQMADE] + cnt[E_BRMADE]));
    check(cnt[E_STALL] * 20 > cnt[E_SEQMADE] + cnt[E_BRMADE] &&
          cnt[E_STALL] * 4 < cnt[E_SEQMADE] + cnt[E_BRMADE], "stall rate far from one in eight link writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
