// wm_icache: zero-link way-memoizing instruction cache with CAM tags.
//
// The cache keeps, next to its tags and instruction words, "links": the way
// in which the next instruction is found, plus a valid bit that guarantees the
// link is correct. A fetch that can follow a valid link reads the one word
// directly, with no CAM tag search. Each line has a sequential link to the
// way of the following line (used when fetch runs sequentially off the end of
// the line); each pair of instruction words has a branch link to the way of
// the taken-branch target. Sequential fetch inside a line needs neither.
//
// Fetch port. The processor presents req_addr with req_kind: FK_SEQ (address
// is the previous one + 4), FK_BRANCH (fixed target of a taken branch or jump)
// or FK_INDIRECT (any other target; no link is used or made). A request is
// taken when req_valid && req_ready; its word appears on rsp_instr with
// rsp_valid one cycle later on a hit or a link, or one cycle after the last
// refill beat on a miss. The next request may be presented in the cycle in
// which rsp_valid is high. The link consulted for FK_BRANCH is the branch link
// of the word pair of the previously fetched instruction (in MIPS code that is
// the branch's delay slot; since branches are never back-to-back, at most one
// word of a pair is a delay slot, so one link per pair suffices). A given
// previous instruction must always branch to the same target.
//
// Fetch cases, with cycle 0 the cycle the request is taken:
//  * intra-line sequential (FK_SEQ, word offset not 0): read the word from the
//    previous fetch's way, no search.
//  * valid link: read the word from the linked way, no search.
//  * invalid link, hit: CAM search and word read in cycle 0; for FK_BRANCH the
//    overflow bit of the target line is set in cycle 0; in cycle 1 the link
//    of the referencing instruction is written. If the cycle-1 fetch is in the
//    sub-bank being written, req_ready is low for that one cycle.
//  * invalid link, miss: cycle 0 search misses and the FIFO victim way E of the
//    sub-bank is chosen; cycle 1 reads out E's tag and overflow bit and writes
//    the referencing link (pointing to the way the new line will occupy);
//    cycle 2 searches the CAM for line E-1 and clears its sequential link, and
//    flash-clears every branch link if E's overflow bit was set; the line is
//    then requested from memory (mem_req_valid pulse with the line address) and
//    WORDS_PER_LINE words are accepted on mem_rsp_valid, in order from word 0.
//    After the last word the tag is written and the line's links are reset;
//    its overflow bit is set if the link made to it was a branch link.
//
// The link structure, the zero-link invalidation scheme, the FIFO policy and
// the cycle sequence of the three fetch cases follow the published scheme. The fetch
// and memory handshakes, the word order of a refill, the one-entry pending
// link write and the event outputs are this design's choices.
module wm_icache
  import wm_pkg::*;
#(
  parameter int unsigned NSETS          = 8,
  parameter int unsigned NWAYS          = 64,
  parameter int unsigned WORDS_PER_LINE = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch request
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [ADDR_W-1:0]   req_addr,
  input  fetch_kind_e         req_kind,
  // fetch response
  output logic                rsp_valid,
  output logic [INSTR_W-1:0]  rsp_instr,
  // secondary memory
  output logic                mem_req_valid,
  output logic [ADDR_W-1:0]   mem_req_addr,
  input  logic                mem_rsp_valid,
  input  logic [INSTR_W-1:0]  mem_rsp_data,
  // event strobes
  output wm_events_t          events
);

  localparam int unsigned SET_W  = clog2u(NSETS);
  localparam int unsigned WAY_W  = clog2u(NWAYS);
  localparam int unsigned WORD_W = clog2u(WORDS_PER_LINE);
  localparam int unsigned PAIR_W = clog2u(WORDS_PER_LINE / 2);
  localparam int unsigned LSB_SET = 2 + WORD_W;
  localparam int unsigned LSB_TAG = LSB_SET + SET_W;
  localparam int unsigned TAG_W  = ADDR_W - LSB_TAG;
  localparam int unsigned LINE_W = ADDR_W - LSB_SET;   // line number width

  typedef enum logic [2:0] {
    ST_RUN, ST_MISS_RD, ST_MISS_INV, ST_REFILL
  } state_e;

  state_e state;

  // ---------------------------------------------------------------- fields
  logic [WORD_W-1:0] req_word;
  logic [SET_W-1:0]  req_set;
  logic [TAG_W-1:0]  req_tag;
  assign req_word = req_addr[2 +: WORD_W];
  assign req_set  = req_addr[LSB_SET +: SET_W];
  assign req_tag  = req_addr[LSB_TAG +: TAG_W];

  // ------------------------------------------------- previous fetch (state)
  logic               prev_valid;
  logic [ADDR_W-1:0]  prev_addr;
  logic [SET_W-1:0]   prev_bank;
  logic [WAY_W-1:0]   prev_way;
  logic               prev_seq_v, prev_br_v;
  logic [WAY_W-1:0]   prev_seq_way, prev_br_way;
  logic [PAIR_W-1:0]  prev_pair;
  assign prev_pair = PAIR_W'(prev_addr[2 +: WORD_W] >> 1);

  // ------------------------------------------------- pending link write
  logic               pend_v, pend_br;
  logic [SET_W-1:0]   pend_bank;
  logic [WAY_W-1:0]   pend_way, pend_target;
  logic [PAIR_W-1:0]  pend_pair;

  // ------------------------------------------------- miss bookkeeping
  logic [ADDR_W-1:0]  m_addr;
  logic               m_br;
  logic [WAY_W-1:0]   m_vway;
  logic [TAG_W-1:0]   e_tag;
  logic               e_valid, e_ovf;
  logic [WORD_W-1:0]  beat;
  logic [INSTR_W-1:0] fill_word;
  logic               rsp_from_fill;
  logic [SET_W-1:0]   m_set;
  logic [TAG_W-1:0]   m_tag;
  assign m_set = m_addr[LSB_SET +: SET_W];
  assign m_tag = m_addr[LSB_TAG +: TAG_W];

  // line E-1: the line before the evicted line E
  logic [LINE_W-1:0]  e_prev_line;
  logic [SET_W-1:0]   e1_set;
  logic [TAG_W-1:0]   e1_tag;
  assign e_prev_line = {e_tag, m_set} - 1'b1;
  assign e1_set      = e_prev_line[SET_W-1:0];
  assign e1_tag      = e_prev_line[LINE_W-1:SET_W];

  // ------------------------------------------------- array connections
  logic              cam_hit;
  logic [WAY_W-1:0]  cam_way;
  logic [SET_W-1:0]  cam_sbank;
  logic [TAG_W-1:0]  cam_stag;
  logic              cam_we;
  logic [TAG_W-1:0]  cam_rtag;
  logic              cam_rvalid;
  logic [WAY_W-1:0]  fifo_way;
  logic              fifo_adv;
  logic              la_seq_v, la_br_v, la_vic_ovf;
  logic [WAY_W-1:0]  la_seq_way, la_br_way;
  logic              os_en, sc_en, fill_en, flash_clr;
  logic [INSTR_W-1:0] data_rd;
  logic              last_beat;

  // ------------------------------------------------- fetch decision (cycle 0)
  logic bank_conflict, accept, intra, use_seq, use_br, link_ok, do_search;
  logic fetch_ok, miss_now;
  logic [WAY_W-1:0] link_way, fetch_way;

  always_comb begin
    bank_conflict = pend_v && (req_set == pend_bank);
    req_ready     = (state == ST_RUN) && !bank_conflict;
    accept        = req_valid && req_ready;
    intra         = prev_valid && (req_kind == FK_SEQ) && (req_word != '0);
    use_seq       = prev_valid && (req_kind == FK_SEQ) && (req_word == '0);
    use_br        = prev_valid && (req_kind == FK_BRANCH);
    link_ok       = (use_seq && prev_seq_v) || (use_br && prev_br_v);
    link_way      = use_seq ? prev_seq_way : prev_br_way;
    do_search     = accept && !intra && !link_ok;
    fetch_way     = intra ? prev_way : (link_ok ? link_way : cam_way);
    fetch_ok      = accept && (intra || link_ok || cam_hit);
    miss_now      = do_search && !cam_hit;
  end

  assign cam_sbank = (state == ST_MISS_INV) ? e1_set : req_set;
  assign cam_stag  = (state == ST_MISS_INV) ? e1_tag : req_tag;
  assign last_beat = (state == ST_REFILL) && mem_rsp_valid &&
                     (int'(beat) == WORDS_PER_LINE - 1);
  assign cam_we    = last_beat;
  assign fill_en   = last_beat;
  assign fifo_adv  = (state == ST_MISS_RD);
  assign os_en     = do_search && cam_hit && use_br;
  assign sc_en     = (state == ST_MISS_INV) && e_valid && cam_hit;
  assign flash_clr = (state == ST_MISS_INV) && e_valid && e_ovf;

  cam_tag_array #(.NSETS(NSETS), .NWAYS(NWAYS), .TAG_W(TAG_W)) u_cam (
    .clk, .rst_n,
    .search_bank (cam_sbank),
    .search_tag  (cam_stag),
    .search_hit  (cam_hit),
    .search_way  (cam_way),
    .wr_en       (cam_we),
    .wr_bank     (m_set),
    .wr_way      (m_vway),
    .wr_tag      (m_tag),
    .rd_bank     (m_set),
    .rd_way      (m_vway),
    .rd_tag      (cam_rtag),
    .rd_valid    (cam_rvalid)
  );

  icache_data_array #(.NSETS(NSETS), .NWAYS(NWAYS), .WORDS_PER_LINE(WORDS_PER_LINE)) u_data (
    .clk,
    .rd_en   (fetch_ok),
    .rd_bank (req_set),
    .rd_way  (fetch_way),
    .rd_word (req_word),
    .rd_data (data_rd),
    .wr_en   ((state == ST_REFILL) && mem_rsp_valid),
    .wr_bank (m_set),
    .wr_way  (m_vway),
    .wr_word (beat),
    .wr_data (mem_rsp_data)
  );

  link_array #(.NSETS(NSETS), .NWAYS(NWAYS), .WORDS_PER_LINE(WORDS_PER_LINE)) u_links (
    .clk, .rst_n,
    .rd_bank       (req_set),
    .rd_way        (fetch_way),
    .rd_pair       (PAIR_W'(req_word >> 1)),
    .rd_seq_valid  (la_seq_v),
    .rd_seq_way    (la_seq_way),
    .rd_br_valid   (la_br_v),
    .rd_br_way     (la_br_way),
    .vic_bank      (m_set),
    .vic_way       (m_vway),
    .vic_overflow  (la_vic_ovf),
    .lw_en         (pend_v),
    .lw_is_branch  (pend_br),
    .lw_bank       (pend_bank),
    .lw_way        (pend_way),
    .lw_pair       (pend_pair),
    .lw_target_way (pend_target),
    .sc_en         (sc_en),
    .sc_bank       (e1_set),
    .sc_way        (cam_way),
    .os_en         (os_en),
    .os_bank       (req_set),
    .os_way        (cam_way),
    .fill_en       (fill_en),
    .fill_bank     (m_set),
    .fill_way      (m_vway),
    .fill_overflow (m_br),
    .flash_clr     (flash_clr)
  );

  fifo_repl #(.NSETS(NSETS), .NWAYS(NWAYS)) u_fifo (
    .clk, .rst_n,
    .bank       ((state == ST_RUN) ? req_set : m_set),
    .victim_way (fifo_way),
    .advance    (fifo_adv)
  );

  // ------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_RUN;
      prev_valid    <= 1'b0;
      prev_seq_v    <= 1'b0;
      prev_br_v     <= 1'b0;
      pend_v        <= 1'b0;
      rsp_valid     <= 1'b0;
      rsp_from_fill <= 1'b0;
      beat          <= '0;
      e_valid       <= 1'b0;
      e_ovf         <= 1'b0;
      e_tag         <= '0;
      prev_addr     <= '0;
      prev_bank     <= '0;
      prev_way      <= '0;
      prev_seq_way  <= '0;
      prev_br_way   <= '0;
      pend_br       <= 1'b0;
      pend_bank     <= '0;
      pend_way      <= '0;
      pend_pair     <= '0;
      pend_target   <= '0;
      m_addr        <= '0;
      m_br          <= 1'b0;
      m_vway        <= '0;
      fill_word     <= '0;
    end else begin
      rsp_valid <= 1'b0;
      pend_v    <= 1'b0;   // a pending link write always completes in one cycle
      unique case (state)
        ST_RUN: begin
          if (fetch_ok) begin
            rsp_valid     <= 1'b1;
            rsp_from_fill <= 1'b0;
            prev_valid    <= 1'b1;
            prev_addr     <= req_addr;
            prev_bank     <= req_set;
            prev_way      <= fetch_way;
            prev_br_v     <= la_br_v;
            prev_br_way   <= la_br_way;
            if (!intra) begin   // sequential link is read out on a new line only
              prev_seq_v   <= la_seq_v;
              prev_seq_way <= la_seq_way;
            end
          end
          if (do_search && (use_seq || use_br)) begin
            pend_v      <= 1'b1;
            pend_br     <= use_br;
            pend_bank   <= prev_bank;
            pend_way    <= prev_way;
            pend_pair   <= prev_pair;
            pend_target <= cam_hit ? cam_way : fifo_way;
          end
          if (miss_now) begin
            state  <= ST_MISS_RD;
            m_addr <= req_addr;
            m_br   <= use_br;
            m_vway <= fifo_way;
          end
        end
        ST_MISS_RD: begin       // cycle 1: read out victim E
          e_tag   <= cam_rtag;
          e_valid <= cam_rvalid;
          e_ovf   <= la_vic_ovf;
          state   <= ST_MISS_INV;
        end
        ST_MISS_INV: begin      // cycle 2: invalidate links to E, request line
          beat  <= '0;
          state <= ST_REFILL;
        end
        ST_REFILL: begin
          if (mem_rsp_valid) begin
            beat <= beat + 1'b1;
            if (beat == m_addr[2 +: WORD_W]) fill_word <= mem_rsp_data;
            if (last_beat) begin
              state         <= ST_RUN;
              rsp_valid     <= 1'b1;
              rsp_from_fill <= 1'b1;
              prev_valid    <= 1'b1;
              prev_addr     <= m_addr;
              prev_bank     <= m_set;
              prev_way      <= m_vway;
              prev_seq_v    <= 1'b0;
              prev_br_v     <= 1'b0;
            end
          end
        end
        default: state <= ST_RUN;
      endcase
    end
  end

  assign rsp_instr     = rsp_from_fill ? fill_word : data_rd;
  assign mem_req_valid = (state == ST_MISS_INV);
  assign mem_req_addr  = {m_addr[ADDR_W-1:LSB_SET], LSB_SET'(0)};

  always_comb begin
    events               = '0;
    events.intra_line    = accept && intra;
    events.seq_link      = accept && use_seq && prev_seq_v;
    events.br_link       = accept && use_br && prev_br_v;
    events.tag_search    = do_search;
    events.hit           = do_search && cam_hit;
    events.miss          = miss_now;
    events.seq_link_made = pend_v && !pend_br;
    events.br_link_made  = pend_v && pend_br;
    events.overflow_set  = os_en;
    events.bank_stall    = (state == ST_RUN) && req_valid && bank_conflict;
    events.victim_valid  = (state == ST_MISS_INV) && e_valid;
    events.seq_inval     = sc_en;
    events.flash_clear   = flash_clr;
    events.refill_done   = last_beat;
  end

  // ------------------------------------------------- interface rules
  // A sequential fetch is the word after the previous one.
  assert property (@(posedge clk) disable iff (!rst_n)
    (accept && prev_valid && req_kind == FK_SEQ) |-> (req_addr == prev_addr + 32'd4))
    else $error("wm_icache: FK_SEQ fetch is not previous address + 4");
  // Instruction addresses are word aligned.
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> (req_addr[1:0] == 2'b00))
    else $error("wm_icache: unaligned fetch address");
  // Memory beats arrive only while a refill is in progress.
  assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> (state == ST_REFILL))
    else $error("wm_icache: memory data outside a refill");

endmodule
