// tb_link_array: self-checking test of the link / overflow-bit store.
//
// A reference model holds every sequential link, branch link and overflow
// bit. Random cycles drive any mix of link writes, sequential-link clears,
// overflow sets, line resets on refill and (rarely) the flash clear, then
// check the combinational read-out of a random line and pair, including the
// gating of way fields by their valid bits, and the overflow read-out of a
// random victim line. Runs at the default 8 x 64 lines, 4 pairs per line.
module tb_link_array;
  localparam int unsigned NSETS = 8, NWAYS = 64, PAIRS = 4;
  localparam int unsigned NL = NSETS * NWAYS;

  logic clk = 0, rst_n = 0;
  logic [2:0] rd_bank, vic_bank, lw_bank, sc_bank, os_bank, fill_bank;
  logic [5:0] rd_way, vic_way, lw_way, sc_way, os_way, fill_way, lw_target_way;
  logic [1:0] rd_pair, lw_pair;
  logic rd_seq_valid, rd_br_valid, vic_overflow;
  logic [5:0] rd_seq_way, rd_br_way;
  logic lw_en, lw_is_branch, sc_en, os_en, fill_en, fill_overflow, flash_clr;
  int checks = 0, failures = 0;

  link_array dut (.*);
  always #5 clk = ~clk;

  bit       r_sv [NL];  logic [5:0] r_sw [NL];
  bit       r_ov [NL];
  bit       r_bv [NL*PAIRS]; logic [5:0] r_bw [NL*PAIRS];

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
    int l;
    int n_flash = 0;
    for (int i = 0; i < NL; i++) begin r_sv[i] = 0; r_ov[i] = 0; end
    for (int i = 0; i < NL*PAIRS; i++) r_bv[i] = 0;
    {lw_en, sc_en, os_en, fill_en, flash_clr} = '0;
    {rd_bank, rd_way, rd_pair, vic_bank, vic_way} = '0;
    {lw_is_branch, lw_bank, lw_way, lw_pair, lw_target_way} = '0;
    {sc_bank, sc_way, os_bank, os_way, fill_bank, fill_way, fill_overflow} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 30000; it++) begin
      @(negedge clk);
      // small address space so that operations collide often
      lw_en = $urandom_range(1); lw_is_branch = $urandom_range(1);
      lw_bank = 3'($urandom_range(1)); lw_way = 6'($urandom_range(3));
      lw_pair = 2'($urandom); lw_target_way = 6'($urandom);
      sc_en = $urandom_range(3) == 0; sc_bank = 3'($urandom_range(1)); sc_way = 6'($urandom_range(3));
      os_en = $urandom_range(3) == 0; os_bank = 3'($urandom_range(1)); os_way = 6'($urandom_range(3));
      fill_en = $urandom_range(7) == 0; fill_bank = 3'($urandom_range(1)); fill_way = 6'($urandom_range(3));
      fill_overflow = $urandom_range(1);
      flash_clr = $urandom_range(200) == 0;
      // keep write and clear of one sequential link apart (the cache never overlaps them)
      if (sc_en && lw_en && !lw_is_branch && {sc_bank, sc_way} == {lw_bank, lw_way}) sc_en = 0;
      if (os_en && fill_en && {os_bank, os_way} == {fill_bank, fill_way}) os_en = 0;
      @(posedge clk);
      // reference update, same priorities as the design
      if (lw_en && !lw_is_branch) begin r_sv[{lw_bank, lw_way}] = 1; r_sw[{lw_bank, lw_way}] = lw_target_way; end
      if (lw_en && lw_is_branch) begin r_bv[{lw_bank, lw_way, lw_pair}] = 1; r_bw[{lw_bank, lw_way, lw_pair}] = lw_target_way; end
      if (sc_en) r_sv[{sc_bank, sc_way}] = 0;
      if (os_en) r_ov[{os_bank, os_way}] = 1;
      if (fill_en) begin
        l = {fill_bank, fill_way};
        r_sv[l] = 0; r_ov[l] = fill_overflow;
        for (int p = 0; p < PAIRS; p++) r_bv[l*PAIRS + p] = 0;
      end
      if (flash_clr) begin
        n_flash++;
        for (int i = 0; i < NL*PAIRS; i++) r_bv[i] = 0;
      end
      @(negedge clk);
      {lw_en, sc_en, os_en, fill_en, flash_clr} = '0;
      rd_bank = 3'($urandom_range(1)); rd_way = 6'($urandom_range(3)); rd_pair = 2'($urandom);
      vic_bank = 3'($urandom_range(1)); vic_way = 6'($urandom_range(3));
      #1;
      l = {rd_bank, rd_way};
      check(rd_seq_valid == r_sv[l], "seq valid");
      check(rd_seq_way == (r_sv[l] ? r_sw[l] : 6'd0), "seq way (gated)");
      check(rd_br_valid == r_bv[l*PAIRS + rd_pair], "br valid");
      check(rd_br_way == (r_bv[l*PAIRS + rd_pair] ? r_bw[l*PAIRS + rd_pair] : 6'd0), "br way (gated)");
      check(vic_overflow == r_ov[{vic_bank, vic_way}], "overflow");
    end
    check(n_flash > 0, "flash clear exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
