// tb_icache_data_array: self-checking test of the instruction word array.
//
// Fills the whole 16 KB array with a word computed from its position, then
// reads random positions (checking the one-cycle read latency and that the
// output holds when rd_en is low), and mixes further random writes and reads
// against a reference copy.
module tb_icache_data_array;
  localparam int unsigned NSETS = 8, NWAYS = 64, WPL = 8;
  localparam int unsigned DEPTH = NSETS * NWAYS * WPL;

  logic clk = 0;
  logic rd_en, wr_en;
  logic [2:0] rd_bank, wr_bank, rd_word, wr_word;
  logic [5:0] rd_way, wr_way;
  logic [31:0] rd_data, wr_data;
  int checks = 0, failures = 0;

  icache_data_array dut (.*);
  always #5 clk = ~clk;

  logic [31:0] ref_mem [DEPTH];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i; logic [31:0] held;
    rd_en = 0; wr_en = 0; {rd_bank, rd_way, rd_word} = '0; {wr_bank, wr_way, wr_word} = '0; wr_data = 0;
    for (i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; {wr_bank, wr_way, wr_word} = 12'(i);
      wr_data = 32'(i) * 32'h9E3779B1 ^ 32'h5A5A0000;
      ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      i = $urandom_range(DEPTH - 1);
      rd_en = 1; {rd_bank, rd_way, rd_word} = 12'(i);
      wr_en = $urandom_range(3) == 0;
      {wr_bank, wr_way, wr_word} = 12'($urandom_range(DEPTH - 1));
      wr_data = $urandom;
      @(posedge clk); #1;
      check(rd_data == ref_mem[i], $sformatf("read %0d", i));
      if (wr_en) ref_mem[{wr_bank, wr_way, wr_word}] = wr_data;
      held = rd_data;
      @(negedge clk); rd_en = 0; wr_en = 0;
      @(posedge clk); #1;
      check(rd_data == held, "hold without rd_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
