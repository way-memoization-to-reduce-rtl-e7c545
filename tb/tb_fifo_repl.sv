// tb_fifo_repl: self-checking test of the per-sub-bank FIFO victim pointers.
//
// Random allocations in random sub-banks; each sub-bank's victim must step
// 0, 1, ..., 63, 0, ... independently of the others.
module tb_fifo_repl;
  localparam int unsigned NSETS = 8, NWAYS = 64;
  logic clk = 0, rst_n = 0, advance;
  logic [2:0] bank;
  logic [5:0] victim_way;
  int checks = 0, failures = 0;
  int ref_ptr [NSETS];

  fifo_repl dut (.*);
  always #5 clk = ~clk;

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
    int wraps = 0;
    foreach (ref_ptr[b]) ref_ptr[b] = 0;
    advance = 0; bank = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      bank = 3'($urandom_range(NSETS - 1));
      advance = $urandom_range(2) != 0;
      #1;
      check(int'(victim_way) == ref_ptr[bank], $sformatf("bank %0d victim %0d exp %0d", bank, victim_way, ref_ptr[bank]));
      @(posedge clk);
      if (advance) begin
        ref_ptr[bank] = (ref_ptr[bank] + 1) % NWAYS;
        if (ref_ptr[bank] == 0) wraps++;
      end
    end
    check(wraps > 0, "pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
