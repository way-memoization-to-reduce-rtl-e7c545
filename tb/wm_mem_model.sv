// wm_mem_model: behavioural model of the secondary memory behind the cache.
//
// Not synthesizable design: a testbench stand-in. A one-cycle req_valid with
// a line address starts a line read; LATENCY cycles after the request the
// first word is returned, then one word per cycle, WORDS words in address
// order. Word contents come from wm_tb_pkg::mem_word(). With LATENCY = 11 a
// miss costs the cache 20 cycles more than a hit, the miss penalty assumed
// in the evaluation of the design.
module wm_mem_model #(
  parameter int unsigned LATENCY = 11,
  parameter int unsigned WORDS   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic [31:0] req_addr,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [31:0] base;
  int          cnt;      // cycles since request; 0 = idle
  bit          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; cnt <= 0;
    end else if (req_valid) begin
      busy <= 1; cnt <= 1; base <= req_addr;
    end else if (busy) begin
      cnt <= cnt + 1;
      if (cnt == int'(LATENCY + WORDS - 1)) busy <= 0;
    end
  end

  always_comb begin
    rsp_valid = busy && (cnt >= int'(LATENCY));
    rsp_data  = rsp_valid ? wm_tb_pkg::mem_word(base + 32'((cnt - int'(LATENCY)) * 4)) : 32'h0;
  end
endmodule
