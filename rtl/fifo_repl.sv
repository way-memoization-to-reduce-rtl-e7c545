// fifo_repl: FIFO replacement within each sub-bank.
//
// One pointer per sub-bank names the way to be evicted next. Each time a line
// is allocated in a sub-bank its pointer advances by one, wrapping at NWAYS,
// so the ways of a sub-bank are replaced in the order they were filled.
// The victim output is combinational; the advance acts at the clock edge.
// Reset sets all pointers to way 0.
//
// FIFO replacement within each sub-bank is the published policy for the
// CAM-tag cache; the pointer implementation and its reset are this design's.
module fifo_repl #(
  parameter int unsigned NSETS = 8,
  parameter int unsigned NWAYS = 64,
  localparam int unsigned SET_W = wm_pkg::clog2u(NSETS),
  localparam int unsigned WAY_W = wm_pkg::clog2u(NWAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] bank,
  output logic [WAY_W-1:0] victim_way,
  input  logic             advance
);

  logic [WAY_W-1:0] ptr [NSETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NSETS; b++) ptr[b] <= '0;
    end else if (advance) begin
      ptr[bank] <= (int'(ptr[bank]) == NWAYS - 1) ? '0 : ptr[bank] + 1'b1;
    end
  end

  assign victim_way = ptr[bank];

endmodule
