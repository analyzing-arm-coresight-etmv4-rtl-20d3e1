// key_lut: a small look-up table indexed by a trace key, used as LUT0
// (P1 left-hand key -> latest P1 address) and LUT1 (P1 right-hand key ->
// {p1_index, p1_left_key}) of the P1/P2 combiner.
//
// DEPTH entries of WIDTH bits, NW write ports and NR asynchronous read
// ports. All writes of a clock take effect at its rising edge; when several
// ports write the same entry, the highest-numbered port wins (ports are
// numbered in stream order, so the newest element wins). Reads return the
// contents before the edge; same-clock forwarding is the caller's job.
// The table is cleared by reset. Register-based storage with combinational
// reads is this design's choice, in keeping with the analyzer using no
// block RAM; the table sizes are p1_left_key_max and p1_right_key_max.
module key_lut #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned NW    = 5,
  parameter int unsigned NR    = 2,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NW-1:0]            we_i,
  input  logic [NW-1:0][AW-1:0]    waddr_i,
  input  logic [NW-1:0][WIDTH-1:0] wdata_i,
  input  logic [NR-1:0][AW-1:0]    raddr_i,
  output logic [NR-1:0][WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we_i[w] && int'(waddr_i[w]) < DEPTH) mem_q[waddr_i[w]] <= wdata_i[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++)
      rdata_o[r] = (int'(raddr_i[r]) < DEPTH) ? mem_q[raddr_i[r]] : '0;
  end

endmodule
