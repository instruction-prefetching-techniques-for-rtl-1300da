// Multi-port data array of the shared instruction cache.
//
// Holds one 16-byte line per way of every set. Each core private controller
// owns a read port that returns all ways of the addressed set in the same
// cycle; the controller selects the hitting way and registers the line, which
// gives the one-cycle hit latency. The prefetch controller has no port here,
// as it never needs instruction data. The master controller owns the single
// write port for refills; a write takes effect at the next clock edge.
//
// Flip-flop storage without reset: a line is only read behind a valid tag.
// Port counts follow the cache organisation described for the cluster; the
// combinational read is this design's choice.
module icache_data_array #(
  parameter int unsigned NSETS  = 32,
  parameter int unsigned ASSOC  = 2,
  parameter int unsigned LINE_W = 128,
  parameter int unsigned NRD    = 4,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W = (ASSOC > 1) ? $clog2(ASSOC) : 1
) (
  input  logic              clk_i,
  // read ports
  input  logic [SET_W-1:0]  rd_set_i  [NRD],
  output logic [LINE_W-1:0] rd_line_o [NRD][ASSOC],
  // write port (refill)
  input  logic              wr_en_i,
  input  logic [SET_W-1:0]  wr_set_i,
  input  logic [WAY_W-1:0]  wr_way_i,
  input  logic [LINE_W-1:0] wr_line_i
);

  logic [LINE_W-1:0] mem_q [NSETS][ASSOC];

  always_ff @(posedge clk_i) begin
    if (wr_en_i) mem_q[wr_set_i][wr_way_i] <= wr_line_i;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++)
      for (int w = 0; w < ASSOC; w++) rd_line_o[p][w] = mem_q[rd_set_i[p]][w];
  end

endmodule
