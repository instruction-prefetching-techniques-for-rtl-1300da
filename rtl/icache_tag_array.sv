// Multi-port tag array of the shared instruction cache.
//
// Holds one tag and one valid bit per way of every set. Each private
// controller (the four core controllers and the prefetch controller) owns a
// read port: it presents a set index and sees the tags and valid bits of all
// ways of that set in the same cycle, so a hit can be decided combinationally.
// The master controller owns the single write port, used when a refilled line
// is written back; the write takes effect at the next clock edge and sets the
// valid bit. Reset clears all valid bits. A population count of the valid
// bits gives the number of lines in use, for the cache usage statistic.
//
// The array is built from flip-flops, in the spirit of the standard-cell
// memories the cache is built from. The read/write port split follows the
// cache organisation described for the cluster; combinational reads and the
// reset of the valid bits are this design's choice.
module icache_tag_array #(
  parameter int unsigned NSETS = 32,
  parameter int unsigned ASSOC = 2,
  parameter int unsigned TAG_W = 23,
  parameter int unsigned NRD   = 5,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned CNT_W = $clog2(NSETS * ASSOC + 1)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // read ports
  input  logic [SET_W-1:0] rd_set_i   [NRD],
  output logic [TAG_W-1:0] rd_tag_o   [NRD][ASSOC],
  output logic [ASSOC-1:0] rd_valid_o [NRD],
  // write port (refill)
  input  logic             wr_en_i,
  input  logic [SET_W-1:0] wr_set_i,
  input  logic [WAY_W-1:0] wr_way_i,
  input  logic [TAG_W-1:0] wr_tag_i,
  // number of valid lines (cache usage statistic)
  output logic [CNT_W-1:0] nvalid_o
);

  logic [TAG_W-1:0] tag_q   [NSETS][ASSOC];
  logic [ASSOC-1:0] valid_q [NSETS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int s = 0; s < NSETS; s++) valid_q[s] <= '0;
    end else if (wr_en_i) begin
      valid_q[wr_set_i][wr_way_i] <= 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (wr_en_i) tag_q[wr_set_i][wr_way_i] <= wr_tag_i;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_valid_o[p] = valid_q[rd_set_i[p]];
      for (int w = 0; w < ASSOC; w++) rd_tag_o[p][w] = tag_q[rd_set_i[p]][w];
    end
  end

  always_comb begin
    nvalid_o = '0;
    for (int s = 0; s < NSETS; s++)
      for (int w = 0; w < ASSOC; w++) nvalid_o += CNT_W'(valid_q[s][w]);
  end

endmodule
