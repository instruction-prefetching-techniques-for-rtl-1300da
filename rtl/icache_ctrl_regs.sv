// Control registers of the instruction cache (prefetch part).
//
// Software starts a prefetch by first writing the number of bytes to the
// size register (offset 0x18) and then the start address to the address
// register (offset 0x08); the address write itself is the command and
// produces a one-cycle sw_pf_req pulse towards the prefetch state machine.
// Three further registers configure the hardware prefetcher: its mode
// (0x20: 0 off, 1 next-line, 2 stream), its burst size in bytes (0x28) and
// the stream wait cycles (0x30). All registers read back their value.
// Writes to 0x38 and 0x40 give one-cycle pulses that start and stop the
// statistics counters; reads from 0x80-0xFC return statistic number
// (offset - 0x80) / 4, selected combinationally from the request address.
//
// Bus: single-cycle grant, response (rvalid, rdata) one cycle after the
// request, for reads and writes alike; unknown offsets read as zero and
// ignore writes. Offsets 0x08 and 0x18 and the write-address-to-start
// behaviour follow the document, as do software commands that start and stop
// the statistics; the other offsets, the reset values and the bus
// handshake are this design's choice.
module icache_ctrl_regs
  import icache_pkg::*;
#(
  parameter logic [31:0] RST_SW_SIZE = 32'd16,
  parameter hwpf_mode_e  RST_HW_MODE = HWPF_STREAM,
  parameter logic [31:0] RST_HW_SIZE = 32'd256,
  parameter logic [15:0] RST_HW_WAIT = 16'd60
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // register bus
  input  logic              reg_req_i,
  input  logic              reg_we_i,
  input  logic [7:0]        reg_addr_i,
  input  logic [31:0]       reg_wdata_i,
  output logic              reg_gnt_o,
  output logic              reg_rvalid_o,
  output logic [31:0]       reg_rdata_o,
  // to the prefetch state machine
  output logic              sw_pf_req_o,
  output logic [ADDR_W-1:0] sw_pf_addr_o,
  output logic [31:0]       sw_pf_size_o,
  output hwpf_mode_e        hw_mode_o,
  output logic [31:0]       hw_size_o,
  output logic [15:0]       hw_wait_o,
  // to the statistics counters
  output logic              stats_start_o,
  output logic              stats_stop_o,
  output logic [4:0]        stat_sel_o,
  input  logic [31:0]       stat_val_i
);

  logic [ADDR_W-1:0] pf_addr_q;
  logic [31:0]       pf_size_q;
  hwpf_mode_e        hw_mode_q;
  logic [31:0]       hw_size_q;
  logic [15:0]       hw_wait_q;
  logic              pf_req_q;
  logic              st_start_q, st_stop_q;
  logic              rvalid_q;
  logic [31:0]       rdata_q;
  logic              wr;

  assign wr = reg_req_i && reg_we_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pf_addr_q <= '0;
      pf_size_q <= RST_SW_SIZE;
      hw_mode_q <= RST_HW_MODE;
      hw_size_q <= RST_HW_SIZE;
      hw_wait_q <= RST_HW_WAIT;
      pf_req_q  <= 1'b0;
      st_start_q <= 1'b0;
      st_stop_q  <= 1'b0;
      rvalid_q  <= 1'b0;
      rdata_q   <= '0;
    end else begin
      pf_req_q <= wr && (reg_addr_i == REG_PF_ADDR);
      st_start_q <= wr && (reg_addr_i == REG_STATS_START);
      st_stop_q  <= wr && (reg_addr_i == REG_STATS_STOP);
      rvalid_q <= reg_req_i;
      if (wr) begin
        unique case (reg_addr_i)
          REG_PF_ADDR:   pf_addr_q <= reg_wdata_i;
          REG_PF_SIZE:   pf_size_q <= reg_wdata_i;
          REG_HWPF_MODE: hw_mode_q <= (reg_wdata_i[1:0] == 2'd3) ? HWPF_OFF : hwpf_mode_e'(reg_wdata_i[1:0]);
          REG_HWPF_SIZE: hw_size_q <= reg_wdata_i;
          REG_HWPF_WAIT: hw_wait_q <= reg_wdata_i[15:0];
          default: ;
        endcase
      end
      if (reg_req_i && !reg_we_i && reg_addr_i >= REG_STATS_BASE) begin
        rdata_q <= stat_val_i;
      end else if (reg_req_i && !reg_we_i) begin
        unique case (reg_addr_i)
          REG_PF_ADDR:   rdata_q <= pf_addr_q;
          REG_PF_SIZE:   rdata_q <= pf_size_q;
          REG_HWPF_MODE: rdata_q <= 32'(hw_mode_q);
          REG_HWPF_SIZE: rdata_q <= hw_size_q;
          REG_HWPF_WAIT: rdata_q <= 32'(hw_wait_q);
          default:       rdata_q <= '0;
        endcase
      end else begin
        rdata_q <= '0;
      end
    end
  end

  assign reg_gnt_o    = 1'b1;
  assign reg_rvalid_o = rvalid_q;
  assign reg_rdata_o  = rdata_q;
  assign sw_pf_req_o  = pf_req_q;
  assign sw_pf_addr_o = pf_addr_q;
  assign sw_pf_size_o = pf_size_q;
  assign hw_mode_o    = hw_mode_q;
  assign hw_size_o    = hw_size_q;
  assign hw_wait_o    = hw_wait_q;
  assign stats_start_o = st_start_q;
  assign stats_stop_o  = st_stop_q;
  assign stat_sel_o    = reg_addr_i[6:2];

endmodule
