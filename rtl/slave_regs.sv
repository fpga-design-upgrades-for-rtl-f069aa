// slave_regs: ROD slave register block seen by the ROD master.
//
// Simple synchronous bus: a write takes effect on the clock edge with
// wr_en; a read with rd_en returns rdata on the next cycle. 32-bit registers
// at byte addresses:
//   0x800 FMT_LINK_EN   [15:0] formatter link enable            (rst 0xFFFF)
//   0x804 CONTROL       [0] readout 160 Mb/s (else 80 Mb/s)
//                       [1] calibration mode (hits to histogrammer only)
//                       [2] histogramming enabled during datataking
//                       [3] occupancy-only histograms   [5:4] readout scheme
//                       [15:8] expected hits (SHORT_TOT)          (rst 0)
//   0x808 TIMEOUT       [15:0] module timeout in clock cycles     (rst 2048)
//   0x80C RUN_NUMBER                                              (rst 0)
//   0x810 COMMAND       write-only; one-cycle pulses: [0] read and reset
//                       monitor counters, [1] start histogram readout,
//                       [3] clear underflow flags, [4] flush packed readout
//                       word; [2] clear-while-reading is a level that holds
//                       until the next COMMAND write
//   0x814 PEND_TRIG_THR [7:0] Smart L1A pending trigger threshold;
//                       0xFF switches the mechanism off       (rst 0xFF)
//   0x818 UNDERFLOW     [15:0] per-link triggers-in-flight underflow (RO)
//   0x81C STATUS        [15:0] link FIFO overflow, [16] busy,
//                       [17] histogram readout busy (RO)
//   0x840 + 4*l         triggers in flight of link l (RO)
//   0x900 + 4*(16*t+l)  monitor snapshot t of link l, t = 0 formatter
//                       events, 1 inefficient, 2 ROD veto, 3 skipped, 4 timeout
//   0x820               monitor snapshot of the global event counter
// The threshold register address, its width and its off value follow the
// source design; the rest of the map is this design's own.
module slave_regs #(
  parameter int unsigned N_LINKS = 16,
  parameter int unsigned PEND_W  = 8,
  parameter int unsigned CNT_W   = 19
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_en,
  input  logic                           rd_en,
  input  logic [15:0]                    addr,
  input  logic [31:0]                    wdata,
  output logic [31:0]                    rdata,
  // configuration
  output logic [N_LINKS-1:0]             link_en,
  output logic                           rate160,
  output logic                           calib_mode,
  output logic                           histo_dt_en,
  output logic                           occ_only,
  output logic [1:0]                     ro_scheme,
  output logic [7:0]                     expected_hits,
  output logic [15:0]                    timeout_lim,
  output logic [31:0]                    run_number,
  output logic [7:0]                     pend_thr,
  // command pulses
  output logic                           mon_rd_req,
  output logic                           histo_ro_start,
  output logic                           histo_ro_clear,
  output logic                           clr_underflow,
  output logic                           histo_flush,
  // status
  input  logic [N_LINKS-1:0]             underflow,
  input  logic [N_LINKS-1:0]             fifo_ovf,
  input  logic                           busy,
  input  logic                           histo_ro_busy,
  input  logic [N_LINKS-1:0][PEND_W-1:0] pending,
  input  logic [4:0][N_LINKS-1:0][CNT_W-1:0] mon_snap,
  input  logic [CNT_W-1:0]               mon_global
);
  logic [15:0] control;

  assign rate160       = control[0];
  assign calib_mode    = control[1];
  assign histo_dt_en   = control[2];
  assign occ_only      = control[3];
  assign ro_scheme     = control[5:4];
  assign expected_hits = control[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_en        <= '1;
      control        <= '0;
      timeout_lim    <= 16'd2048;
      run_number     <= '0;
      pend_thr       <= 8'hFF;
      mon_rd_req     <= 1'b0;
      histo_ro_start <= 1'b0;
      histo_ro_clear <= 1'b0;
      clr_underflow  <= 1'b0;
      histo_flush    <= 1'b0;
    end else begin
      mon_rd_req     <= 1'b0;
      histo_ro_start <= 1'b0;
      clr_underflow  <= 1'b0;
      histo_flush    <= 1'b0;
      if (wr_en) begin
        case (addr)
          16'h0800: link_en     <= wdata[N_LINKS-1:0];
          16'h0804: control     <= wdata[15:0];
          16'h0808: timeout_lim <= wdata[15:0];
          16'h080C: run_number  <= wdata;
          16'h0810: begin
            mon_rd_req     <= wdata[0];
            histo_ro_start <= wdata[1];
            histo_ro_clear <= wdata[2];
            clr_underflow  <= wdata[3];
            histo_flush    <= wdata[4];
          end
          16'h0814: pend_thr    <= wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (rd_en) begin
      rdata <= '0;
      if (addr >= 16'h0840 && addr < 16'h0840 + 16'(4 * N_LINKS))
        rdata <= 32'(pending[(addr - 16'h0840) >> 2]);
      else if (addr >= 16'h0900 && addr < 16'h0900 + 16'(4 * 5 * N_LINKS))
        rdata <= 32'(mon_snap[((addr - 16'h0900) >> 2) / 16'(N_LINKS)]
                             [((addr - 16'h0900) >> 2) % 16'(N_LINKS)]);
      else case (addr)
        16'h0800: rdata <= 32'(link_en);
        16'h0804: rdata <= {16'd0, control};
        16'h0808: rdata <= {16'd0, timeout_lim};
        16'h080C: rdata <= run_number;
        16'h0814: rdata <= {24'd0, pend_thr};
        16'h0818: rdata <= 32'(underflow);
        16'h081C: rdata <= {14'd0, histo_ro_busy, busy, 16'(fifo_ovf)};
        16'h0820: rdata <= 32'(mon_global);
        default:  rdata <= '0;
      endcase
    end
  end
endmodule
