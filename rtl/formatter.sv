// formatter: quad-link formatter of the ROD slave with Smart L1A tracking.
//
// Each of the four links delivers decoded module words (header / hits /
// flags / trailer, see rod_pkg) from the BOC. A word enters the link's FIFO;
// a link watcher on the write side captures the MCC skipped-trigger count of
// each header and, on each trailer, reports one received event plus the
// skipped ones to the link's pending_trig_counter. The counters also count
// the triggers forwarded to each link (trig_sent, from the top level) and
// give the per-link mod_pending_ok back to the top level. The readout
// controller (fifo_readout) drains the link FIFOs in trigger order, driven by
// this formatter's slice of the top-level trigger FIFO.
// busy is high while any link FIFO is almost full; it goes to the trigger
// system to hold off triggers. Words that reach a full FIFO are lost and
// flagged in fifo_ovf.
// Link FIFO depth and the busy margin are this design's choices.
module formatter
  import rod_pkg::*;
#(
  parameter int unsigned N_LINKS    = 4,
  parameter int unsigned LINK_BASE  = 0,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned PEND_W     = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_LINKS-1:0]             link_en,
  input  logic [7:0]                     thr_reg,
  input  logic [15:0]                    timeout_lim,
  input  logic                           clr_underflow,
  // module data from the BOC
  input  logic [N_LINKS-1:0]             in_valid,
  input  logic [N_LINKS-1:0][31:0]       in_data,
  // Smart L1A
  input  logic [N_LINKS-1:0]             trig_sent,
  output logic [N_LINKS-1:0]             pend_ok,
  output logic [N_LINKS-1:0][PEND_W-1:0] pending,
  output logic [N_LINKS-1:0]             underflow,
  // trigger FIFO slice
  input  logic                           trig_empty,
  input  logic [N_LINKS-1:0]             trig_mask,
  output logic                           trig_pop,
  // output towards the EFB
  output logic                           out_valid,
  output logic [31:0]                    out_data,
  output logic                           out_eot,
  input  logic                           out_ready,
  output logic                           busy,
  output logic [N_LINKS-1:0]             fifo_ovf
);
  logic [N_LINKS-1:0]       lf_empty, lf_pop, lf_af;
  logic [N_LINKS-1:0][31:0] lf_data;
  logic [N_LINKS-1:0][3:0]  skip_hdr;
  logic [N_LINKS-1:0]       evt_rcvd;
  logic [N_LINKS-1:0][3:0]  evt_skip;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    logic [$clog2(FIFO_DEPTH+1)-1:0] cnt_unused;
    logic                            full_unused;
    logic                            is_hdr, is_trl;

    assign is_hdr = in_valid[l] && in_data[l][31:29] == TYPE_HDR;
    assign is_trl = in_valid[l] && in_data[l][31:29] == TYPE_TRL;

    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH), .AF_MARGIN(FIFO_DEPTH / 4)) u_lfifo (
      .clk, .rst_n,
      .wr_en(in_valid[l] && link_en[l]), .wr_data(in_data[l]),
      .rd_en(lf_pop[l]), .rd_data(lf_data[l]),
      .empty(lf_empty[l]), .full(full_unused), .almost_full(lf_af[l]),
      .count(cnt_unused), .overflow(fifo_ovf[l])
    );

    // link watcher: skipped count travels in the header, event completes at the trailer
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) skip_hdr[l] <= '0;
      else if (is_hdr && link_en[l]) skip_hdr[l] <= in_data[l][19:16];
    end
    assign evt_rcvd[l] = is_trl && link_en[l];
    assign evt_skip[l] = skip_hdr[l];

    pending_trig_counter #(.CNT_W(PEND_W)) u_pend (
      .clk, .rst_n, .thr_reg,
      .trig_sent(trig_sent[l]), .evt_rcvd(evt_rcvd[l]), .evt_skipped(evt_skip[l]),
      .clr_underflow, .pending(pending[l]), .mod_pending_ok(pend_ok[l]),
      .underflow(underflow[l])
    );
  end

  assign busy = |lf_af;

  fifo_readout #(.N_LINKS(N_LINKS), .LINK_BASE(LINK_BASE), .PEND_W(PEND_W)) u_ro (
    .clk, .rst_n, .link_en, .timeout_lim,
    .trig_empty, .trig_sent(trig_mask), .trig_pop,
    .lf_empty, .lf_data, .lf_pop, .pend_cnt(pending),
    .out_valid, .out_data, .out_eot, .out_ready
  );
endmodule
