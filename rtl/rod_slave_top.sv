// rod_slave_top: ROD slave datapath with Smart L1A trigger forwarding.
//
// Trigger side: every L1A from the ROD master (with its L1ID, BCID, ECRID
// and trigger type) goes through l1a_forwarder, which drives the eight
// serial command links xc_trig to the modules and inhibits a line whose
// modules have more triggers in flight than the pending trigger threshold.
// What happened per formatter link (sent or vetoed) is pushed into the
// trigger FIFO of each formatter; the event information is pushed into the
// event FIFO of each half slave.
// Data side, two half slaves: each has two quad-link formatters (links 0-7
// and 8-15 overall), an event fragment builder, a router and a histogrammer
// with its external SSRAM port and a readout packer (histo_readout) that
// streams the finished histogram towards the processor memory. A single
// desynch_monitor counts per-link events and inefficiencies of both halves,
// and slave_regs holds the configuration and status registers.
// Ports: module data arrive already decoded (link decoder not included);
// S-Link, SSRAM and histogram readout ports of both half slaves are brought
// out. Everything runs on one clock.
module rod_slave_top
  import rod_pkg::*;
#(
  parameter int unsigned LINK_FIFO_DEPTH = 256,
  parameter int unsigned TRIG_FIFO_DEPTH = 64,
  parameter int unsigned NUM_CHIPS       = 128,
  parameter int unsigned SSRAM_RD_LAT    = 2,
  parameter int unsigned SS_AW           = $clog2(NUM_CHIPS * FE_ROWS * FE_COLS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register bus from the ROD master
  input  logic                  reg_wr,
  input  logic                  reg_rd,
  input  logic [15:0]           reg_addr,
  input  logic [31:0]           reg_wdata,
  output logic [31:0]           reg_rdata,
  // trigger and event information from the ROD master
  input  logic                  l1a,
  input  ev_info_t              l1a_info,
  output logic [7:0]            xc_trig,
  output logic                  busy,
  // decoded module data from the BOC, one stream per formatter link
  input  logic [15:0]           lk_valid,
  input  logic [15:0][31:0]     lk_data,
  // S-Link outputs of the two half slaves
  output logic [1:0]            sl_valid,
  output logic [1:0][31:0]      sl_data,
  output logic [1:0]            sl_eof,
  input  logic [1:0]            sl_ready,
  // histogram SSRAMs
  output logic [1:0]            ss_re,
  output logic [1:0]            ss_we,
  output logic [1:0][SS_AW-1:0] ss_addr,
  output logic [1:0][35:0]      ss_wdata,
  input  logic [1:0][35:0]      ss_rdata,
  // histogram readout towards the processor memory
  output logic [1:0]            dma_valid,
  output logic [1:0][31:0]      dma_data,
  input  logic [1:0]            dma_ready,
  output logic [1:0]            histo_done
);
  localparam int unsigned PEND_W = 8;
  localparam int unsigned CNT_W  = 19;

  // configuration
  logic [15:0] link_en, active;
  logic        rate160, calib_mode, histo_dt_en, occ_only, histo_flush;
  logic [1:0]  ro_scheme;
  logic [7:0]  expected_hits, pend_thr;
  logic [15:0] timeout_lim;
  logic [31:0] run_number;
  logic        mon_rd_req, histo_ro_start, histo_ro_clear, clr_underflow;

  // smart L1A
  logic [15:0]             pend_ok, sent, inhibited, underflow, fifo_ovf;
  logic [15:0][PEND_W-1:0] pending;
  logic                    l1a_q;
  logic [3:0]              fmt_busy, trig_af;
  logic [1:0]              ev_af_h;
  logic [1:0]              ro_busy;

  // monitor
  logic [1:0]                       mon_valid, mon_desync, frag_done;
  ev_kind_e [1:0]                   mon_kind;
  logic [1:0][3:0]                  mon_link;
  logic [4:0][15:0][CNT_W-1:0]      mon_snap;
  logic [CNT_W-1:0]                 mon_global;

  slave_regs #(.N_LINKS(16), .PEND_W(PEND_W), .CNT_W(CNT_W)) u_regs (
    .clk, .rst_n, .wr_en(reg_wr), .rd_en(reg_rd), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .link_en, .rate160, .calib_mode, .histo_dt_en, .occ_only,
    .ro_scheme, .expected_hits, .timeout_lim, .run_number, .pend_thr,
    .mon_rd_req, .histo_ro_start, .histo_ro_clear, .clr_underflow, .histo_flush,
    .underflow, .fifo_ovf, .busy, .histo_ro_busy(|ro_busy), .pending, .mon_snap, .mon_global
  );

  l1a_forwarder #(.N_XC(8), .N_FMT(16)) u_fwd (
    .clk, .rst_n, .rate160, .link_en, .pend_ok, .l1a,
    .active, .xc_trig, .sent, .inhibited
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l1a_q <= 1'b0;
    else        l1a_q <= l1a;
  end

  // ROD busy: a link FIFO, a trigger FIFO or an event FIFO is nearly full
  assign busy = |fmt_busy | |trig_af | |ev_af_h;

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [1:0]       f_valid, f_eot, f_ready;
    logic [1:0][31:0] f_data;
    logic             ev_empty, ev_pop, ev_full, ev_af, ev_ovf;
    logic [$clog2(TRIG_FIFO_DEPTH+1)-1:0] ev_cnt;
    ev_info_t         ev_head;
    logic             e_valid, e_dataword, e_eof, e_ready;
    logic [31:0]      e_data;
    logic             h_valid, h_ready;
    hit_t             h_hit;
    logic [31:0]      hit_count;
    logic             r_valid, r_ready;
    logic [35:0]      r_data;

    for (genvar f = 0; f < 2; f++) begin : g_fmt
      localparam int unsigned FI = 2 * h + f;
      logic       t_empty, t_pop, t_full, t_af, t_ovf;
      logic [3:0] t_mask;
      logic [$clog2(TRIG_FIFO_DEPTH+1)-1:0] t_cnt;

      // top-level trigger FIFO slice: which links of this formatter got the L1A
      sync_fifo #(.WIDTH(4), .DEPTH(TRIG_FIFO_DEPTH), .AF_MARGIN(TRIG_FIFO_DEPTH / 4)) u_trig_fifo (
        .clk, .rst_n, .wr_en(l1a_q), .wr_data(sent[4*FI +: 4]),
        .rd_en(t_pop), .rd_data(t_mask), .empty(t_empty), .full(t_full),
        .almost_full(t_af), .count(t_cnt), .overflow(t_ovf)
      );

      formatter #(.N_LINKS(4), .LINK_BASE(4 * FI), .FIFO_DEPTH(LINK_FIFO_DEPTH),
                  .PEND_W(PEND_W)) u_fmt (
        .clk, .rst_n, .link_en(active[4*FI +: 4]), .thr_reg(pend_thr), .timeout_lim,
        .clr_underflow,
        .in_valid(lk_valid[4*FI +: 4]), .in_data(lk_data[4*FI +: 4]),
        .trig_sent(sent[4*FI +: 4]), .pend_ok(pend_ok[4*FI +: 4]),
        .pending(pending[4*FI +: 4]), .underflow(underflow[4*FI +: 4]),
        .trig_empty(t_empty), .trig_mask(t_mask), .trig_pop(t_pop),
        .out_valid(f_valid[f]), .out_data(f_data[f]), .out_eot(f_eot[f]),
        .out_ready(f_ready[f]), .busy(fmt_busy[FI]), .fifo_ovf(fifo_ovf[4*FI +: 4])
      );
      assign trig_af[FI] = t_af;
    end

    sync_fifo #(.WIDTH($bits(ev_info_t)), .DEPTH(TRIG_FIFO_DEPTH), .AF_MARGIN(TRIG_FIFO_DEPTH / 4)) u_ev_fifo (
      .clk, .rst_n, .wr_en(l1a), .wr_data(l1a_info),
      .rd_en(ev_pop), .rd_data(ev_head), .empty(ev_empty), .full(ev_full),
      .almost_full(ev_af), .count(ev_cnt), .overflow(ev_ovf)
    );
    assign ev_af_h[h] = ev_af;

    efb_gen_fragment #(.SOURCE_ID(32'h0011_0000 | 32'(h))) u_efb (
      .clk, .rst_n, .run_number,
      .fmt_active({|active[8*h+4 +: 4], |active[8*h +: 4]}),
      .ev_empty, .ev_info(ev_head), .ev_pop,
      .f_valid, .f_data, .f_eot, .f_ready,
      .out_valid(e_valid), .out_data(e_data), .out_dataword(e_dataword),
      .out_eof(e_eof), .out_ready(e_ready),
      .mon_valid(mon_valid[h]), .mon_kind(mon_kind[h]), .mon_desync(mon_desync[h]),
      .mon_link(mon_link[h]), .frag_done(frag_done[h])
    );

    router u_router (
      .clk, .rst_n, .slink_en(!calib_mode), .histo_en(calib_mode || histo_dt_en),
      .in_valid(e_valid), .in_data(e_data), .in_dataword(e_dataword), .in_eof(e_eof),
      .in_ready(e_ready),
      .sl_valid(sl_valid[h]), .sl_data(sl_data[h]), .sl_eof(sl_eof[h]), .sl_ready(sl_ready[h]),
      .hit_valid(h_valid), .hit(h_hit), .hit_ready(h_ready), .hit_count
    );

    histogrammer #(.NUM_CHIPS(NUM_CHIPS), .RD_LAT(SSRAM_RD_LAT), .AW(SS_AW)) u_histo (
      .clk, .rst_n, .occ_only,
      .hit_valid(h_valid), .hit(h_hit), .hit_ready(h_ready),
      .ro_start(histo_ro_start), .ro_clear(histo_ro_clear), .ro_busy(ro_busy[h]),
      .ro_valid(r_valid), .ro_data(r_data), .ro_ready(r_ready), .ro_done(histo_done[h]),
      .ss_re(ss_re[h]), .ss_we(ss_we[h]), .ss_addr(ss_addr[h]), .ss_wdata(ss_wdata[h]),
      .ss_rdata(ss_rdata[h])
    );

    histo_readout u_hro (
      .clk, .rst_n, .scheme(ro_scheme_e'(ro_scheme)), .occ_only, .expected_hits,
      .flush(histo_flush),
      .in_valid(r_valid), .in_data(r_data), .in_ready(r_ready),
      .out_valid(dma_valid[h]), .out_data(dma_data[h]), .out_ready(dma_ready[h])
    );
  end

  desynch_monitor #(.N_SRC(2), .N_LINKS(16), .CNT_W(CNT_W)) u_mon (
    .clk, .rst_n, .mon_valid, .mon_kind, .mon_desync, .mon_link, .frag_done,
    .rd_req(mon_rd_req),
    .snap_fmt_events(mon_snap[0]), .snap_ineff(mon_snap[1]), .snap_veto(mon_snap[2]),
    .snap_skip(mon_snap[3]), .snap_timeout(mon_snap[4]), .snap_global(mon_global)
  );
endmodule
