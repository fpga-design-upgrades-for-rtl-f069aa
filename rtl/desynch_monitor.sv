// desynch_monitor: per-link event and inefficiency counters of the ROD slave.
//
// Event reports arrive from N_SRC sources (the EFBs of the half slaves), at
// most one per source and cycle; links are numbered globally.
// Per link it counts formatter (module) events, inefficient events (any
// ROD-inserted empty event or any event whose header was flagged for an
// L1ID/BCID mismatch), ROD-veto, skipped-trigger and timeout events; a
// global counter counts every event built by source 0, ROD-inserted events
// included (every half slave builds one fragment per L1A).
// The counters are CNT_W = 19 bits wide, as in the source design, and
// saturate. They reset on read: rd_req copies every counter into the
// snapshot outputs and clears it in the same cycle, so all values of a read
// belong to the same instant; an event arriving in that cycle is the first
// count of the new interval. Snapshots are valid the cycle after rd_req.
module desynch_monitor
  import rod_pkg::*;
#(
  parameter int unsigned N_SRC   = 2,
  parameter int unsigned N_LINKS = 16,
  parameter int unsigned CNT_W   = 19
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic     [N_SRC-1:0]        mon_valid,
  input  ev_kind_e [N_SRC-1:0]        mon_kind,
  input  logic     [N_SRC-1:0]        mon_desync,
  input  logic     [N_SRC-1:0][3:0]   mon_link,
  input  logic     [N_SRC-1:0]        frag_done,
  input  logic                          rd_req,
  output logic [N_LINKS-1:0][CNT_W-1:0] snap_fmt_events,
  output logic [N_LINKS-1:0][CNT_W-1:0] snap_ineff,
  output logic [N_LINKS-1:0][CNT_W-1:0] snap_veto,
  output logic [N_LINKS-1:0][CNT_W-1:0] snap_skip,
  output logic [N_LINKS-1:0][CNT_W-1:0] snap_timeout,
  output logic [CNT_W-1:0]              snap_global
);
  logic [N_LINKS-1:0][CNT_W-1:0] c_fmt, c_ineff, c_veto, c_skip, c_tmo;
  logic [CNT_W-1:0]              c_glob;

  // add n (events of this cycle) with saturation
  function automatic logic [CNT_W-1:0] bump(input logic [CNT_W-1:0] c, input int unsigned n);
    logic [CNT_W:0] s;
    s = {1'b0, c} + (CNT_W+1)'(n);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_fmt <= '0; c_ineff <= '0; c_veto <= '0; c_skip <= '0; c_tmo <= '0; c_glob <= '0;
      snap_fmt_events <= '0; snap_ineff <= '0; snap_veto <= '0;
      snap_skip <= '0; snap_timeout <= '0; snap_global <= '0;
    end else begin
      if (rd_req) begin
        snap_fmt_events <= c_fmt;
        snap_ineff      <= c_ineff;
        snap_veto       <= c_veto;
        snap_skip       <= c_skip;
        snap_timeout    <= c_tmo;
        snap_global     <= c_glob;
      end
      for (int l = 0; l < N_LINKS; l++) begin
        int unsigned n_fmt, n_ineff, n_veto, n_skip, n_tmo;
        n_fmt = 0; n_ineff = 0; n_veto = 0; n_skip = 0; n_tmo = 0;
        for (int s = 0; s < N_SRC; s++) begin
          if (mon_valid[s] && 32'(mon_link[s]) == l) begin
            if (mon_kind[s] == EV_MODULE)                   n_fmt++;
            if (mon_kind[s] != EV_MODULE || mon_desync[s])  n_ineff++;
            if (mon_kind[s] == EV_VETO)                     n_veto++;
            if (mon_kind[s] == EV_SKIP)                     n_skip++;
            if (mon_kind[s] == EV_TIMEOUT)                  n_tmo++;
          end
        end
        c_fmt[l]   <= bump(rd_req ? '0 : c_fmt[l],   n_fmt);
        c_ineff[l] <= bump(rd_req ? '0 : c_ineff[l], n_ineff);
        c_veto[l]  <= bump(rd_req ? '0 : c_veto[l],  n_veto);
        c_skip[l]  <= bump(rd_req ? '0 : c_skip[l],  n_skip);
        c_tmo[l]   <= bump(rd_req ? '0 : c_tmo[l],   n_tmo);
      end
      c_glob <= bump(rd_req ? '0 : c_glob, frag_done[0] ? 1 : 0);
    end
  end
endmodule
