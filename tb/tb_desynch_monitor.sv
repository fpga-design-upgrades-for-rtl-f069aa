// tb_desynch_monitor: random event reports from two sources (both sometimes
// in the same cycle and on the same link) and periodic reads. Checks every
// snapshot against reference counts kept per read interval, including the
// reset-on-read behaviour, and the 19-bit saturation on a small-width copy.
module tb_desynch_monitor;
  import rod_pkg::*;
  localparam int NL = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] mon_valid, mon_desync, frag_done;
  ev_kind_e [1:0] mon_kind;
  logic [1:0][3:0] mon_link;
  logic rd_req;
  logic [NL-1:0][18:0] s_fmt, s_ineff, s_veto, s_skip, s_tmo;
  logic [18:0] s_glob;
  // 4-bit copy for the saturation check
  logic [NL-1:0][3:0] t_fmt, t_ineff, t_veto, t_skip, t_tmo;
  logic [3:0] t_glob;

  int checks = 0, failures = 0;
  int r_fmt[NL], r_ineff[NL], r_veto[NL], r_skip[NL], r_tmo[NL], r_glob;

  desynch_monitor #(.N_SRC(2), .N_LINKS(NL), .CNT_W(19)) dut (
    .clk, .rst_n, .mon_valid, .mon_kind, .mon_desync, .mon_link, .frag_done, .rd_req,
    .snap_fmt_events(s_fmt), .snap_ineff(s_ineff), .snap_veto(s_veto), .snap_skip(s_skip),
    .snap_timeout(s_tmo), .snap_global(s_glob));
  desynch_monitor #(.N_SRC(2), .N_LINKS(NL), .CNT_W(4)) dut_small (
    .clk, .rst_n, .mon_valid, .mon_kind, .mon_desync, .mon_link, .frag_done, .rd_req,
    .snap_fmt_events(t_fmt), .snap_ineff(t_ineff), .snap_veto(t_veto), .snap_skip(t_skip),
    .snap_timeout(t_tmo), .snap_global(t_glob));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sat(input int v, input int w);
    return v > (1 << w) - 1 ? (1 << w) - 1 : v;
  endfunction

  task automatic clear_ref();
    for (int l = 0; l < NL; l++) begin
      r_fmt[l] = 0; r_ineff[l] = 0; r_veto[l] = 0; r_skip[l] = 0; r_tmo[l] = 0;
    end
    r_glob = 0;
  endtask

  task automatic count_ref();
    for (int s = 0; s < 2; s++) if (mon_valid[s]) begin
      automatic int l = int'(mon_link[s]);
      if (mon_kind[s] == EV_MODULE) r_fmt[l]++;
      if (mon_kind[s] != EV_MODULE || mon_desync[s]) r_ineff[l]++;
      if (mon_kind[s] == EV_VETO) r_veto[l]++;
      if (mon_kind[s] == EV_SKIP) r_skip[l]++;
      if (mon_kind[s] == EV_TIMEOUT) r_tmo[l]++;
    end
    if (frag_done[0]) r_glob++;
  endtask

  initial begin
    mon_valid = 0; mon_desync = 0; frag_done = 0; mon_kind = '{EV_MODULE, EV_MODULE};
    mon_link = 0; rd_req = 0;
    clear_ref();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rd_req = (i % 700) == 699;
      for (int s = 0; s < 2; s++) begin
        mon_valid[s]  = $urandom % 2;
        mon_kind[s]   = ev_kind_e'($urandom % 4);
        mon_desync[s] = ($urandom % 5) == 0;
        mon_link[s]   = 4'($urandom % 3);
        frag_done[s]  = $urandom % 2;
      end
      if (rd_req) begin
        @(negedge clk);
        rd_req = 0;
        for (int l = 0; l < NL; l++) begin
          check(int'(s_fmt[l]) == r_fmt[l] && int'(s_ineff[l]) == r_ineff[l] &&
                int'(s_veto[l]) == r_veto[l] && int'(s_skip[l]) == r_skip[l] &&
                int'(s_tmo[l]) == r_tmo[l], "per-link snapshot");
          check(int'(t_fmt[l]) == sat(r_fmt[l], 4) && int'(t_ineff[l]) == sat(r_ineff[l], 4),
                "saturated snapshot");
        end
        check(int'(s_glob) == r_glob, "global snapshot");
        check(int'(t_glob) == sat(r_glob, 4), "global saturation");
        clear_ref();
        // reports of the read cycle count in the new interval
        count_ref();
        mon_valid = 0; frag_done = 0;
        continue;
      end
      count_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
