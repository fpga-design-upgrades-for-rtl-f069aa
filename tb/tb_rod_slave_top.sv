// tb_rod_slave_top: end-to-end run of the ROD slave at its default sizes.
// Sixteen behavioural modules (mcc_model) answer the forwarded triggers;
// two behavioural SSRAMs hold the histograms. The run goes through:
//   1. datataking, Smart L1A off, high trigger rate: MCC buffers overflow,
//      skipped-trigger events appear; one module reports wrong skip counts
//      (desynchronised, flagged events; triggers-in-flight underflow guard)
//   2. threshold 15: ROD-veto events replace the skips, no trigger is skipped
//      any more; L1ID correction keeps the vetoed links in step; the monitor
//      counters are read over the register bus and compared
//   3. S-Link back-pressure: link FIFOs fill and busy is raised
//   4. a silent module: timeout events, then vetoes on its serial line,
//      which at 80 Mb/s also inhibits the module sharing that line
//   5. 160 Mb/s mapping: only links 0,1,4,5,8,9,12,13 are read out
//   6. calibration with ECRID = 0x80.. and no hits: histograms stay empty
//   7. calibration with hits: total occupancy equals the hits sent
// Every S-Link fragment is parsed: framing, extended L1ID, one event per
// active link in link order, L1ID/BCID flags, trailer data count. Each
// mechanism is counted and must have happened.
module tb_rod_slave_top;
  import rod_pkg::*;
  localparam int AW = 19;   // SSRAM address width of the default configuration

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0, reg_rd = 0;
  logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic l1a = 0;
  ev_info_t l1a_info;
  logic [7:0] xc_trig;
  logic busy;
  logic [15:0] lk_valid;
  logic [15:0][31:0] lk_data;
  logic [1:0] sl_valid, sl_eof, sl_ready, ss_re, ss_we, dma_valid, dma_ready, histo_done;
  logic [1:0][31:0] sl_data, dma_data;
  logic [1:0][AW-1:0] ss_addr;
  logic [1:0][35:0] ss_wdata, ss_rdata;

  rod_slave_top dut (.*);

  for (genvar h = 0; h < 2; h++) begin : g_ram
    ssram_model #(.AW(AW), .RD_LAT(2)) u_ram (.clk, .re(ss_re[h]), .we(ss_we[h]),
      .addr(ss_addr[h]), .wdata(ss_wdata[h]), .rdata(ss_rdata[h]));
  end

  // ---------------- modules ----------------
  logic        rate160 = 0;
  logic [7:0]  cur_bcid = 0;
  logic [2:0]  nhits = 3'd2;
  logic [15:0] dead = '0, skip_bug = '0, mtrig;
  int m_trig[16], m_skip[16], m_ev[16], m_hits[16];

  function automatic int serial_of(input int l, input bit r160);
    if (!r160) return l % 8;
    case (l)
      0: return 0;  1: return 1;  4: return 2;  5: return 3;
      8: return 4;  9: return 5;  12: return 6; 13: return 7;
      default: return -1;
    endcase
  endfunction

  for (genvar l = 0; l < 16; l++) begin : g_mcc
    assign mtrig[l] = (serial_of(l, rate160) >= 0) ? xc_trig[serial_of(l, rate160)] : 1'b0;
    mcc_model #(.LINK(l), .BUF_DEPTH(16), .WORD_GAP(8)) u_mcc (
      .clk, .rst_n, .trig(mtrig[l]), .bcid_in(cur_bcid), .nhits, .dead(dead[l]),
      .skip_bug(skip_bug[l]), .out_valid(lk_valid[l]), .out_data(lk_data[l]),
      .n_trig(m_trig[l]), .n_skipped(m_skip[l]), .n_sent_events(m_ev[l]), .n_sent_hits(m_hits[l]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_frag[2], n_module, n_veto, n_skip, n_tmo, n_flagged, n_l1corr, n_shared_veto;
  int n_busy, n_160_frags, n_bad_frag;
  int vetoes_seen[16];

  // ---------------- L1A issue ----------------
  logic [23:0] l1id = 0;
  logic [7:0]  ecrid = 0;
  int          n_l1a = 0;
  bit          expect_slink = 1;
  logic [15:0] cfg_en = '1;
  typedef struct { logic [31:0] ext; logic [15:0] act; } exp_t;
  exp_t expq[2][$];

  function automatic logic [15:0] active_of(input logic [15:0] en, input bit r160);
    return r160 ? (en & 16'h3333) : en;
  endfunction

  task automatic issue_l1a();
    @(negedge clk);
    while (busy) @(negedge clk);   // the trigger source holds L1As while the ROD is busy
    l1a = 1;
    l1a_info.ecrid = ecrid; l1a_info.l1id = l1id;
    l1a_info.bcid = 12'($urandom); l1a_info.trig_type = 8'h01;
    cur_bcid = l1a_info.bcid[7:0];
    if (expect_slink)
      for (int h = 0; h < 2; h++) expq[h].push_back('{{ecrid, l1id}, active_of(cfg_en, rate160)});
    l1id++; n_l1a++;
    @(negedge clk);
    l1a = 0;
  endtask

  task automatic triggers(input int n, input int gap_min, input int gap_max);
    for (int i = 0; i < n; i++) begin
      issue_l1a();
      repeat (gap_min + $urandom % (gap_max - gap_min + 1)) @(negedge clk);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; reg_rd = 1;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  task automatic drain();
    int c = 0;
    while ((expq[0].size() != 0 || expq[1].size() != 0) && c < 200000) begin
      @(negedge clk); c++;
    end
    check(c < 200000, "all fragments delivered");
    repeat (50) @(negedge clk);
  endtask

  // ---------------- S-Link fragment checker ----------------
  logic [31:0] frag[2][$];
  always @(posedge clk) if (rst_n) begin
    if (busy) n_busy++;
    for (int h = 0; h < 2; h++) if (sl_valid[h] && sl_ready[h]) begin
      frag[h].push_back(sl_data[h]);
      if (sl_eof[h]) begin
        check_fragment(h);
        frag[h].delete();
      end
    end
  end

  task automatic check_fragment(input int h);
    exp_t e;
    int n, i, ndata, exp_link, nev;
    logic [15:0] act;
    bit ok = 1;
    n = frag[h].size();
    n_frag[h]++;
    if (expq[h].size() == 0) begin check(0, "unexpected fragment"); return; end
    e = expq[h].pop_front();
    act = e.act & (h == 0 ? 16'h00FF : 16'hFF00);
    ok &= frag[h][0] == SLINK_BOF && frag[h][1] == ROD_HDR_MARKER && frag[h][n-1] == SLINK_EOF;
    ok &= frag[h][EXT_L1ID_WORD] == e.ext;
    ndata = n - SLINK_HDR_WORDS - SLINK_TRL_WORDS;
    ok &= frag[h][n-3] == 32'(ndata);
    i = SLINK_HDR_WORDS;
    exp_link = 0; nev = 0;
    while (i < n - SLINK_TRL_WORDS) begin
      logic [31:0] hd, tr;
      int lk, j;
      hd = frag[h][i];
      lk = int'(hd[23:20]);
      while (exp_link < 16 && !act[exp_link]) exp_link++;
      ok &= hd[31:29] == TYPE_HDR && lk == exp_link;
      j = i + 1;
      while (j < n - SLINK_TRL_WORDS && frag[h][j][31:29] != TYPE_TRL) j++;
      tr = frag[h][j];
      case (trailer_kind(tr))
        EV_VETO: begin
          n_veto++; vetoes_seen[lk]++;
          // link 11 shares serial line 3 with the silent module at 80 Mb/s
          if (lk == 11 && dead[3]) n_shared_veto++;
        end
        EV_SKIP:    n_skip++;
        EV_TIMEOUT: n_tmo++;
        default: begin
          n_module++;
          if (hd[26] || hd[25]) n_flagged++;
          else if (vetoes_seen[lk] > 0) n_l1corr++;
          // only the module with the faulty skip count may be out of step
          if (lk != 6) ok &= !(hd[26] || hd[25]);
        end
      endcase
      if (trailer_kind(tr) != EV_MODULE) ok &= hd[26] && hd[25];
      exp_link++; nev++;
      i = j + 1;
    end
    ok &= nev == $countones(act);
    if (e.act == 16'h3333) n_160_frags++;
    if (!ok) begin
      n_bad_frag++;
      if (n_bad_frag < 5) begin
        $display("bad fragment half %0d ext %08h act %04h:", h, e.ext, act);
        foreach (frag[h][k]) $display("  %08h", frag[h][k]);
      end
    end
    check(ok, "fragment content");
  endtask

  // ---------------- histogram readout ----------------
  longint occ_sum;
  int     dma_words;
  always @(posedge clk) if (rst_n)
    for (int h = 0; h < 2; h++) if (dma_valid[h] && dma_ready[h]) begin
      dma_words++;
      occ_sum += longint'(dma_data[h]);
    end

  // hits still on their way: in a link FIFO, the formatter or the histogrammer
  task automatic wait_histo_idle();
    int quiet = 0;
    while (quiet < 2000) begin
      @(negedge clk);
      quiet = (|lk_valid || busy || |ss_we) ? 0 : quiet + 1;
    end
  endtask

  task automatic histo_readout_all();
    int c = 0;
    bit d0 = 0, d1 = 0;
    occ_sum = 0; dma_words = 0;
    wr(16'h0810, 32'h6);          // start readout, clear while reading
    while (!(d0 && d1) && c < 4000000) begin
      @(posedge clk);
      if (histo_done[0]) d0 = 1;
      if (histo_done[1]) d1 = 1;
      c++;
    end
    repeat (5) @(negedge clk);
    check(d0 && d1, "histogram readout completed");
    check(dma_words == 2 * 128 * 2880, "one word per pixel");
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] d;
    int sum_veto, sum_skip, skips_before, hits_before, veto_before;
    sl_ready = '1; dma_ready = '1;
    l1a_info = '0;
    for (int l = 0; l < 16; l++) vetoes_seen[l] = 0;
    n_frag = '{0, 0}; n_module = 0; n_veto = 0; n_skip = 0; n_tmo = 0; n_flagged = 0;
    n_l1corr = 0; n_shared_veto = 0; n_busy = 0; n_160_frags = 0; n_bad_frag = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr(16'h0808, 32'd400);           // module timeout
    wr(16'h080C, 32'd456789);        // run number

    // 1. mechanism off, fast triggers, module 6 miscounts skips
    skip_bug[6] = 1;
    triggers(300, 8, 20);
    drain();
    skip_bug[6] = 0;
    check(n_skip > 0, "skipped-trigger events (mechanism off)");
    check(n_flagged > 0, "desynchronised events flagged");
    rd(16'h0818, d);
    check(d[6], "underflow guard triggered on the miscounting module");
    wr(16'h0810, 32'h8);             // clear underflow flags

    // 2. threshold 15
    skips_before = 0;
    for (int l = 0; l < 16; l++) skips_before += m_skip[l];
    wr(16'h0814, 32'd15);
    triggers(300, 8, 20);
    drain();
    begin
      int s = 0;
      for (int l = 0; l < 16; l++) s += m_skip[l];
      check(s == skips_before, "no MCC buffer overflow with threshold 15");
    end
    check(n_veto > 0, "ROD-veto events");
    check(n_l1corr > 0, "L1ID correction after vetoes");
    // monitor counters over the register bus (reset on read)
    wr(16'h0810, 32'h1);
    sum_veto = 0; sum_skip = 0;
    for (int l = 0; l < 16; l++) begin
      rd(16'h0900 + 16'(4 * (16 * 2 + l)), d); sum_veto += int'(d);
      rd(16'h0900 + 16'(4 * (16 * 3 + l)), d); sum_skip += int'(d);
    end
    check(sum_veto == n_veto, "monitor ROD-veto count");
    check(sum_skip == n_skip, "monitor skipped count");
    rd(16'h0820, d);
    check(int'(d) == n_l1a, "monitor global event count");
    rd(16'h0840 + 16'(4 * 0), d);
    check(d == 0, "no triggers left in flight");

    // 3. S-Link back-pressure fills the link FIFOs
    wr(16'h0814, 32'hFF);
    nhits = 3'd7;
    sl_ready = '0;
    for (int k = 0; k < 50 && !busy; k++) begin
      issue_l1a();
      repeat (50 + $urandom % 21) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(n_busy > 0, "busy raised by full link FIFOs");
    sl_ready = '1;
    drain();
    nhits = 3'd2;

    // 4. silent module on link 3 (shares serial line 3 with link 11)
    wr(16'h0814, 32'd15);
    dead[3] = 1;
    veto_before = n_veto;
    triggers(40, 60, 80);
    drain();
    check(n_tmo > 0, "module timeout events");
    check(vetoes_seen[11] > 0 && n_shared_veto > 0, "shared serial line inhibited");
    // take the dead module out of the run
    cfg_en = 16'hFFF7;
    wr(16'h0800, 32'(cfg_en));
    dead[3] = 0;

    // 5. 160 Mb/s readout mapping
    rate160 = 1;
    wr(16'h0804, 32'h1);
    triggers(60, 10, 30);
    drain();
    check(n_160_frags > 0, "160 Mb/s fragments");

    // 6. calibration, ECRID >= 0x80, empty events: no hit may reach the histograms
    // a calibration scan is a new run: reset slave and modules, then configure
    rate160 = 0;
    @(negedge clk); rst_n = 0;
    repeat (5) @(negedge clk); rst_n = 1;
    wr(16'h0808, 32'd400);
    wr(16'h0814, 32'd15);
    wr(16'h0804, 32'h2);             // calibration, ToT histograms, 80 Mb/s
    expect_slink = 0;
    nhits = 3'd0;
    for (int k = 0; k < 16; k++) begin
      ecrid = 8'h80 + 8'(k);
      l1id = 24'(k);                 // header word = 0x80..._..., a "hit" pattern
      triggers(5, 40, 60);
    end
    wait_histo_idle();
    wr(16'h0804, 32'h2 | (32'(RO_ONLINE_OCC) << 4) | 32'h8);
    histo_readout_all();
    check(occ_sum == 0, "no header word taken as a hit (ECRID >= 0x80)");
    $display("empty-event scan: histogram sum %0d", occ_sum);

    // 7. calibration with hits, occupancy histograms
    hits_before = 0;
    for (int l = 0; l < 16; l++) hits_before += m_hits[l];
    nhits = 3'd3;
    wr(16'h0814, 32'hFF);
    triggers(200, 30, 50);
    wait_histo_idle();
    begin
      int hits_now = 0;
      for (int l = 0; l < 16; l++) hits_now += m_hits[l];
      histo_readout_all();
      check(occ_sum == longint'(hits_now - hits_before), "total occupancy equals hits sent");
      $display("histogrammed hits %0d (sent %0d)", occ_sum, hits_now - hits_before);
    end

    $display("mechanisms: fragments %0d/%0d module %0d veto %0d skip %0d timeout %0d flagged %0d l1corr %0d shared %0d busy %0d 160 %0d",
             n_frag[0], n_frag[1], n_module, n_veto, n_skip, n_tmo, n_flagged, n_l1corr,
             n_shared_veto, n_busy, n_160_frags);
    check(n_bad_frag == 0, "no malformed fragment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
