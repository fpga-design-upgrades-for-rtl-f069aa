// tb_histogrammer: random hits (many on a few pixels, back to back, some
// with an out-of-range chip) into a 2-chip histogram in ToT mode, then in
// occupancy mode, each followed by a readout with clear. Every word read out
// is compared with a reference histogram computed in the testbench
// (occupancy, sum ToT, sum ToT^2, saturating); a second readout must return
// zeros. Also checks the rate: with hits always offered, one hit is accepted
// every RD_LAT+1 cycles.
module tb_histogrammer;
  import rod_pkg::*;
  localparam int NC = 2, LAT = 2;
  localparam int NPIX = NC * 2880;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0;
  logic occ_only, hit_valid, hit_ready, ro_start, ro_clear, ro_busy, ro_valid, ro_ready, ro_done;
  hit_t hit;
  logic [35:0] ro_data, ss_wdata, ss_rdata;
  logic ss_re, ss_we;
  logic [AW-1:0] ss_addr;

  int checks = 0, failures = 0;
  logic [35:0] refm [NPIX];
  int n_acc, first_acc, last_acc, cyc, exp_gap, last_cost;

  histogrammer #(.NUM_CHIPS(NC), .RD_LAT(LAT), .AW(AW)) dut (.*);
  ssram_model #(.AW(AW), .RD_LAT(LAT)) u_ram (.clk, .re(ss_re), .we(ss_we), .addr(ss_addr),
                                                .wdata(ss_wdata), .rdata(ss_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [35:0] ref_acc(input logic [35:0] w, input int tot, input bit occ);
    logic [35:0] r = w;
    if (occ) r[23:0] = (w[23:0] == 24'hFFFFFF) ? w[23:0] : w[23:0] + 1;
    else begin
      r[35:28] = (w[35:28] == 8'hFF) ? 8'hFF : w[35:28] + 1;
      r[27:16] = (int'(w[27:16]) + tot > 4095) ? 12'hFFF : 12'(int'(w[27:16]) + tot);
      r[15:0]  = (int'(w[15:0]) + tot * tot > 65535) ? 16'hFFFF : 16'(int'(w[15:0]) + tot * tot);
    end
    return r;
  endfunction

  task automatic send_hits(input int n, input bit occ);
    n_acc = 0; exp_gap = 0;
    for (int i = 0; i < n; i++) begin
      hit_t h;
      h.chip = ($urandom % 50 == 0) ? 8'(NC + $urandom % 4) : 8'($urandom % NC);
      h.row  = ($urandom % 2) ? 8'($urandom % 3) : 8'($urandom % 160);
      h.col  = ($urandom % 2) ? 5'd0 : 5'($urandom % 18);
      h.tot  = 8'($urandom % 64);
      hit_valid = 1; hit = h;
      while (1) begin
        automatic bit acc = hit_ready;   // sampled between clock edges
        @(posedge clk);
        if (acc) break;
        #1;
      end
      // accepted at this edge
      if (n_acc == 0) first_acc = cyc;
      else exp_gap += last_cost;
      last_acc = cyc; n_acc++;
      last_cost = (int'(h.chip) < NC) ? LAT + 1 : 1;
      if (int'(h.chip) < NC) begin
        automatic int a = (int'(h.chip) * 18 + int'(h.col)) * 160 + int'(h.row);
        refm[a] = ref_acc(refm[a], int'(h.tot), occ);
      end
      #1;
    end
    hit_valid = 0;
  endtask

  task automatic readout(input bit expect_zero);
    int idx = 0;
    @(negedge clk);
    ro_start = 1; ro_clear = 1;
    @(negedge clk);
    ro_start = 0;
    while (idx < NPIX) begin
      @(posedge clk);
      if (ro_valid && ro_ready) begin
        check(ro_data == (expect_zero ? 36'h0 : refm[idx]), "histogram word");
        if (ro_data != (expect_zero ? 36'h0 : refm[idx]))
          $display("  pixel %0d got %09h exp %09h", idx, ro_data, refm[idx]);
        idx++;
      end
    end
    @(posedge clk);
    check(ro_done || !ro_busy, "readout finished");
    for (int i = 0; i < NPIX; i++) refm[i] = '0;
  endtask

  always @(negedge clk) ro_ready <= ($urandom % 3) != 0;

  initial begin
    occ_only = 0; hit_valid = 0; hit = '0; ro_start = 0; ro_clear = 0; cyc = 0;
    for (int i = 0; i < NPIX; i++) refm[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    send_hits(3000, 0);
    check(last_acc - first_acc == exp_gap, "one hit every RD_LAT+1 cycles (dropped hits: 1)");
    check(exp_gap > 2000 * (LAT + 1), "rate measured over many hits");
    repeat (5) @(negedge clk);
    readout(0);
    readout(1);
    occ_only = 1;
    @(negedge clk);
    send_hits(2000, 1);
    repeat (5) @(negedge clk);
    readout(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
