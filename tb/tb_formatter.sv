// tb_formatter: four links answering every forwarded trigger with one module
// event after a random delay, or dropping it like a full module buffer does
// and counting the drop in the skip field of its newest waiting header. The
// expected stream then holds one skipped-trigger empty event per drop.
// Checks the per-link triggers-in-flight count (sent triggers minus received
// events, 1 + skip count per trailer) and mod_pending_ok against the
// threshold, the readout order and content of the events (trailer bits [9:4]
// masked, they hold the live pending count), the end-of-trigger flag, and
// busy/overflow when a link floods its FIFO.
module tb_formatter;
  import rod_pkg::*;
  localparam int N = 4, D = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] link_en, in_valid, trig_sent, pend_ok, underflow, trig_mask, fifo_ovf;
  logic [N-1:0][31:0] in_data;
  logic [N-1:0][7:0] pending;
  logic [7:0] thr_reg;
  logic [15:0] timeout_lim;
  logic clr_underflow, trig_empty, trig_pop, out_valid, out_eot, out_ready, busy;
  logic [31:0] out_data;

  int checks = 0, failures = 0, n_blocked = 0;
  logic [N-1:0] tq[$];
  logic [32:0] exp_q[$];
  logic [31:0] pend_ev[N][$];   // words of events not yet delivered to the link
  int sent_cnt[N], rcvd_cnt[N], cur_skip[N];
  int exp_pushed = 0, exp_popped = 0, n_skips = 0, n_skip_ev = 0;
  int last_hdr_exp[N];          // absolute exp_q index of the newest undelivered header

  formatter #(.N_LINKS(N), .LINK_BASE(0), .FIFO_DEPTH(D), .PEND_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign trig_empty = tq.size() == 0;
  assign trig_mask  = trig_empty ? '0 : tq[0];

  always @(posedge clk) if (rst_n) begin
    if (trig_pop) void'(tq.pop_front());
    if (out_valid && out_ready) begin
      logic [32:0] e, g;
      e = exp_q.pop_front();
      exp_popped++;
      if (out_data[31:29] == TYPE_TRL && trailer_kind(out_data) == EV_SKIP) n_skip_ev++;
      g = {out_eot, out_data};
      if (out_data[31:29] == TYPE_TRL) begin g[9:4] = 0; e[9:4] = 0; end
      checks++;
      if (g != e) begin failures++; $display("FAIL out %09h exp %09h", g, e); end
    end
    out_ready <= ($urandom % 3) != 0;
  end

  initial begin
    link_en = '1; thr_reg = 8'd2; timeout_lim = 16'd5000; clr_underflow = 0;
    in_valid = '0; in_data = '0; trig_sent = '0;
    for (int l = 0; l < N; l++) begin sent_cnt[l] = 0; rcvd_cnt[l] = 0; cur_skip[l] = 0; last_hdr_exp[l] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // check counters and threshold
      for (int l = 0; l < N; l++) begin
        check(int'(pending[l]) == sent_cnt[l] - rcvd_cnt[l], "pending count");
        check(pend_ok[l] == (sent_cnt[l] - rcvd_cnt[l] <= 2), "pending status");
        if (!pend_ok[l]) n_blocked++;
      end
      in_valid = '0;
      trig_sent = '0;
      // new trigger to every link, 1 in 3 cycles
      if ($urandom % 3 == 0 && tq.size() < 4) begin
        trig_sent = '1;
        tq.push_back('1);
        for (int l = 0; l < N; l++) begin
          logic [31:0] w;
          int hi;
          sent_cnt[l]++;
          hi = pend_ev[l].size() - 3;
          if ($urandom % 2 == 0 && pend_ev[l].size() >= 3 && pend_ev[l][hi][19:16] != 4'hF) begin
            // the module drops this trigger and counts it in the header of
            // its newest event that has not left yet; the formatter must
            // answer with a skipped-trigger empty event
            pend_ev[l][hi][19:16] += 4'd1;
            exp_q[last_hdr_exp[l] - exp_popped][19:16] += 4'd1;
            exp_q.push_back({1'b0, dummy_header(4'(l))});
            exp_q.push_back({l == N - 1, dummy_trailer(EV_SKIP, 4'(l))});
            exp_pushed += 2;
            n_skips++;
          end else begin
            w = {3'b001, 5'b0, 4'(l), 4'd0, 8'(t), 8'(t)};
            pend_ev[l].push_back(w);
            last_hdr_exp[l] = exp_pushed;
            exp_q.push_back({1'b0, w});
            w = {3'b100, 29'($urandom)};
            pend_ev[l].push_back(w);
            exp_q.push_back({1'b0, w});
            w = {3'b010, 29'($urandom)};
            pend_ev[l].push_back(w);
            exp_q.push_back({l == N - 1, w});
            exp_pushed += 3;
          end
        end
      end
      // each link delivers one word now and then
      for (int l = 0; l < N; l++)
        if (pend_ev[l].size() > 0 && $urandom % 8 == 0) begin
          in_valid[l] = 1;
          in_data[l] = pend_ev[l].pop_front();
          if (in_data[l][31:29] == TYPE_HDR) cur_skip[l] = int'(in_data[l][19:16]);
          if (in_data[l][31:29] == TYPE_TRL) rcvd_cnt[l] += 1 + cur_skip[l];
        end
    end
    // drain
    @(negedge clk);
    in_valid = '0; trig_sent = '0;
    for (int c = 0; c < 2000 && (exp_q.size() != 0 || pend_ev[0].size() != 0); c++) begin
      @(negedge clk);
      in_valid = '0;
      for (int l = 0; l < N; l++)
        if (pend_ev[l].size() > 0) begin
          in_valid[l] = 1; in_data[l] = pend_ev[l].pop_front();
          if (in_data[l][31:29] == TYPE_HDR) cur_skip[l] = int'(in_data[l][19:16]);
          if (in_data[l][31:29] == TYPE_TRL) rcvd_cnt[l] += 1 + cur_skip[l];
        end
    end
    @(negedge clk); in_valid = '0;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all events read out");
    for (int l = 0; l < N; l++) check(pending[l] == 0, "no triggers left in flight");
    check(n_blocked > 0, "threshold exceeded at least once");
    check(n_skips > 0 && n_skip_ev == n_skips, "one skipped-trigger event per skip");
    $display("skips %0d, skipped-trigger events %0d", n_skips, n_skip_ev);
    check(!busy && fifo_ovf == 0, "not busy when drained");
    // flood link 2 with words nobody asked for
    for (int i = 0; i < D + 2; i++) begin
      in_valid = 4'b0100; in_data[2] = {3'b100, 29'(i)};
      @(negedge clk);
    end
    in_valid = '0;
    check(busy, "busy when a link FIFO fills");
    check(fifo_ovf == 4'b0100, "overflow flagged on the flooded link");
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
