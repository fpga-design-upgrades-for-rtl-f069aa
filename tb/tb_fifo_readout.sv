// tb_fifo_readout: drives the readout controller one trigger at a time with
// random link enables, sent/inhibited masks, module events carrying random
// skipped-trigger counts, and occasional silent modules. A reference model
// predicts every output word: ROD-veto events for inhibited links (with the
// L1ID offset growing), skipped-trigger events after a header announcing
// skips, timeout events for silent modules, corrected L1IDs in headers,
// pending counts in trailers and the end-of-trigger flag. The output is
// back-pressured at random.
module tb_fifo_readout;
  import rod_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] link_en, trig_sent, lf_empty, lf_pop;
  logic [N-1:0][31:0] lf_data;
  logic [N-1:0][7:0] pend_cnt;
  logic [15:0] timeout_lim;
  logic trig_empty, trig_pop, out_valid, out_eot, out_ready;
  logic [31:0] out_data;

  int checks = 0, failures = 0;
  int n_veto = 0, n_skip = 0, n_tmo = 0, n_mod = 0, n_empty_trig = 0;
  logic [31:0] lq[N][$];
  logic [N-1:0] tq[$];
  logic [32:0] exp_q[$];   // {eot, word}

  fifo_readout #(.N_LINKS(N), .LINK_BASE(4), .PEND_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always_comb begin
    trig_empty = tq.size() == 0;
    trig_sent  = trig_empty ? '0 : tq[0];
    for (int l = 0; l < N; l++) begin
      lf_empty[l] = lq[l].size() == 0;
      lf_data[l]  = lf_empty[l] ? 32'h0 : lq[l][0];
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (trig_pop) void'(tq.pop_front());
    for (int l = 0; l < N; l++) if (lf_pop[l]) void'(lq[l].pop_front());
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected output word");
      else begin
        automatic logic [32:0] e = exp_q.pop_front();
        checks++;
        if ({out_eot, out_data} != e) begin
          failures++;
          $display("FAIL word got %0b_%08h exp %0b_%08h", out_eot, out_data, e[32], e[31:0]);
        end
      end
    end
    out_ready <= ($urandom % 4) != 0;
  end

  int l1off[N];
  int skp[N];

  initial begin
    timeout_lim = 16'd30;
    link_en = '1;
    for (int l = 0; l < N; l++) begin pend_cnt[l] = 8'(l * 30); l1off[l] = 0; skp[l] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [N-1:0] en, mask;
      int last;
      @(negedge clk);
      en   = ($urandom % 20 == 0) ? 4'h0 : (($urandom % 3 == 0) ? 4'($urandom) : 4'hF);
      mask = ($urandom % 2) ? 4'hF : 4'($urandom);
      link_en = en;
      last = -1;
      for (int l = 0; l < N; l++) if (en[l]) last = l;
      if (en == 0) n_empty_trig++;
      for (int l = 0; l < N; l++) begin
        if (!en[l]) continue;
        if (!mask[l]) begin
          exp_q.push_back({1'b0, dummy_header(4'(4 + l))});
          exp_q.push_back({l == last, dummy_trailer(EV_VETO, 4'(4 + l))});
          l1off[l]++; n_veto++;
        end else if (skp[l] > 0) begin
          exp_q.push_back({1'b0, dummy_header(4'(4 + l))});
          exp_q.push_back({l == last, dummy_trailer(EV_SKIP, 4'(4 + l))});
          skp[l]--; n_skip++;
        end else if ($urandom % 15 == 0) begin
          exp_q.push_back({1'b0, dummy_header(4'(4 + l))});
          exp_q.push_back({l == last, dummy_trailer(EV_TIMEOUT, 4'(4 + l))});
          n_tmo++;
        end else begin
          logic [3:0] k;
          logic [7:0] l1, bc;
          logic [31:0] w;
          int nh;
          k  = ($urandom % 6 == 0) ? 4'(1 + $urandom % 3) : 4'd0;
          l1 = 8'($urandom); bc = 8'($urandom);
          w  = {3'b001, 5'b0, 4'(4 + l), k, l1, bc};
          lq[l].push_back(w);
          exp_q.push_back({1'b0, w[31:16], l1 + 8'(l1off[l]), bc});
          nh = $urandom % 5;
          for (int h = 0; h < nh; h++) begin
            w = {3'b100, 29'($urandom)};
            lq[l].push_back(w);
            exp_q.push_back({1'b0, w});
          end
          w = {3'b010, 29'($urandom)};
          lq[l].push_back(w);
          w[9:4] = (pend_cnt[l] > 63) ? 6'd63 : pend_cnt[l][5:0];
          exp_q.push_back({l == last, w});
          skp[l] = k; n_mod++;
        end
      end
      tq.push_back(mask);
      // wait for this trigger to be fully read out
      while (tq.size() != 0 || exp_q.size() != 0) @(negedge clk);
    end
    check(n_veto > 0 && n_skip > 0 && n_tmo > 0 && n_mod > 0 && n_empty_trig > 0,
          "all event kinds exercised");
    $display("events: module %0d veto %0d skip %0d timeout %0d", n_mod, n_veto, n_skip, n_tmo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
