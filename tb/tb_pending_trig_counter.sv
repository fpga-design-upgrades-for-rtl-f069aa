// tb_pending_trig_counter: random sent-trigger / received-event traffic
// against a reference count; checks the threshold compare (strictly greater
// than the threshold inhibits, 0xFF = off), that a decrement below zero is
// ignored while the increment of the same cycle is kept, and the sticky
// underflow flag with its clear.
module tb_pending_trig_counter;
  logic clk = 0, rst_n = 0;
  logic [7:0] thr_reg;
  logic trig_sent, evt_rcvd, clr_underflow;
  logic [3:0] evt_skipped;
  logic [7:0] pending;
  logic mod_pending_ok, underflow;
  int checks = 0, failures = 0, n_under = 0, n_block = 0;
  int ref_cnt = 0;
  bit ref_uf = 0;

  pending_trig_counter #(.CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ref=%0d got=%0d", what, ref_cnt, pending); end
  endtask

  initial begin
    thr_reg = 8'd15; trig_sent = 0; evt_rcvd = 0; evt_skipped = 0; clr_underflow = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(32'(pending) == ref_cnt, "count");
      check(underflow == ref_uf, "underflow flag");
      if (thr_reg == 8'hFF) check(mod_pending_ok, "off never inhibits");
      else check(mod_pending_ok == (ref_cnt <= int'(thr_reg[5:0])), "threshold compare");
      if (!mod_pending_ok) n_block++;
      if (cyc % 1000 == 999) thr_reg = (thr_reg == 8'd15) ? 8'hFF : (cyc > 2500 ? 8'd3 : 8'd15);
      trig_sent     = ($urandom % 100) < (cyc % 400 < 200 ? 60 : 30);
      evt_rcvd      = ($urandom % 100) < 45;
      evt_skipped   = (($urandom % 10) == 0) ? 4'($urandom % 3) : 4'd0;
      clr_underflow = ($urandom % 50) == 0;
      begin
        automatic int inc = trig_sent && ref_cnt != 255 ? 1 : 0;
        automatic int dec = evt_rcvd ? 1 + int'(evt_skipped) : 0;
        if (dec > ref_cnt + inc) begin
          ref_cnt = ref_cnt + inc; ref_uf = 1; n_under++;
        end else begin
          ref_cnt = ref_cnt + inc - dec;
          if (clr_underflow) ref_uf = 0;
        end
      end
    end
    check(n_under > 0, "underflow exercised");
    check(n_block > 0, "threshold exceeded at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
