// tb_efb_gen_fragment: random events with module data from two formatters
// (some headers deliberately carrying a wrong L1ID or BCID, some ROD-inserted
// empty events) and random output back-pressure. Checks each fragment word by
// word: the 10-word S-Link header with the extended L1ID in word 7, module
// headers flagged in bits 26/25 exactly when they disagree with the master,
// the 6-word trailer with the data count and error summary, the
// am_i_dataword and end-of-fragment flags, and the monitor reports.
module tb_efb_gen_fragment;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] run_number;
  logic [1:0] fmt_active, f_valid, f_eot, f_ready;
  logic [1:0][31:0] f_data;
  logic ev_empty, ev_pop, out_valid, out_dataword, out_eof, out_ready;
  ev_info_t ev_info;
  logic [31:0] out_data;
  logic mon_valid, mon_desync, frag_done;
  ev_kind_e mon_kind;
  logic [3:0] mon_link;

  int checks = 0, failures = 0, n_flag = 0, n_frag = 0, n_dummy = 0;
  ev_info_t evq[$];
  logic [32:0] fq[2][$];        // {eot, word}
  logic [34:0] exp_q[$];        // {eof, dataword, ... word}
  logic [5:0]  exp_mon[$];      // {desync, kind, ...} packed: {desync, kind[1:0], 3'b0}

  efb_gen_fragment dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign ev_empty = evq.size() == 0;
  assign ev_info  = ev_empty ? '0 : evq[0];
  always_comb for (int f = 0; f < 2; f++) begin
    f_valid[f] = fq[f].size() != 0;
    {f_eot[f], f_data[f]} = f_valid[f] ? fq[f][0] : 33'h0;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_pop) void'(evq.pop_front());
    for (int f = 0; f < 2; f++) if (f_valid[f] && f_ready[f]) void'(fq[f].pop_front());
    if (out_valid && out_ready) begin
      automatic logic [34:0] e = exp_q.pop_front();
      checks++;
      if ({out_eof, out_dataword, 1'b0, out_data} != e) begin
        failures++;
        $display("FAIL word %08h dw %0b eof %0b exp %09h", out_data, out_dataword, out_eof, e);
      end
      if (out_eof) n_frag++;
    end
    if (mon_valid) begin
      automatic logic [5:0] m = exp_mon.pop_front();
      check({mon_desync, mon_kind} == m[5:3], "monitor report");
    end
    out_ready <= ($urandom % 4) != 0;
  end

  initial begin
    run_number = 32'h0004_1234;
    fmt_active = 2'b11;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      ev_info_t ev;
      int ndata;
      bit err;
      @(negedge clk);
      ev.ecrid = 8'($urandom); ev.l1id = 24'($urandom); ev.bcid = 12'($urandom);
      ev.trig_type = 8'($urandom);
      fmt_active = (e % 10 == 9) ? 2'b10 : 2'b11;
      exp_q.push_back({2'b00, 1'b0, SLINK_BOF});
      exp_q.push_back({2'b00, 1'b0, ROD_HDR_MARKER});
      exp_q.push_back({2'b00, 1'b0, 32'd9});
      exp_q.push_back({2'b00, 1'b0, 32'h0301_0000});
      exp_q.push_back({2'b00, 1'b0, 32'h0011_0000});
      exp_q.push_back({2'b00, 1'b0, run_number});
      exp_q.push_back({2'b00, 1'b0, ev.ecrid, ev.l1id});
      exp_q.push_back({2'b00, 1'b0, 20'd0, ev.bcid});
      exp_q.push_back({2'b00, 1'b0, 24'd0, ev.trig_type});
      exp_q.push_back({2'b00, 1'b0, 32'd0});
      ndata = 0; err = 0;
      for (int f = 0; f < 2; f++) begin
        if (!fmt_active[f]) continue;
        for (int l = 0; l < 2; l++) begin
          logic [31:0] h, hx, tr;
          bit bad_l1, bad_bc, dummy;
          dummy  = ($urandom % 8) == 0;
          bad_l1 = ($urandom % 6) == 0;
          bad_bc = ($urandom % 6) == 0;
          if (dummy) h = dummy_header(4'(4 * f + l));
          else h = {3'b001, 5'b0, 4'(4 * f + l), 4'd0,
                    ev.l1id[7:0] ^ (bad_l1 ? 8'h01 : 8'h00), ev.bcid[7:0] ^ (bad_bc ? 8'h10 : 8'h00)};
          hx = h;
          if (h[15:8] != ev.l1id[7:0]) hx[26] = 1;
          if (h[7:0]  != ev.bcid[7:0]) hx[25] = 1;
          if (hx != h) begin err = 1; n_flag++; end
          fq[f].push_back({1'b0, h});
          exp_q.push_back({2'b01, 1'b0, hx}); ndata++;
          if (!dummy) for (int k = 0; k < 2; k++) begin
            automatic logic [31:0] w = {3'b100, 29'($urandom)};
            fq[f].push_back({1'b0, w});
            exp_q.push_back({2'b01, 1'b0, w}); ndata++;
          end
          tr = dummy ? dummy_trailer(EV_SKIP, 4'(4 * f + l)) : {3'b010, 29'h0};
          if (dummy) n_dummy++;
          fq[f].push_back({l == 1, tr});
          exp_q.push_back({2'b01, 1'b0, tr}); ndata++;
          exp_mon.push_back({hx != h, dummy ? EV_SKIP : EV_MODULE, 3'b0});
        end
      end
      exp_q.push_back({2'b00, 1'b0, 31'd0, err});
      exp_q.push_back({2'b00, 1'b0, 32'd0});
      exp_q.push_back({2'b00, 1'b0, 32'd2});
      exp_q.push_back({2'b00, 1'b0, 32'(ndata)});
      exp_q.push_back({2'b00, 1'b0, 32'd0});
      exp_q.push_back({2'b10, 1'b0, SLINK_EOF});
      evq.push_back(ev);
      while (exp_q.size() != 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(n_frag == 200, "fragment count");
    check(exp_mon.size() == 0, "all monitor reports seen");
    check(n_flag > 0 && n_dummy > 0, "mismatch flagging exercised");
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
