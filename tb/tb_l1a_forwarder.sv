// tb_l1a_forwarder: random pending status, link enables and readout speed;
// checks the forwarded serial-link triggers and the sent/inhibited masks one
// cycle after each L1A against the serial-to-formatter link table
// (80 Mb/s: xc(i) -> links i, i+8; 160 Mb/s: xc(i) -> 2i even, 2i-1 odd).
module tb_l1a_forwarder;
  logic clk = 0, rst_n = 0;
  logic rate160, l1a;
  logic [15:0] link_en, pend_ok, active, sent, inhibited;
  logic [7:0] xc_trig;
  int checks = 0, failures = 0, n_inh = 0, n_80 = 0, n_160 = 0;

  l1a_forwarder #(.N_XC(8), .N_FMT(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // independent table of Table-3.4 style mapping
  function automatic logic [15:0] links_of(input int i, input bit r160);
    logic [15:0] m;
    m = '0;
    if (!r160) begin m[i] = 1; m[i+8] = 1; end
    else begin
      case (i)
        0: m[0] = 1;  1: m[1] = 1;  2: m[4] = 1;  3: m[5] = 1;
        4: m[8] = 1;  5: m[9] = 1;  6: m[12] = 1; default: m[13] = 1;
      endcase
    end
    return m;
  endfunction

  initial begin
    l1a = 0; rate160 = 0; link_en = '1; pend_ok = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0]  exp_xc;
      logic [15:0] exp_act, exp_sent;
      @(negedge clk);
      rate160 = (t / 500) % 2;
      link_en = ($urandom % 4 == 0) ? 16'($urandom) : 16'hFFFF;
      pend_ok = ~(16'(1 << ($urandom % 16)) & (($urandom % 2) ? 16'hFFFF : 16'h0));
      l1a = ($urandom % 3) != 0;
      exp_act = '0; exp_sent = '0;
      for (int i = 0; i < 8; i++) begin
        logic [15:0] m;
        m = links_of(i, rate160);
        exp_act |= m & link_en;
        exp_xc[i] = ((m & link_en & ~pend_ok) == 0);
        if (exp_xc[i]) exp_sent |= m & link_en;
      end
      @(negedge clk);
      check(active == exp_act, "active links");
      check(xc_trig == (l1a ? exp_xc : 8'h0), "serial triggers");
      check(sent == (l1a ? exp_sent : 16'h0), "sent mask");
      check(inhibited == (l1a ? (exp_act & ~exp_sent) : 16'h0), "inhibited mask");
      if (l1a && inhibited != 0) n_inh++;
      if (rate160) n_160++; else n_80++;
      l1a = 0;
    end
    check(n_inh > 0 && n_80 > 0 && n_160 > 0, "inhibit and both modes exercised");
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
