// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, empty/full/count, almost_full and the sticky overflow flag.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full, af, ovf;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_ovf = 0;
  logic [W-1:0] q[$];
  bit exp_ovf = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D), .AF_MARGIN(2)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full,
    .almost_full(af), .count, .overflow(ovf));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (size %0d)", what, q.size()); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(32'(count) == q.size(), "count");
      check(af == (q.size() >= D - 2), "almost_full");
      check(ovf == exp_ovf, "overflow");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      wr_en   = ($urandom % 100) < (cyc < 1500 ? 65 : 35);
      rd_en   = ($urandom % 100) < 50;
      wr_data = W'($urandom);
      // model of the coming clock edge
      begin
        automatic int sz = q.size();
        if (wr_en && sz == D) begin exp_ovf = 1; n_ovf++; end
        if (rd_en && sz > 0) void'(q.pop_front());
        if (wr_en && sz < D) q.push_back(wr_data);
      end
    end
    check(n_ovf > 0, "overflow case exercised");
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
