// tb_router: random fragment words with and without am_i_dataword, in
// datataking and calibration modes, with random back-pressure on both
// outputs. Checks that the S-Link stream equals the input stream when
// enabled, and that hits are extracted exactly from module data words with
// code 100 and a valid row/column, with the Pixel field mapping. It replays
// the case that used to corrupt histograms: extended-L1ID header words with
// ECRID = 0x80.. (bits 31:29 = 100) must never become hits.
module tb_router;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  logic slink_en, histo_en, in_valid, in_dataword, in_eof, in_ready;
  logic [31:0] in_data, sl_data, hit_count;
  logic sl_valid, sl_eof, sl_ready, hit_valid, hit_ready;
  hit_t hit;

  int checks = 0, failures = 0, n_hits = 0, n_hdr80 = 0;
  logic [32:0] sl_exp[$];
  hit_t hit_exp[$];

  router dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sl_valid && sl_ready) begin
      automatic logic [32:0] e = sl_exp.pop_front();
      check({sl_eof, sl_data} == e, "S-Link word");
    end
    if (hit_valid && hit_ready) begin
      automatic hit_t e = hit_exp.pop_front();
      check(hit == e, "hit fields");
      n_hits++;
    end
    sl_ready  <= ($urandom % 4) != 0;
    hit_ready <= ($urandom % 3) != 0;
  end

  initial begin
    in_valid = 0; in_data = 0; in_dataword = 0; in_eof = 0;
    slink_en = 1; histo_en = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i == 2000) begin slink_en = 0; histo_en = 1; end   // calibration
      if (i == 4000) begin slink_en = 1; histo_en = 0; end   // plain datataking
      in_valid = ($urandom % 4) != 0;
      in_eof   = ($urandom % 16) == 0;
      case ($urandom % 4)
        0: begin  // header word 7 with ECRID >= 0x80
          in_data = {8'h80 | 8'($urandom % 16), 24'($urandom)};
          in_dataword = 0;
        end
        1: begin  // random non-hit
          in_data = $urandom; in_dataword = $urandom % 2;
        end
        default: begin  // module hit word, sometimes out of range
          in_data = {3'b100, 1'($urandom), 4'($urandom), 8'($urandom), 3'($urandom),
                     5'($urandom % 20), 8'($urandom % 170)};
          in_dataword = 1;
        end
      endcase
      // wait for acceptance
      while (1) begin
        automatic bit acc = in_ready;   // stable during the low clock phase
        @(posedge clk);
        if (!in_valid || acc) break;
        @(negedge clk);
      end
      if (in_valid) begin
        if (slink_en) sl_exp.push_back({in_eof, in_data});
        if (histo_en && in_dataword && in_data[31:29] == 3'b100 &&
            in_data[7:0] < 160 && in_data[12:8] < 18) begin
          automatic hit_t h;
          h.row = in_data[7:0]; h.col = in_data[12:8]; h.tot = in_data[23:16];
          h.chip = {in_data[28], in_data[15:13], in_data[27:24]};
          hit_exp.push_back(h);
        end
        if (!in_dataword && in_data[31:29] == 3'b100) n_hdr80++;
      end
      #1;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    check(sl_exp.size() == 0 && hit_exp.size() == 0, "all outputs delivered");
    check(n_hits > 100 && n_hdr80 > 100, "hits and ECRID>=0x80 headers exercised");
    check(32'(n_hits) == hit_count, "hit counter");
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
