// tb_histo_readout: streams random 36-bit histogram words through each of
// the four readout schemes, with random back-pressure, and compares the
// 32-bit output words with independently packed reference words; checks
// the word count per scheme (2 per pixel, 1 per pixel, 1 per 4 pixels) and
// the flush of a partly filled OFFLINE_OCCUPANCY word.
module tb_histo_readout;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  ro_scheme_e scheme;
  logic occ_only, flush, in_valid, in_ready, out_valid, out_ready;
  logic [7:0] expected_hits;
  logic [35:0] in_data;
  logic [31:0] out_data;

  int checks = 0, failures = 0, n_out;
  logic [31:0] exp_q[$];

  histo_readout dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      automatic logic [31:0] e = exp_q.pop_front();
      checks++; n_out++;
      if (out_data != e) begin failures++; $display("FAIL %s got %08h exp %08h", scheme.name(), out_data, e); end
    end
    out_ready <= ($urandom % 3) != 0;
  end

  function automatic int occ_of(input logic [35:0] w, input bit oo);
    return oo ? int'(w[23:0]) : int'(w[35:28]);
  endfunction

  task automatic run(input ro_scheme_e s, input bit oo, input int npix);
    logic [31:0] pk;
    int np;
    scheme = s; occ_only = oo; n_out = 0; pk = 0; np = 0;
    for (int p = 0; p < npix; p++) begin
      logic [35:0] w;
      int o8;
      w = {4'($urandom), $urandom};
      if (oo && $urandom % 2) w[23:0] = 24'($urandom % 300);
      o8 = occ_of(w, oo) > 255 ? 255 : occ_of(w, oo);
      case (s)
        RO_LONG_TOT:  begin exp_q.push_back(w[31:0]); exp_q.push_back({28'd0, w[35:32]}); end
        RO_SHORT_TOT: exp_q.push_back({8'(int'(expected_hits) > o8 ? int'(expected_hits) - o8 : 0),
                                        w[27:16], w[15:4]});
        RO_ONLINE_OCC: exp_q.push_back({8'd0, 24'(occ_of(w, oo))});
        default: begin
          pk[8*np +: 8] = 8'(o8); np++;
          if (np == 4) begin exp_q.push_back(pk); pk = 0; np = 0; end
        end
      endcase
      in_valid = 1; in_data = w;
      while (1) begin
        automatic bit acc = in_ready;
        @(posedge clk);
        if (acc) break;
        #1;
      end
      #1;
    end
    in_valid = 0;
    if (np != 0) begin
      exp_q.push_back(pk);
      @(negedge clk); flush = 1;
      while (exp_q.size() != 0) @(negedge clk);
      flush = 0;
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    case (s)
      RO_LONG_TOT: check(n_out == 2 * npix, "LONG_TOT two words per pixel");
      RO_OFFLINE_OCC: check(n_out == (npix + 3) / 4, "OFFLINE_OCCUPANCY one word per 4 pixels");
      default: check(n_out == npix, "one word per pixel");
    endcase
  endtask

  initial begin
    in_valid = 0; in_data = 0; flush = 0; expected_hits = 8'd100;
    scheme = RO_LONG_TOT; occ_only = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    run(RO_LONG_TOT, 0, 500);
    run(RO_SHORT_TOT, 0, 500);
    run(RO_ONLINE_OCC, 1, 500);
    run(RO_OFFLINE_OCC, 0, 400);
    run(RO_OFFLINE_OCC, 1, 403);
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
