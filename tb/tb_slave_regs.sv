// tb_slave_regs: checks reset values (threshold 0xFF = Smart L1A off, all
// links enabled, timeout 2048), write/read-back of every configuration
// register and the decoded configuration outputs, one-cycle command pulses,
// and reads of the status, triggers-in-flight and monitor snapshot windows
// with random contents; then random writes and reads of the configuration
// registers checked against a shadow copy.
module tb_slave_regs;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [15:0] addr;
  logic [31:0] wdata, rdata;
  logic [15:0] link_en, timeout_lim, underflow, fifo_ovf;
  logic rate160, calib_mode, histo_dt_en, occ_only, busy, histo_ro_busy;
  logic [1:0] ro_scheme;
  logic [7:0] expected_hits, pend_thr;
  logic [31:0] run_number;
  logic mon_rd_req, histo_ro_start, histo_ro_clear, clr_underflow, histo_flush;
  logic [15:0][7:0] pending;
  logic [4:0][15:0][18:0] mon_snap;
  logic [18:0] mon_global;
  int checks = 0, failures = 0;

  slave_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd_en = 1;
    @(negedge clk); rd_en = 0; d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0;
    underflow = 16'h0280; fifo_ovf = 16'h1001; busy = 1; histo_ro_busy = 0;
    for (int l = 0; l < 16; l++) begin
      pending[l] = 8'($urandom);
      for (int t = 0; t < 5; t++) mon_snap[t][l] = 19'($urandom);
    end
    mon_global = 19'h5_4321;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(pend_thr == 8'hFF && link_en == 16'hFFFF && timeout_lim == 16'd2048, "reset values");
    rd(16'h0814, d); check(d == 32'hFF, "threshold reads 0xFF after reset");
    wr(16'h0814, 32'h0F); rd(16'h0814, d);
    check(d == 32'h0F && pend_thr == 8'h0F, "threshold 15");
    wr(16'h0800, 32'h0000_3333); rd(16'h0800, d);
    check(d == 32'h3333 && link_en == 16'h3333, "link enable");
    wr(16'h0804, 32'h0000_6437); rd(16'h0804, d);
    check(d == 32'h6437, "control read back");
    check(rate160 && calib_mode && histo_dt_en && !occ_only && ro_scheme == 2'd3 &&
          expected_hits == 8'h64, "control fields");
    wr(16'h0808, 32'd777); check(timeout_lim == 16'd777, "timeout");
    wr(16'h080C, 32'hDEAD_BEEF); rd(16'h080C, d); check(d == 32'hDEAD_BEEF, "run number");
    // command pulses last one cycle
    @(negedge clk); addr = 16'h0810; wdata = 32'h1B; wr_en = 1;
    @(negedge clk); wr_en = 0;
    check(mon_rd_req && histo_ro_start && clr_underflow && histo_flush && !histo_ro_clear,
          "command pulses");
    @(negedge clk);
    check(!mon_rd_req && !histo_ro_start && !clr_underflow && !histo_flush, "pulses end");
    rd(16'h0818, d); check(d == 32'h0280, "underflow status");
    rd(16'h081C, d); check(d == 32'h0001_1001, "busy/overflow status");
    for (int l = 0; l < 16; l++) begin
      rd(16'h0840 + 16'(4 * l), d); check(d == 32'(pending[l]), "pending window");
    end
    for (int t = 0; t < 5; t++)
      for (int l = 0; l < 16; l++) begin
        rd(16'h0900 + 16'(4 * (16 * t + l)), d); check(d == 32'(mon_snap[t][l]), "monitor window");
      end
    rd(16'h0820, d); check(d == 32'h5_4321, "global counter");
    rd(16'h0B00, d); check(d == 0, "unmapped address reads zero");
    // random traffic on the read/write registers against a shadow copy
    begin
      logic [15:0] m_en, m_ctrl, m_tmo;
      logic [31:0] m_run;
      logic [7:0]  m_thr;
      logic [15:0] a;
      logic [31:0] v;
      m_en = 16'h3333; m_ctrl = 16'h6437; m_tmo = 16'd777; m_run = 32'hDEAD_BEEF; m_thr = 8'h0F;
      for (int i = 0; i < 400; i++) begin
        a = 16'h0800 + 16'(4 * ($urandom % 6));
        if (a == 16'h0810) a = 16'h0814;
        v = $urandom;
        if ($urandom % 2) begin
          wr(a, v);
          case (a)
            16'h0800: m_en   = v[15:0];
            16'h0804: m_ctrl = v[15:0];
            16'h0808: m_tmo  = v[15:0];
            16'h080C: m_run  = v;
            default:  m_thr  = v[7:0];
          endcase
        end
        rd(a, d);
        case (a)
          16'h0800: check(d == {16'd0, m_en},   "random link enable");
          16'h0804: check(d == {16'd0, m_ctrl}, "random control");
          16'h0808: check(d == {16'd0, m_tmo},  "random timeout");
          16'h080C: check(d == m_run,           "random run number");
          default:  check(d == {24'd0, m_thr},  "random threshold");
        endcase
        check(link_en == m_en && timeout_lim == m_tmo && run_number == m_run &&
              pend_thr == m_thr && {expected_hits, 2'b00, ro_scheme, occ_only,
              histo_dt_en, calib_mode, rate160} == {m_ctrl[15:8], 2'b00, m_ctrl[5:0]},
              "configuration outputs follow the registers");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
