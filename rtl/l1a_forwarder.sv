// l1a_forwarder: top-level Smart L1A trigger decision of the ROD slave.
//
// For every L1A it decides, per serial command link xc(i) to the modules,
// whether the trigger is forwarded or inhibited. A serial link is inhibited
// when any enabled formatter link served by it reports mod_pending_ok = 0
// (more triggers in flight than the threshold). The serial-to-formatter link
// map depends on the readout speed (rate160):
//   80 Mb/s : xc(i) serves formatter links i and i+8 (two MCCs share a line,
//             so both are inhibited together)
//   160 Mb/s: xc(i) serves formatter link 2i for even i, 2i-1 for odd i
// active[] lists the formatter links that are enabled and mapped in the
// current mode. One cycle after l1a, xc_trig carries the forwarded triggers,
// sent[] the formatter links whose module really received the trigger and
// inhibited[] the active links whose trigger was vetoed by the ROD.
module l1a_forwarder #(
  parameter int unsigned N_XC  = 8,
  parameter int unsigned N_FMT = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rate160,
  input  logic [N_FMT-1:0] link_en,
  input  logic [N_FMT-1:0] pend_ok,
  input  logic             l1a,
  output logic [N_FMT-1:0] active,
  output logic [N_XC-1:0]  xc_trig,
  output logic [N_FMT-1:0] sent,
  output logic [N_FMT-1:0] inhibited
);
  // serves[i][j]: serial link i serves formatter link j in the current mode
  logic [N_XC-1:0][N_FMT-1:0] serves;
  logic [N_XC-1:0]            xc_ok;
  logic [N_FMT-1:0]           fmt_ok;

  always_comb begin
    serves = '0;
    for (int i = 0; i < N_XC; i++) begin
      if (rate160) begin
        if (i % 2 == 0) serves[i][(2*i) % N_FMT] = 1'b1;
        else            serves[i][(2*i-1) % N_FMT] = 1'b1;
      end else begin
        serves[i][i % N_FMT]          = 1'b1;
        serves[i][(i + N_XC) % N_FMT] = 1'b1;
      end
    end
    active = '0;
    for (int i = 0; i < N_XC; i++) active |= serves[i] & link_en;
    fmt_ok = '0;
    for (int i = 0; i < N_XC; i++) begin
      xc_ok[i] = ((serves[i] & link_en & ~pend_ok) == '0);
      if (xc_ok[i]) fmt_ok |= serves[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xc_trig   <= '0;
      sent      <= '0;
      inhibited <= '0;
    end else begin
      xc_trig   <= l1a ? xc_ok : '0;
      sent      <= l1a ? (active & fmt_ok) : '0;
      inhibited <= l1a ? (active & ~fmt_ok) : '0;
    end
  end
endmodule
