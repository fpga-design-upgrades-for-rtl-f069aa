// pending_trig_counter: triggers-in-flight tracking for one formatter link
// (the tr_tbprocessed count of the Smart L1A forwarding mechanism).
//
// The count rises by one for every L1A actually forwarded to the module on
// this link (trig_sent) and falls by 1 + skipped when the link delivers a
// module trailer (evt_rcvd, with the MCC skipped-trigger count of that event,
// because the MCC answers skipped triggers with that count instead of data).
// mod_pending_ok (modPendingStatus) is 0 while the count exceeds (strictly)
// the threshold, which tells the top level to inhibit the next trigger to this
// module. A threshold register value of 0xFF switches the mechanism off (the
// output then stays 1); otherwise its low 6 bits are the threshold.
// Underflow guard: a decrement that would take the count below zero is ignored
// while the increment of the same cycle is still applied, and the sticky
// underflow flag is set for debugging. Increments saturate at the top of the
// counter. All outputs are registered state or simple functions of it; a
// change on the inputs affects mod_pending_ok one cycle later.
module pending_trig_counter #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       thr_reg,      // pendTrigThrReg, 0xFF = off
  input  logic             trig_sent,
  input  logic             evt_rcvd,
  input  logic [3:0]       evt_skipped,
  input  logic             clr_underflow,
  output logic [CNT_W-1:0] pending,
  output logic             mod_pending_ok,
  output logic             underflow
);
  logic [CNT_W:0] inc_val;
  logic [CNT_W:0] dec_val;
  logic [CNT_W:0] nxt;
  logic           neg;

  always_comb begin
    inc_val = {1'b0, pending} + ((trig_sent && pending != '1) ? 1'b1 : 1'b0);
    dec_val = evt_rcvd ? (CNT_W+1)'(evt_skipped) + 1'b1 : '0;
    neg     = dec_val > inc_val;
    nxt     = neg ? inc_val : inc_val - dec_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      underflow <= 1'b0;
    end else begin
      pending <= nxt[CNT_W-1:0];
      if (neg)                underflow <= 1'b1;
      else if (clr_underflow) underflow <= 1'b0;
    end
  end

  assign mod_pending_ok = (thr_reg == 8'hFF) || (pending <= CNT_W'(thr_reg[5:0]));
endmodule
