// fifo_readout: readout controller of one quad-link formatter.
//
// For every entry of the trigger FIFO (one per L1A, holding which links of
// this formatter really had the trigger forwarded to their module) it visits
// the enabled links in ascending order and emits exactly one event per link:
//   * trigger inhibited by Smart L1A  -> ROD-veto empty event (header+trailer);
//     the link's L1ID correction offset is incremented, because the module
//     never saw that trigger and its own L1ID now lags the ROD's;
//   * trigger sent, but the MCC earlier reported k skipped triggers
//     -> skipped-trigger empty event, k times;
//   * otherwise the module event is copied from the link FIFO, header to
//     trailer. In the header the skipped count is captured and the L1ID field
//     is corrected by the link's offset; in the trailer bits [9:4] are replaced
//     by the link's triggers-in-flight count (saturated to 63).
//   * if the link FIFO stays empty for timeout_lim cycles before the header
//     of the expected event arrives -> module-timeout empty event.
// The last word of the last enabled link carries out_eot, marking the end of
// this formatter's contribution to the event. A trigger with no enabled link
// is popped without output. Output is a registered valid/ready stream; one
// word per cycle when the FIFO has data and the consumer is ready.
// Event selection, insertion types and the L1ID correction follow the source
// design; the ordering, timeout semantics and dummy words are this design's.
module fifo_readout
  import rod_pkg::*;
#(
  parameter int unsigned N_LINKS   = 4,
  parameter int unsigned LINK_BASE = 0,
  parameter int unsigned PEND_W    = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_LINKS-1:0]             link_en,
  input  logic [15:0]                    timeout_lim,
  // trigger FIFO
  input  logic                           trig_empty,
  input  logic [N_LINKS-1:0]             trig_sent,
  output logic                           trig_pop,
  // link FIFOs (first-word-fall-through)
  input  logic [N_LINKS-1:0]             lf_empty,
  input  logic [N_LINKS-1:0][31:0]       lf_data,
  output logic [N_LINKS-1:0]             lf_pop,
  input  logic [N_LINKS-1:0][PEND_W-1:0] pend_cnt,
  // output stream towards the EFB
  output logic                           out_valid,
  output logic [31:0]                    out_data,
  output logic                           out_eot,
  input  logic                           out_ready
);
  localparam int unsigned LW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LSEL, S_RD, S_DUM_H, S_DUM_T} state_e;

  state_e               st;
  logic [LW-1:0]        link;
  logic [N_LINKS-1:0]   mask;
  ev_kind_e             kind;
  logic [15:0]          tmo;
  logic [N_LINKS-1:0][3:0] skip_pend;
  logic [N_LINKS-1:0][7:0] l1_off;

  logic        can_emit;
  logic        last_link;
  logic [3:0]  gl_link;
  logic [31:0] w;
  logic [31:0] w_mod;
  logic [5:0]  pend_sat;

  assign can_emit = !out_valid || out_ready;
  assign gl_link  = 4'(LINK_BASE + 32'(link));
  assign w        = lf_data[link];

  always_comb begin
    last_link = 1'b1;
    for (int i = 0; i < N_LINKS; i++)
      if (i > int'(link) && link_en[i]) last_link = 1'b0;
    pend_sat = (pend_cnt[link] > PEND_W'(63)) ? 6'd63 : pend_cnt[link][5:0];
    w_mod = w;
    if (w[31:29] == TYPE_HDR) w_mod[15:8] = w[15:8] + l1_off[link];
    if (w[31:29] == TYPE_TRL) w_mod[9:4]  = pend_sat;
  end

  always_comb begin
    trig_pop = 1'b0;
    lf_pop   = '0;
    case (st)
      S_IDLE:  trig_pop = !trig_empty && (link_en == '0);
      S_DUM_T: trig_pop = can_emit && last_link;
      S_RD: begin
        lf_pop[link] = !lf_empty[link] && can_emit;
        trig_pop     = !lf_empty[link] && can_emit && (w[31:29] == TYPE_TRL) && last_link;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      link      <= '0;
      mask      <= '0;
      kind      <= EV_MODULE;
      tmo       <= '0;
      skip_pend <= '0;
      l1_off    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_eot   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (st)
        S_IDLE: begin
          if (!trig_empty && link_en != '0) begin
            mask <= trig_sent;
            link <= '0;
            st   <= S_LSEL;
          end
        end
        S_LSEL: begin
          tmo <= '0;
          if (!link_en[link]) begin
            // disabled links are passed over; an enabled one follows
            link <= link + 1'b1;
          end else if (!mask[link]) begin
            kind         <= EV_VETO;
            l1_off[link] <= l1_off[link] + 1'b1;
            st           <= S_DUM_H;
          end else if (skip_pend[link] != 4'd0) begin
            kind            <= EV_SKIP;
            skip_pend[link] <= skip_pend[link] - 1'b1;
            st              <= S_DUM_H;
          end else begin
            kind <= EV_MODULE;
            st   <= S_RD;
          end
        end
        S_RD: begin
          if (lf_empty[link]) begin
            if (tmo + 1'b1 >= timeout_lim) begin
              kind <= EV_TIMEOUT;
              st   <= S_DUM_H;
            end else begin
              tmo <= tmo + 1'b1;
            end
          end else if (can_emit) begin
            out_valid <= 1'b1;
            out_data  <= w_mod;
            out_eot   <= 1'b0;
            tmo       <= '0;
            if (w[31:29] == TYPE_HDR) skip_pend[link] <= w[19:16];
            if (w[31:29] == TYPE_TRL) begin
              out_eot <= last_link;
              if (last_link) st <= S_IDLE;
              else begin
                link <= link + 1'b1;
                st   <= S_LSEL;
              end
            end
          end
        end
        S_DUM_H: begin
          if (can_emit) begin
            out_valid <= 1'b1;
            out_data  <= dummy_header(gl_link);
            out_eot   <= 1'b0;
            st        <= S_DUM_T;
          end
        end
        S_DUM_T: begin
          if (can_emit) begin
            out_valid <= 1'b1;
            out_data  <= dummy_trailer(kind, gl_link);
            out_eot   <= last_link;
            if (last_link) st <= S_IDLE;
            else begin
              link <= link + 1'b1;
              st   <= S_LSEL;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a popped link word is always forwarded in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) (lf_pop != '0) |-> can_emit);
endmodule
