// efb_gen_fragment: event fragment builder (EFB) of one half slave.
//
// For each event announced by the ROD master (ev_info FIFO, one entry per
// L1A) it emits an S-Link fragment: a 10-word header, the module data of
// formatter 0 then formatter 1 (each up to its end-of-trigger marker), and a
// 6-word trailer. Header word 7 (index 6) is the extended L1ID
// {ECRID[7:0], L1ID[23:0]}.
// L1ID/BCID check (bc_l1_check): every module header is compared with the
// master's L1ID[7:0] and BCID[7:0]; a mismatch sets bit 26 (L1ID) or bit 25
// (BCID) of that header. ROD-inserted empty events (header bit 24) always
// get both flags, even when their 0xBAAD marker bytes happen to match.
// am_i_dataword is high on module data words only (never on S-Link header or
// trailer words); the router uses it so that counter values in the header
// can never be mistaken for hits.
// Monitoring: at each module trailer mon_valid pulses with the event kind
// (module, ROD veto, skipped, timeout, decoded from the trailer), whether
// the header was flagged and the link number; frag_done pulses per fragment.
// Header words other than 0, 1, 6 follow the usual ATLAS ROD fragment layout
// as this design's choice; the trailer holds two status words, the status
// and data element counts, the status position and the S-Link end word.
// Output is a registered valid/ready stream, one word per cycle.
module efb_gen_fragment
  import rod_pkg::*;
#(
  parameter logic [31:0] SOURCE_ID = 32'h0011_0000,
  parameter logic [31:0] FMT_VER   = 32'h0301_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] run_number,
  input  logic [1:0]  fmt_active,
  // master event information
  input  logic        ev_empty,
  input  ev_info_t    ev_info,
  output logic        ev_pop,
  // formatter streams
  input  logic [1:0]       f_valid,
  input  logic [1:0][31:0] f_data,
  input  logic [1:0]       f_eot,
  output logic [1:0]       f_ready,
  // fragment output
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_dataword,
  output logic        out_eof,
  input  logic        out_ready,
  // monitoring
  output logic        mon_valid,
  output ev_kind_e    mon_kind,
  output logic        mon_desync,
  output logic [3:0]  mon_link,
  output logic        frag_done
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_F0, S_F1, S_TRL} state_e;

  state_e      st;
  ev_info_t    ev;
  logic [3:0]  idx;
  logic [23:0] ndata;
  logic        any_err;
  logic        hdr_flagged;
  logic [3:0]  hdr_link;
  logic        can_emit;
  logic        fsel;
  logic [31:0] fw;
  logic [31:0] fw_mod;
  logic        l1_bad, bc_bad;
  logic [31:0] hdr_word, trl_word;

  assign can_emit = !out_valid || out_ready;
  assign fsel     = (st == S_F1);
  assign fw       = f_data[fsel];

  always_comb begin
    // a ROD-inserted empty event is flagged whatever its marker bytes say
    l1_bad = fw[15:8] != ev.l1id[7:0] || fw[HDR_RODINS_BIT];
    bc_bad = fw[7:0]  != ev.bcid[7:0] || fw[HDR_RODINS_BIT];
    fw_mod = fw;
    if (fw[31:29] == TYPE_HDR) begin
      fw_mod[HDR_L1ERR_BIT] = fw[HDR_L1ERR_BIT] | l1_bad;
      fw_mod[HDR_BCERR_BIT] = fw[HDR_BCERR_BIT] | bc_bad;
    end
    case (idx)
      4'd0:    hdr_word = SLINK_BOF;
      4'd1:    hdr_word = ROD_HDR_MARKER;
      4'd2:    hdr_word = 32'd9;
      4'd3:    hdr_word = FMT_VER;
      4'd4:    hdr_word = SOURCE_ID;
      4'd5:    hdr_word = run_number;
      4'd6:    hdr_word = {ev.ecrid, ev.l1id};
      4'd7:    hdr_word = {20'd0, ev.bcid};
      4'd8:    hdr_word = {24'd0, ev.trig_type};
      default: hdr_word = 32'd0;
    endcase
    case (idx)
      4'd0:    trl_word = {31'd0, any_err};
      4'd1:    trl_word = 32'd0;
      4'd2:    trl_word = 32'd2;
      4'd3:    trl_word = {8'd0, ndata};
      4'd4:    trl_word = 32'd0;
      default: trl_word = SLINK_EOF;
    endcase
  end

  always_comb begin
    f_ready = '0;
    if (st == S_F0) f_ready[0] = can_emit;
    if (st == S_F1) f_ready[1] = can_emit;
    ev_pop = (st == S_TRL) && can_emit && (idx == 4'(SLINK_TRL_WORDS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      ev           <= '0;
      idx          <= '0;
      ndata        <= '0;
      any_err      <= 1'b0;
      hdr_flagged  <= 1'b0;
      hdr_link     <= '0;
      out_valid    <= 1'b0;
      out_data     <= '0;
      out_dataword <= 1'b0;
      out_eof      <= 1'b0;
      mon_valid    <= 1'b0;
      mon_kind     <= EV_MODULE;
      mon_desync   <= 1'b0;
      mon_link     <= '0;
      frag_done    <= 1'b0;
    end else begin
      mon_valid <= 1'b0;
      frag_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (st)
        S_IDLE: begin
          if (!ev_empty) begin
            ev      <= ev_info;
            idx     <= '0;
            ndata   <= '0;
            any_err <= 1'b0;
            st      <= S_HDR;
          end
        end
        S_HDR: if (can_emit) begin
          out_valid    <= 1'b1;
          out_data     <= hdr_word;
          out_dataword <= 1'b0;
          out_eof      <= 1'b0;
          if (idx == 4'(SLINK_HDR_WORDS - 1)) begin
            idx <= '0;
            st  <= fmt_active[0] ? S_F0 : (fmt_active[1] ? S_F1 : S_TRL);
          end else idx <= idx + 1'b1;
        end
        S_F0, S_F1: if (can_emit && f_valid[fsel]) begin
          out_valid    <= 1'b1;
          out_data     <= fw_mod;
          out_dataword <= 1'b1;
          out_eof      <= 1'b0;
          ndata        <= ndata + 1'b1;
          if (fw[31:29] == TYPE_HDR) begin
            hdr_flagged <= l1_bad || bc_bad;
            hdr_link    <= fw[23:20];
            if (l1_bad || bc_bad) any_err <= 1'b1;
          end
          if (fw[31:29] == TYPE_TRL) begin
            mon_valid  <= 1'b1;
            mon_kind   <= trailer_kind(fw);
            mon_desync <= hdr_flagged;
            mon_link   <= hdr_link;
          end
          if (f_eot[fsel]) st <= (st == S_F0 && fmt_active[1]) ? S_F1 : S_TRL;
        end
        S_TRL: if (can_emit) begin
          out_valid    <= 1'b1;
          out_data     <= trl_word;
          out_dataword <= 1'b0;
          out_eof      <= (idx == 4'(SLINK_TRL_WORDS - 1));
          if (idx == 4'(SLINK_TRL_WORDS - 1)) begin
            st        <= S_IDLE;
            frag_done <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
