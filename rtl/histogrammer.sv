// histogrammer: per-pixel histogram accumulation in an external SSRAM.
//
// Each hit from the router is translated into the address of its pixel,
//   addr = (chip * 18 + col) * 160 + row      (FEI3: 18 columns, 160 rows),
// the 36-bit SSRAM word is read, updated and written back:
//   ToT mode      : [35:28] occupancy, [27:16] sum ToT, [15:0] sum ToT^2
//   occupancy mode: [23:0]  occupancy (online monitoring during datataking)
// All fields saturate. One hit is processed every RD_LAT+1 cycles
// (issue read, wait RD_LAT cycles for the SSRAM data, write back); hit_ready
// is low meanwhile, so a hit never overtakes the write-back of the previous
// one and back-to-back hits on the same pixel are counted correctly.
// Readout: ro_start walks all NUM_CHIPS*2880 addresses in order and streams
// the words out (ro_valid/ro_ready); with ro_clear each word is zeroed as it
// is read, so the memory is ready for the next scan. ro_done pulses at the
// end. The read-modify-write scheme and the three fields follow the source
// design; the field widths, the address formula and the sequential readout
// (instead of a processor-driven DMA) are this design's choices.
// SSRAM port: ss_re/ss_we/ss_addr/ss_wdata are combinational from the state;
// ss_rdata must be valid RD_LAT cycles after ss_re.
module histogrammer
  import rod_pkg::*;
#(
  parameter int unsigned NUM_CHIPS = 128,
  parameter int unsigned RD_LAT    = 2,
  parameter int unsigned AW        = $clog2(NUM_CHIPS * FE_ROWS * FE_COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          occ_only,
  // hits
  input  logic          hit_valid,
  input  hit_t          hit,
  output logic          hit_ready,
  // readout
  input  logic          ro_start,
  input  logic          ro_clear,
  output logic          ro_busy,
  output logic          ro_valid,
  output logic [35:0]   ro_data,
  input  logic          ro_ready,
  output logic          ro_done,
  // SSRAM
  output logic          ss_re,
  output logic          ss_we,
  output logic [AW-1:0] ss_addr,
  output logic [35:0]   ss_wdata,
  input  logic [35:0]   ss_rdata
);
  localparam int unsigned NPIX = NUM_CHIPS * FE_ROWS * FE_COLS;

  typedef enum logic [2:0] {S_IDLE, S_HWAIT, S_RRD, S_RWAIT, S_ROUT} state_e;

  state_e        st;
  logic [AW-1:0] haddr;    // address held during a read-modify-write
  logic [7:0]    htot;
  logic [AW-1:0] ptr;
  logic          clr;
  logic [3:0]    cnt;
  logic [AW-1:0] hit_addr;
  logic          hit_ok;
  logic [35:0]   upd;

  function automatic logic [35:0] accumulate(input logic [35:0] w, input logic [7:0] tot,
                                             input logic occ);
    logic [35:0] r;
    logic [15:0] t2;
    logic [16:0] s2;
    logic [12:0] s1;
    r = w;
    if (occ) begin
      r[23:0] = (w[23:0] == '1) ? w[23:0] : w[23:0] + 1'b1;
    end else begin
      t2 = 16'(tot) * 16'(tot);
      s1 = 13'(w[27:16]) + 13'(tot);
      s2 = 17'(w[15:0]) + 17'(t2);
      r[35:28] = (w[35:28] == '1) ? w[35:28] : w[35:28] + 1'b1;
      r[27:16] = s1[12] ? 12'hFFF : s1[11:0];
      r[15:0]  = s2[16] ? 16'hFFFF : s2[15:0];
    end
    return r;
  endfunction

  assign hit_addr = AW'((32'(hit.chip) * FE_COLS + 32'(hit.col)) * FE_ROWS + 32'(hit.row));
  assign hit_ok   = 32'(hit.chip) < NUM_CHIPS;
  assign upd      = accumulate(ss_rdata, htot, occ_only);
  assign hit_ready = (st == S_IDLE) && !ro_start;
  assign ro_busy   = (st == S_RRD) || (st == S_RWAIT) || (st == S_ROUT);

  always_comb begin
    ss_re    = 1'b0;
    ss_we    = 1'b0;
    ss_addr  = haddr;
    ss_wdata = upd;
    case (st)
      S_IDLE: begin
        ss_re   = hit_valid && hit_ok && !ro_start;
        ss_addr = hit_addr;
      end
      S_HWAIT: ss_we = (cnt == 4'(RD_LAT));
      S_RRD: begin
        ss_re   = 1'b1;
        ss_addr = ptr;
      end
      S_RWAIT: begin
        ss_addr  = ptr;
        ss_we    = clr && (cnt == 4'(RD_LAT));
        ss_wdata = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      haddr    <= '0;
      htot     <= '0;
      ptr      <= '0;
      clr      <= 1'b0;
      cnt      <= '0;
      ro_valid <= 1'b0;
      ro_data  <= '0;
      ro_done  <= 1'b0;
    end else begin
      ro_done <= 1'b0;
      case (st)
        S_IDLE: begin
          if (ro_start) begin
            ptr <= '0;
            clr <= ro_clear;
            st  <= S_RRD;
          end else if (hit_valid && hit_ok) begin
            haddr <= hit_addr;
            htot  <= hit.tot;
            cnt   <= 4'd1;
            st    <= S_HWAIT;
          end
        end
        S_HWAIT: begin
          if (cnt == 4'(RD_LAT)) st <= S_IDLE;
          else cnt <= cnt + 1'b1;
        end
        S_RRD: begin
          cnt <= 4'd1;
          st  <= S_RWAIT;
        end
        S_RWAIT: begin
          if (cnt == 4'(RD_LAT)) begin
            ro_valid <= 1'b1;
            ro_data  <= ss_rdata;
            st       <= S_ROUT;
          end else cnt <= cnt + 1'b1;
        end
        S_ROUT: begin
          if (ro_ready) begin
            ro_valid <= 1'b0;
            if (ptr == AW'(NPIX - 1)) begin
              ro_done <= 1'b1;
              st      <= S_IDLE;
            end else begin
              ptr <= ptr + 1'b1;
              st  <= S_RRD;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
