// histo_readout: converts 36-bit histogram words into the 32-bit words of
// the downstream memory, according to the selected readout scheme.
//   LONG_TOT          two words per pixel: w[31:0], then {28'b0, w[35:32]}
//   SHORT_TOT         one word per pixel: {missing hits[7:0], sum ToT[11:0],
//                     sum ToT^2[15:4]}, missing = expected - occupancy (>= 0)
//   ONLINE_OCCUPANCY  one word per pixel: the 24-bit occupancy, zero-extended
//   OFFLINE_OCCUPANCY one word per four pixels: four 8-bit occupancies, the
//                     first pixel in bits [7:0] (occupancy saturated to 255)
// The occupancy is taken from [35:28] in ToT mode and [23:0] in occupancy
// mode (occ_only). The four schemes and their word counts follow the source
// design; the exact bit packing of SHORT_TOT and the ToT^2 truncation are
// this design's choices. A pixel count that is not a multiple of four leaves
// the last OFFLINE word pending; flush emits it.
// Streams are valid/ready; the output is registered.
module histo_readout
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ro_scheme_e  scheme,
  input  logic        occ_only,
  input  logic [7:0]  expected_hits,
  input  logic        flush,
  input  logic        in_valid,
  input  logic [35:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready
);
  logic        hi_pending;   // LONG_TOT second word still to send
  logic [3:0]  hi_bits;
  logic [1:0]  npack;
  logic [31:0] pack;
  logic        can_emit;
  logic [23:0] occ;
  logic [7:0]  occ8;
  logic [7:0]  miss;

  assign can_emit = !out_valid || out_ready;
  assign occ      = occ_only ? in_data[23:0] : {16'd0, in_data[35:28]};
  assign occ8     = (occ > 24'd255) ? 8'hFF : occ[7:0];
  assign miss     = (expected_hits > occ8) ? expected_hits - occ8 : 8'd0;
  assign in_ready = can_emit && !hi_pending && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_pending <= 1'b0;
      hi_bits    <= '0;
      npack      <= '0;
      pack       <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (hi_pending && can_emit) begin
        out_valid  <= 1'b1;
        out_data   <= {28'd0, hi_bits};
        hi_pending <= 1'b0;
      end else if (flush && can_emit) begin
        if (npack != 2'd0) begin
          out_valid <= 1'b1;
          out_data  <= pack;
          npack     <= '0;
          pack      <= '0;
        end
      end else if (in_valid && in_ready) begin
        case (scheme)
          RO_LONG_TOT: begin
            out_valid  <= 1'b1;
            out_data   <= in_data[31:0];
            hi_bits    <= in_data[35:32];
            hi_pending <= 1'b1;
          end
          RO_SHORT_TOT: begin
            out_valid <= 1'b1;
            out_data  <= {miss, in_data[27:16], in_data[15:4]};
          end
          RO_ONLINE_OCC: begin
            out_valid <= 1'b1;
            out_data  <= {8'd0, occ};
          end
          default: begin
            pack[8*npack +: 8] <= occ8;
            if (npack == 2'd3) begin
              out_valid <= 1'b1;
              out_data  <= {occ8, pack[23:0]};
              pack      <= '0;
            end
            npack <= npack + 1'b1;
          end
        endcase
      end
    end
  end
endmodule
