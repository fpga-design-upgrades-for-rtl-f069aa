// router: routes EFB fragments to the S-Link and extracts hits for the
// histogrammer.
//
// S-Link path: when slink_en is set (datataking) every fragment word is
// forwarded unchanged with its end-of-fragment flag.
// Hit extractor: when histo_en is set (calibration, or datataking with
// online histogramming), a word is turned into a hit when
//   am_i_dataword = 1  (it is module data, not S-Link header/trailer),
//   bits [31:29] = 100 (hit code), row < 160 and column < 18.
// The am_i_dataword qualification is what keeps the extended-L1ID header
// word from becoming a hit once the ECR counter reaches 0x80; without it the
// header counters were decoded as an incrementing row/col/MCC/ToT/FE pattern.
// Hit fields (Pixel mapping): row [7:0], col [12:8], MCC# [15:13],
// ToT [23:16], FE# [27:24]; chip = {bit 28, MCC#, FE#}.
// Both outputs are registered; the input is accepted only when every enabled
// output can take a new value (valid/ready), so the histogrammer's busy state
// stalls the fragment stream. Latency: one cycle.
module router
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        slink_en,
  input  logic        histo_en,
  // from the EFB
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic        in_dataword,
  input  logic        in_eof,
  output logic        in_ready,
  // to the S-Link (via the BOC)
  output logic        sl_valid,
  output logic [31:0] sl_data,
  output logic        sl_eof,
  input  logic        sl_ready,
  // to the histogrammer
  output logic        hit_valid,   // hitEnable
  output hit_t        hit,
  input  logic        hit_ready,
  output logic [31:0] hit_count
);
  logic sl_free, hit_free, take, is_hit;

  assign sl_free  = !sl_valid  || sl_ready;
  assign hit_free = !hit_valid || hit_ready;
  assign in_ready = sl_free && hit_free;
  assign take     = in_valid && in_ready;
  assign is_hit   = in_dataword && in_data[31:29] == TYPE_HIT &&
                    in_data[7:0] < 8'(FE_ROWS) && in_data[12:8] < 5'(FE_COLS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sl_valid  <= 1'b0;
      sl_data   <= '0;
      sl_eof    <= 1'b0;
      hit_valid <= 1'b0;
      hit       <= '0;
      hit_count <= '0;
    end else begin
      if (sl_valid && sl_ready)   sl_valid  <= 1'b0;
      if (hit_valid && hit_ready) hit_valid <= 1'b0;
      if (take && slink_en) begin
        sl_valid <= 1'b1;
        sl_data  <= in_data;
        sl_eof   <= in_eof;
      end
      if (take && histo_en && is_hit) begin
        hit_valid <= 1'b1;
        hit.row   <= in_data[7:0];
        hit.col   <= in_data[12:8];
        hit.tot   <= in_data[23:16];
        hit.chip  <= {in_data[28], in_data[15:13], in_data[27:24]};
        hit_count <= hit_count + 1'b1;
      end
    end
  end

  // a hit may only come from module data
  assert property (@(posedge clk) disable iff (!rst_n)
                   (take && histo_en && !in_dataword) |=> !$rose(hit_valid));
endmodule
