// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the formatter link buffers, the trigger FIFO that records which
// formatter links each L1A was forwarded to, and the master event-information
// FIFO of the EFB. The head entry is visible on rd_data whenever empty is low;
// rd_en pops it. A write to a full FIFO is dropped and counted in overflow
// (sticky); a read of an empty FIFO is ignored. almost_full rises when at most
// AF_MARGIN free entries remain and feeds the formatter busy signal.
// Depths are this design's choice; the source design names the FIFOs only.
module sync_fifo #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned AF_MARGIN = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty       = (count == 0);
  assign full        = (count == DEPTH);
  assign almost_full = (count >= DEPTH - AF_MARGIN);
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
      if (wr_en && full) overflow <= 1'b1;
    end
  end
endmodule
