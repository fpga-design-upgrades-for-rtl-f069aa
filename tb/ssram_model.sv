// ssram_model: behavioural model of the external synchronous SRAM that holds
// the histograms (36-bit words). Reads are pipelined: rdata shows the word
// addressed by re RD_LAT cycles earlier. Writes take effect on the clock
// edge. Contents start at zero.
module ssram_model #(
  parameter int unsigned AW     = 12,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [35:0]   wdata,
  output logic [35:0]   rdata
);
  logic [35:0] mem [2**AW];
  logic [35:0] pipe [RD_LAT];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < RD_LAT; i++) pipe[i] = '0;
  end

  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    pipe[0] <= re ? mem[addr] : 36'h0;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[RD_LAT-1];
endmodule
