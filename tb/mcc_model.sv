// mcc_model: behavioural model of a Pixel module as seen by one formatter
// link: the Module Control Chip with its front ends, the optical link and
// the BOC decoder, reduced to what the ROD slave sees.
// Every trigger received is given the next L1ID (8 bits) and the BCID
// present at that moment and stored in a BUF_DEPTH-event buffer (16 in the
// MCC). A trigger arriving with the buffer full is skipped; the number of
// skips (up to 15) is reported in the header of the last buffered event.
// Events are sent as decoded words (header, NHITS hits, trailer), one word
// every WORD_GAP cycles, as a slow serial link would deliver them.
// dead = 1 makes the module silent (no events are sent or stored).
// skip_bug = 1 makes the reported skip count one too high, mimicking the
// MCC fault that desynchronises the data stream.
module mcc_model #(
  parameter int unsigned LINK      = 0,
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned WORD_GAP  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig,
  input  logic [7:0]  bcid_in,
  input  logic [2:0]  nhits,       // hits per event for new triggers
  input  logic        dead,
  input  logic        skip_bug,
  output logic        out_valid,
  output logic [31:0] out_data,
  output int          n_trig,
  output int          n_skipped,
  output int          n_sent_events,
  output int          n_sent_hits
);
  typedef struct {
    logic [7:0] l1id;
    logic [7:0] bcid;
    int         nh;
    int         skip;
  } mev_t;

  mev_t buffer[$];
  logic [7:0] l1_cnt;
  int word_idx;     // 0 header, 1..nh hits, nh+1 trailer
  int gap;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer.delete();
      l1_cnt <= 0; word_idx = 0; gap = 0;
      out_valid <= 0; out_data <= 0;
      n_trig = 0; n_skipped = 0; n_sent_events = 0; n_sent_hits = 0;
    end else begin
      out_valid <= 0;
      if (trig && !dead) begin
        n_trig++;
        l1_cnt <= l1_cnt + 1;
        if (buffer.size() >= BUF_DEPTH) begin
          // skipped: reported with the last event in the buffer
          if (buffer[$].skip < 15) buffer[$].skip++;
          n_skipped++;
        end else begin
          mev_t e;
          e.l1id = l1_cnt; e.bcid = bcid_in; e.nh = int'(nhits); e.skip = 0;
          buffer.push_back(e);
        end
      end
      if (gap > 0) gap--;
      else if (buffer.size() > 0 && !dead) begin
        mev_t e;
        e = buffer[0];
        gap = WORD_GAP - 1;
        out_valid <= 1;
        if (word_idx == 0) begin
          logic [3:0] sk;
          sk = 4'(e.skip + ((skip_bug && e.skip > 0) ? 1 : 0));
          out_data <= {3'b001, 5'b0, 4'(LINK), sk, e.l1id, e.bcid};
          word_idx = 1;
        end else if (word_idx <= e.nh) begin
          out_data <= {3'b100, 1'b0, 4'($urandom % 16), 8'(1 + $urandom % 40), 3'($urandom % 8),
                       5'($urandom % 18), 8'($urandom % 160)};
          word_idx++;
          n_sent_hits++;
        end else begin
          out_data <= {3'b010, 29'h0};
          word_idx = 0;
          n_sent_events++;
          void'(buffer.pop_front());
        end
      end
    end
  end
endmodule
