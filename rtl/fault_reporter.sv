// fault_reporter: collects the fault codes of all networks into one report stream.
//
// The reporter visits the networks in order 0, 1, ... NUM_NETWORKS-1. While
// it looks at a network it raises that network's 'hold', so the analyzer's
// code stays steady. A zero code (no fault) is skipped after one cycle. A
// non-zero code is sent as a REC_CODE record; once the record is accepted the
// reporter pulses the network's 'clear' so that flags, amounts and durations
// restart from zero. Faults that happen in a network while it is held are
// not counted, which is the price of a steady report.
//
// After the last network comes the timestamp slot: a REC_TIME record with
// the counter value is sent if any code was sent in this round, or if a
// 'time_check' pulse (every 5 minutes) arrived since the last timestamp.
// Then comes the block-memory slot: a word flagged by the memory checker is
// sent as a REC_BRAM record and acknowledged with 'bram_ack'. Then the round
// repeats.
//
// Records leave on a valid/ready handshake: 'rec' is stable while 'rec_valid'
// is high and not yet accepted. The visiting order, the freeze-send-clear
// sequence and the conditional timestamp follow the document (where a
// processor does the sequencing); skipping zero codes and the memory slot
// are this design's choices.
module fault_reporter
  import asn_pkg::*;
#(
  parameter int unsigned NUM_NETWORKS = ASN_NETWORKS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [31:0]             codes [NUM_NETWORKS],
  output logic [NUM_NETWORKS-1:0] hold,
  output logic [NUM_NETWORKS-1:0] clear,
  input  logic [CNT_W-1:0]        count,
  input  logic                    time_check,
  input  logic                    bram_valid,
  input  logic [31:0]             bram_word,
  output logic                    bram_ack,
  output logic                    rec_valid,
  input  logic                    rec_ready,
  output report_rec_t             rec
);
  localparam int unsigned IW = (NUM_NETWORKS > 1) ? $clog2(NUM_NETWORKS) : 1;

  typedef enum logic [2:0] {
    S_SCAN, S_SEND_NET, S_CLEAR, S_TIME, S_SEND_TIME, S_BRAM, S_SEND_BRAM
  } state_e;

  state_e          state;
  logic [IW-1:0]   idx;
  logic            sent_any;      // a code was sent in this round
  logic            check_pend;    // a 5-minute time-check is owed

  always_comb begin
    hold  = '0;
    clear = '0;
    if (state == S_SCAN || state == S_SEND_NET || state == S_CLEAR) hold[idx] = 1'b1;
    if (state == S_CLEAR) clear[idx] = 1'b1;
  end

  assign bram_ack = (state == S_SEND_BRAM) && rec_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SCAN;
      idx        <= '0;
      sent_any   <= 1'b0;
      check_pend <= 1'b0;
      rec_valid  <= 1'b0;
      rec        <= '{kind: REC_CODE, data: '0};
    end else begin
      if (time_check) check_pend <= 1'b1;
      unique case (state)
        S_SCAN: begin
          if (codes[idx] != '0) begin
            rec       <= '{kind: REC_CODE, data: CNT_W'(codes[idx])};
            rec_valid <= 1'b1;
            sent_any  <= 1'b1;
            state     <= S_SEND_NET;
          end else if (idx == IW'(NUM_NETWORKS - 1)) begin
            state <= S_TIME;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_SEND_NET: if (rec_ready) begin
          rec_valid <= 1'b0;
          state     <= S_CLEAR;
        end
        S_CLEAR: begin
          if (idx == IW'(NUM_NETWORKS - 1)) state <= S_TIME;
          else begin
            idx   <= idx + 1'b1;
            state <= S_SCAN;
          end
        end
        S_TIME: begin
          if (sent_any || check_pend || time_check) begin
            rec        <= '{kind: REC_TIME, data: count};
            rec_valid  <= 1'b1;
            check_pend <= 1'b0;
            state      <= S_SEND_TIME;
          end else begin
            state <= S_BRAM;
          end
        end
        S_SEND_TIME: if (rec_ready) begin
          rec_valid <= 1'b0;
          state     <= S_BRAM;
        end
        S_BRAM: begin
          if (bram_valid) begin
            rec       <= '{kind: REC_BRAM, data: CNT_W'(bram_word)};
            rec_valid <= 1'b1;
            state     <= S_SEND_BRAM;
          end else begin
            idx      <= '0;
            sent_any <= 1'b0;
            state    <= S_SCAN;
          end
        end
        S_SEND_BRAM: if (rec_ready) begin
          rec_valid <= 1'b0;
          idx       <= '0;
          sent_any  <= 1'b0;
          state     <= S_SCAN;
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  // a record must not change while it waits to be accepted
  property p_stable;
    @(posedge clk) disable iff (!rst_n) (rec_valid && !rec_ready) |=> (rec_valid && $stable(rec));
  endproperty
  a_stable: assert property (p_stable) else $error("report record changed before it was accepted");
endmodule
