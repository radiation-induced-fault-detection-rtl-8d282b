// bram_checker: looks for bit flips in the block memory.
//
// After reset the checker fills every word of the memory with the pattern
// 0x55555555 (alternating ones and zeros, so stuck-at-one and stuck-at-zero
// flips are equally visible), one word per cycle. It then reads the words
// one at a time, in an endless loop, two cycles per word (address, then
// compare). A word that differs from the pattern is offered to the reporter
// on 'bad_valid'/'bad_word' and held until 'bad_ack'; the checker then
// writes the pattern back so that the same flip is reported once, and
// carries on. 'init_done' rises when the fill is complete.
//
// The upset port stands in for radiation in tests: 'upset_we' writes
// PATTERN ^ upset_xor into word 'upset_addr', which is the same as flipping
// the bits set in upset_xor of a word that holds the pattern. It has
// priority over the checker's own writes.
//
// The pattern, the 8 KB size and the 32-bit reads follow the document, where
// a processor does the filling and reading; the state machine, the rewrite
// after a report and the upset port are this design's choices.
module bram_checker #(
  parameter int unsigned WORDS   = 2048,
  parameter logic [31:0] PATTERN = 32'h5555_5555,
  parameter int unsigned AW      = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          upset_we,
  input  logic [AW-1:0] upset_addr,
  input  logic [31:0]   upset_xor,
  output logic          bad_valid,
  output logic [31:0]   bad_word,
  input  logic          bad_ack,
  output logic          init_done
);
  typedef enum logic [2:0] { S_INIT, S_READ, S_CHECK, S_REPORT, S_FIX } state_e;

  state_e        state;
  logic [AW-1:0] addr;
  logic          we;
  logic [AW-1:0] waddr;
  logic [31:0]   wdata;
  logic [31:0]   rdata;

  bram #(.WORDS(WORDS), .AW(AW)) u_bram (
    .clk, .we, .waddr, .wdata, .raddr(addr), .rdata
  );

  always_comb begin
    we    = 1'b0;
    waddr = addr;
    wdata = PATTERN;
    if (upset_we) begin
      we    = 1'b1;
      waddr = upset_addr;
      wdata = PATTERN ^ upset_xor;
    end else if (state == S_INIT || state == S_FIX) begin
      we = 1'b1;
    end
  end

  assign bad_valid = (state == S_REPORT);
  assign init_done = (state != S_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      addr     <= '0;
      bad_word <= '0;
    end else begin
      unique case (state)
        S_INIT: if (!upset_we) begin
          addr <= addr + 1'b1;
          if (addr == AW'(WORDS - 1)) state <= S_READ;
        end
        S_READ:  state <= S_CHECK;
        S_CHECK: begin
          if (rdata != PATTERN) begin
            bad_word <= rdata;
            state    <= S_REPORT;
          end else begin
            addr  <= addr + 1'b1;
            state <= S_READ;
          end
        end
        S_REPORT: if (bad_ack) state <= S_FIX;
        S_FIX: if (!upset_we) begin
          addr  <= addr + 1'b1;
          state <= S_READ;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  initial assert (WORDS == (1 << AW)) else $error("WORDS must be a power of two");
endmodule
