// tb_fault_reporter: reporting order, freeze/clear sequence and timestamps.
//
// Fifteen behavioural analyzers are plain registers holding a code; a pulse
// on clear[n] zeroes network n. The record sink accepts with a random ready.
// Checks: codes come out in network order and only non-zero ones; the
// network's hold is high while its record waits; clear follows acceptance
// exactly once; a timestamp record follows a round that sent codes and also
// follows a time_check pulse in a quiet round; a bad memory word is sent
// after the timestamp slot and acknowledged once; a quiet design sends
// nothing.
module tb_fault_reporter;
  import asn_pkg::*;
  localparam int NN = 15;

  logic clk = 0, rst_n = 0;
  logic [31:0] codes [NN];
  logic [NN-1:0] hold, clear;
  logic [CNT_W-1:0] count = 0;
  logic time_check = 0;
  logic bram_valid = 0, bram_ack;
  logic [31:0] bram_word = 0;
  logic rec_valid, rec_ready;
  report_rec_t rec;
  int checks = 0, failures = 0;
  report_rec_t got [$];
  int clears [NN];
  int acks = 0;

  fault_reporter dut (.clk, .rst_n, .codes, .hold, .clear, .count, .time_check,
                      .bram_valid, .bram_word, .bram_ack, .rec_valid, .rec_ready, .rec);

  always #20 clk = ~clk;
  always @(posedge clk) count <= count + 1;
  always @(posedge clk) rec_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) if (clear[n]) begin codes[n] <= '0; clears[n]++; end
    if (bram_ack) begin bram_valid <= 1'b0; acks++; end
    if (rec_valid && rec_ready) begin
      got.push_back(rec);
      if (rec.kind == REC_CODE) begin
        checks++;
        if (!hold[rec.data[31:28]]) begin failures++; $display("FAIL network %0d not held", rec.data[31:28]); end
      end
      if (rec.kind == REC_TIME) begin
        checks++;
        if (rec.data > count || rec.data + 40 < count) begin failures++; $display("FAIL stale timestamp"); end
      end
    end
  end

  task automatic expect_rec(input rec_kind_e k, input logic [31:0] d);
    report_rec_t r;
    checks++;
    if (got.size() == 0) begin failures++; $display("FAIL missing record kind %0d", k); return; end
    r = got.pop_front();
    if (r.kind != k || (k != REC_TIME && r.data[31:0] != d)) begin
      failures++;
      $display("FAIL record kind %0d data %h, expected kind %0d data %h", r.kind, r.data, k, d);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    wait_cycles(20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin codes[n] = '0; clears[n] = 0; end
    wait_cycles(2);
    #1 rst_n = 1;
    wait_cycles(200);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL records from a quiet design"); end

    // three faulty networks, set while network 0 is being looked at
    @(negedge clk iff hold[0]);
    codes[2]  = 32'h2E30_0020;
    codes[7]  = 32'h7D90_0004;
    codes[14] = 32'hEE10_0001;
    wait_cycles(200);
    expect_rec(REC_CODE, 32'h2E30_0020);
    expect_rec(REC_CODE, 32'h7D90_0004);
    expect_rec(REC_CODE, 32'hEE10_0001);
    expect_rec(REC_TIME, 0);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL extra records"); end
    checks++;
    if (clears[2] != 1 || clears[7] != 1 || clears[14] != 1 || clears[0] != 0) begin
      failures++; $display("FAIL clear counts %0d %0d %0d", clears[2], clears[7], clears[14]);
    end

    // time-check in a quiet design
    @(negedge clk); time_check = 1;
    @(negedge clk); time_check = 0;
    wait_cycles(100);
    expect_rec(REC_TIME, 0);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL extra records after time check"); end

    // bad memory word
    @(negedge clk iff hold[0]); bram_word = 32'h5555_5455; bram_valid = 1;
    wait_cycles(100);
    expect_rec(REC_BRAM, 32'h5555_5455);
    checks++;
    if (acks != 1) begin failures++; $display("FAIL bram acks %0d", acks); end

    // fault and memory word together: code, timestamp, then memory word
    @(negedge clk iff hold[0]); codes[0] = 32'h0C10_0002; bram_word = 32'h1555_5555; bram_valid = 1;
    wait_cycles(100);
    expect_rec(REC_CODE, 32'h0C10_0002);
    expect_rec(REC_TIME, 0);
    expect_rec(REC_BRAM, 32'h1555_5555);
    checks++;
    if (got.size() != 0 || acks != 2) begin failures++; $display("FAIL final state"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
