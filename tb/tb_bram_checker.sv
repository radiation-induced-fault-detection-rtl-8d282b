// tb_bram_checker: fill, scan and report of flipped memory bits.
// After the fill completes (2048 cycles) nothing may be reported. Single-,
// multi-bit and repeated upsets are then written through the upset port;
// each must be reported exactly once with the flipped word
// (0x55555555 ^ mask) and rewritten, so a second full pass reports nothing.
// Every report must arrive within one pass (2 cycles per word).
module tb_bram_checker;
  localparam int WORDS = 2048;
  localparam logic [31:0] PAT = 32'h5555_5555;

  logic clk = 0, rst_n = 0;
  logic upset_we = 0;
  logic [10:0] upset_addr = 0;
  logic [31:0] upset_xor = 0;
  logic bad_valid, bad_ack = 0, init_done;
  logic [31:0] bad_word;
  int checks = 0, failures = 0;
  int reports = 0;
  int init_cycles = 0;

  bram_checker dut (.clk, .rst_n, .upset_we, .upset_addr, .upset_xor,
                    .bad_valid, .bad_word, .bad_ack, .init_done);

  always #20 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (bad_valid && bad_ack) reports++;

  task automatic upset_and_expect(input int addr, input logic [31:0] mask);
    int waited = 0;
    int n_before;
    n_before = reports;
    @(negedge clk);
    upset_we = 1; upset_addr = 11'(addr); upset_xor = mask;
    @(negedge clk);
    upset_we = 0;
    while (!bad_valid && waited < 2 * WORDS + 10) begin @(negedge clk); waited++; end
    checks++;
    if (!bad_valid) begin failures++; $display("FAIL no report for word %0d", addr); return; end
    checks++;
    if (bad_word !== (PAT ^ mask)) begin failures++; $display("FAIL word %h exp %h", bad_word, PAT ^ mask); end
    repeat ($urandom_range(0, 5)) @(negedge clk);
    bad_ack = 1;
    @(negedge clk);
    bad_ack = 0;
    checks++;
    if (reports != n_before + 1) begin failures++; $display("FAIL report count"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!init_done) begin @(posedge clk); init_cycles++; end
    checks++;
    if (init_cycles < WORDS || init_cycles > WORDS + 2) begin failures++; $display("FAIL fill took %0d cycles", init_cycles); end
    // one clean pass
    repeat (2 * WORDS + 20) @(posedge clk);
    checks++;
    if (reports != 0 || bad_valid) begin failures++; $display("FAIL report from a clean memory"); end

    upset_and_expect(0, 32'h0000_0001);
    upset_and_expect(1234, 32'h8000_0000);
    upset_and_expect(2047, 32'h0003_0000);       // two adjacent bits
    upset_and_expect(1234, 32'h0000_0400);       // same word again
    for (int i = 0; i < 5; i++) upset_and_expect($urandom_range(0, WORDS - 1), 32'(1) << $urandom_range(0, 31));

    // a full pass after the reports: nothing left
    repeat (2 * WORDS + 20) @(posedge clk);
    checks++;
    if (bad_valid) begin failures++; $display("FAIL word reported twice"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
