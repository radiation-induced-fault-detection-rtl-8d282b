// tb_network_analyzer: drives the analyzer with emulated chain outputs.
//
// The testbench keeps its own cycle counter and builds the 25 monitored
// outputs each cycle (static bits inverted per sensor, alternating bit
// lsb ^ m[0]). An upset at sensor k flips the static-high bit of sensor k
// and, through the chain, of every sensor after it; a delay fault from
// sensor k leaves the alternating bit of sensor k and later sensors one cycle
// stale. Expected codes are assembled here from the field layout:
// {network, 2'b11, upset, amount, duration}. Two instances (networks 5 and
// A) reproduce the two report examples: three upsets for 32 cycles must read
// 5E300020, a delay missing only the last sensor for 4 cycles AD900004.
// A 5 ns upset between two clock edges must still be reported, as
// 5E100000 (one sensor, zero cycles).
module tb_network_analyzer;
  import asn_pkg::*;
  localparam int NM = 25;

  logic clk = 0, rst_n = 0;
  logic [7:0] cnt = 0;
  logic lsb;
  vec_t vin;
  vec_t mon [NM];
  logic hold = 0, clear = 0;
  logic [31:0] code5, codeA;
  logic seu5, tid5, seuA, tidA;
  int checks = 0, failures = 0;

  logic [NM-1:0] seu_sites = '0;  // upset sensors
  int            tid_site  = -1;  // first stale sensor, -1 for none

  network_analyzer #(.NET_ID(4'h5)) dut5 (.clk, .rst_n, .vin, .lsb, .mon, .hold, .clear,
                                          .code(code5), .seu_now(seu5), .tid_now(tid5));
  network_analyzer #(.NET_ID(4'hA)) dutA (.clk, .rst_n, .vin, .lsb, .mon, .hold, .clear,
                                          .code(codeA), .seu_now(seuA), .tid_now(tidA));

  always #20 clk = ~clk;

  assign lsb = cnt[0];
  assign vin = {1'b1, 1'b0, ~cnt[0]};

  always_comb begin
    logic flip;
    flip = 1'b0;
    for (int m = 0; m < NM; m++) begin
      flip    = flip ^ seu_sites[m];
      mon[m]  = (m % 2 == 0) ? ~vin : vin;
      mon[m][2] = mon[m][2] ^ flip;
      if (tid_site >= 0 && m >= tid_site) mon[m][0] = ~mon[m][0];
    end
  end

  always @(posedge clk) cnt <= cnt + 1;

  function automatic logic [31:0] exp_code(input logic [3:0] n, input bit seu, input int amount, input int dur);
    return {n, 2'b11, seu, 5'(amount), 20'(dur)};
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // apply a fault pattern for n cycles, then remove it
  task automatic seu_for(input logic [NM-1:0] sites, input int n);
    @(posedge clk); #1 seu_sites = sites;
    repeat (n) @(posedge clk);
    #1 seu_sites = '0;
  endtask

  task automatic tid_for(input int site, input int n);
    @(posedge clk); #1 tid_site = site;
    repeat (n) @(posedge clk);
    #1 tid_site = -1;
  endtask

  task automatic do_clear();
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    check("idle", code5, 32'h0);

    // three upsets for 32 cycles: the document's example report
    seu_for(25'b0000000010000010000000100, 32);
    repeat (3) @(posedge clk);
    check("3 upsets x 32", code5, 32'h5E30_0020);
    check("3 upsets x 32 literal", code5, exp_code(4'h5, 1, 3, 32));
    do_clear();
    check("cleared", code5, 32'h0);

    // flags are sticky: one upset, then another elsewhere, durations add up
    seu_for(25'b1, 5);
    repeat (4) @(posedge clk);
    seu_for(25'b1 << 24, 7);
    repeat (2) @(posedge clk);
    check("sticky flags", code5, exp_code(4'h5, 1, 2, 12));

    // hold freezes the code
    #1 hold = 1;
    seu_for(25'b1 << 10, 9);
    @(posedge clk); #1;
    check("hold", code5, exp_code(4'h5, 1, 2, 12));
    hold = 0;
    do_clear();

    // delay missing only the last sensor, 4 cycles: the document's example
    tid_for(24, 4);
    repeat (3) @(posedge clk);
    check("delay at end x 4", codeA, 32'hAD90_0004);
    do_clear();

    // worse delay keeps the smallest value
    tid_for(20, 6);
    tid_for(9, 3);
    tid_for(22, 2);
    repeat (3) @(posedge clk);
    check("worst delay", codeA, exp_code(4'hA, 0, 10, 11));
    do_clear();

    // upset masks delay: delay first, then upset and delay together
    tid_for(15, 5);
    @(posedge clk); #1 seu_sites = 25'b1 << 3; tid_site = 15;
    repeat (6) @(posedge clk);
    #1 seu_sites = '0; tid_site = -1;
    repeat (3) @(posedge clk);
    check("upset over delay", code5, exp_code(4'h5, 1, 1, 6));
    do_clear();
    // after clear, a pending delay alone
    tid_for(0, 3);
    repeat (3) @(posedge clk);
    check("delay at first sensor", code5, exp_code(4'h5, 0, 1, 3));
    do_clear();

    // all 25 sensors faulty: amount 25
    seu_for('1, 2);
    repeat (2) @(posedge clk);
    check("all upsets", code5, exp_code(4'h5, 1, 25, 2));
    do_clear();

    // a 5 ns upset between two edges: caught, zero cycles long
    @(posedge clk); #5 seu_sites = 25'b1 << 7;
    #5 seu_sites = '0;
    repeat (3) @(posedge clk);
    check("glitch", code5, exp_code(4'h5, 1, 1, 0));
    check("glitch literal", code5, 32'h5E10_0000);
    do_clear();
    check("glitch cleared", code5, 32'h0);

    // duration saturates at 2^20-1
    seu_for(25'b100, 1_048_600);
    repeat (2) @(posedge clk);
    check("saturation", code5, exp_code(4'h5, 1, 1, 20'hFFFFF));
    do_clear();
    repeat (5) @(posedge clk);
    check("quiet end", code5 | codeA, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
