// tb_bram: block memory write/read with one-cycle read latency.
// Random writes and reads against a reference array kept in the testbench;
// read data must appear on the clock after the address and be the value
// held before a write to the same word in that cycle.
module tb_bram;
  localparam int WORDS = 2048;
  logic clk = 0;
  logic we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [WORDS];
  logic [31:0] expect_q;
  int checks = 0, failures = 0;

  bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #20 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      raddr = 11'($urandom);
      expect_q = ref_mem[raddr];
      we = $urandom_range(0, 1) != 0;
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 11'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
