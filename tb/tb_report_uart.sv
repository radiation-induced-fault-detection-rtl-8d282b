// tb_report_uart: serial text output checked by a behavioural receiver.
//
// Three records (a fault code, a timestamp, a bad memory word) are offered
// back to back. A receiver in the testbench waits for each start bit,
// samples every bit in its middle (bit time = round(25 MHz / 230400) = 109
// clocks), checks the stop bit and rebuilds the text, which must read
// "5E300020", "T00000ABCD" and "Invalid BRAM 55545555", each ending in
// CR LF. The width of the first start bit is measured against the bit time.
module tb_report_uart;
  import asn_pkg::*;
  localparam int DIV = 109;

  logic clk = 0, rst_n = 0;
  logic rec_valid = 0, rec_ready, txd;
  report_rec_t rec;
  int checks = 0, failures = 0;
  string text = "";
  int start_width = -1;

  report_uart dut (.clk, .rst_n, .rec_valid, .rec_ready, .rec, .txd);

  always #20 clk = ~clk;

  // receiver
  initial begin
    logic [7:0] c;
    forever begin
      @(negedge txd);
      if (start_width < 0) begin
        int w = 0;
        while (txd == 1'b0) begin @(posedge clk); w++; end
        start_width = w;
        repeat (DIV / 2) @(posedge clk);   // now mid bit 0 (start was fully consumed)
      end else begin
        repeat (DIV + DIV / 2) @(posedge clk);
      end
      for (int b = 0; b < 8; b++) begin
        c[b] = txd;
        if (b < 7) repeat (DIV) @(posedge clk);
      end
      repeat (DIV) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      text = {text, string'(c)};
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input rec_kind_e k, input logic [CNT_W-1:0] d);
    @(negedge clk);
    rec = '{kind: k, data: d};
    rec_valid = 1;
    @(posedge clk iff rec_ready);
    #1 rec_valid = 0;
  endtask

  initial begin
    string exp_text;
    rec = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (txd !== 1'b1) failures++;
    send(REC_CODE, 35'h05E300020);
    send(REC_TIME, 35'h000000ABCD);
    send(REC_BRAM, 35'h055545555);
    // wait until the line is idle for a while
    wait (rec_ready);
    repeat (20 * DIV) @(posedge clk);
    exp_text = "5E300020\r\nT00000ABCD\r\nInvalid BRAM 55545555\r\n";
    checks++;
    if (text != exp_text) begin failures++; $display("FAIL text \"%s\"", text); end
    checks++;
    if (start_width < DIV - 1 || start_width > DIV + 1) begin
      failures++; $display("FAIL start bit %0d clocks, expected %0d", start_width, DIV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
