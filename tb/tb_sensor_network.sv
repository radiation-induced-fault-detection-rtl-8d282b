// tb_sensor_network: checks the sensor chain against a reference chain.
//
// The reference is written out position by position: monitored sensors sit
// at chain positions 0, 3, 6, 7, 8, ... 28 (two unmonitored buffers after
// monitored sensors 0 and 1), injection sites at monitored sensors 4, 12 and
// 20. Each cycle a random input vector and random injection controls are
// applied on the falling edge and all 25 monitored outputs are compared.
// A delay injection must hand the site the alternating bit that arrived at
// the site one rising edge earlier.
module tb_sensor_network;
  import asn_pkg::*;

  localparam int NS = 29, NM = 25;
  localparam int MON_POS [NM] = '{0, 3, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18,
                                  19, 20, 21, 22, 23, 24, 25, 26, 27, 28};
  localparam int SITE_CHAIN [3] = '{8, 16, 24};

  logic      clk = 0;
  vec_t      vin;
  inj_ctrl_t inj [3];
  vec_t      mon [NM];
  int checks = 0, failures = 0;
  int n_delay = 0, n_stuck = 0;
  logic late_ref [3];

  sensor_network dut (.clk, .vin, .inj, .mon);

  always #20 clk = ~clk;

  // reference chain: returns output of chain position p, or the input
  // arriving at position p when want_in is set
  function automatic vec_t ref_chain(input int p, input bit want_in);
    vec_t v, vi;
    v = vin;
    for (int c = 0; c < NS; c++) begin
      vi = v;
      for (int s = 0; s < 3; s++)
        if (SITE_CHAIN[s] == c && inj[s].en) begin
          if (inj[s].delay) vi[0] = late_ref[s];
          else for (int b = 0; b < 3; b++) if (inj[s].mask[b]) vi[b] = inj[s].value[b];
        end
      if (c == p && want_in) return v;
      v = ~vi;
      if (c == p) return v;
    end
    return v;
  endfunction

  always @(posedge clk)
    for (int s = 0; s < 3; s++) late_ref[s] <= ref_chain(SITE_CHAIN[s], 1'b1)[0];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 3'b100;
    for (int s = 0; s < 3; s++) inj[s] = '0;
    repeat (2) @(posedge clk);  // both the reference and the DUT registers settle
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      vin = 3'($urandom);
      for (int s = 0; s < 3; s++) begin
        inj[s] = inj_ctrl_t'($urandom);
        if ($urandom_range(0, 1)) inj[s].en = 1'b0;
        if (inj[s].en && inj[s].delay) n_delay++;
        if (inj[s].en && !inj[s].delay && inj[s].mask != 0) n_stuck++;
      end
      #2;
      for (int m = 0; m < NM; m++) begin
        vec_t e;
        e = ref_chain(MON_POS[m], 1'b0);
        checks++;
        if (mon[m] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d mon[%0d]=%b exp %b", cyc, m, mon[m], e);
        end
      end
    end
    // plain chain: monitored sensor m carries the input inverted m+1 times
    @(negedge clk);
    for (int s = 0; s < 3; s++) inj[s] = '0;
    vin = 3'b100;
    #2;
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (mon[m] !== ((m % 2 == 0) ? 3'b011 : 3'b100)) failures++;
    end
    checks++;
    if (n_delay == 0 || n_stuck == 0) failures++;
    $display("delay injections %0d, stuck-at injections %0d", n_delay, n_stuck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
