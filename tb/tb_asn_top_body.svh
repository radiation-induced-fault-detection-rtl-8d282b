// Shared body of the end-to-end testbenches of asn_top (included inside the
// testbench module after DUT_PARAMS and SHORT_PERIODS are defined).
//
// Fault windows are opened in 13 of the 15 networks at the same moment:
// single and multiple stuck-at upsets, delay injections at the three sites,
// an upset together with a delay, a one-cycle upset and one window long
// enough to span several report rounds. Two memory words are upset. Every
// record taken by the serial printer is checked against the injections:
// network number, type, amount (number of faulty sites, or the delay value
// = monitored site + 1) and, summed over the network's records, the
// duration, which must equal the cycles the fault was visible while the
// network was not frozen for reporting. The serial line is decoded by a
// behavioural receiver and must carry exactly the text of those records.

  import asn_pkg::*;

  localparam int NN   = 15;
  localparam int DIV  = 109;                 // 25 MHz / 230400, rounded
  localparam int MONSITE [3] = '{4, 12, 20}; // monitored sensor of each site

  typedef enum int { F_NONE, F_SEU, F_TID, F_MIX } ftype_e;

  logic clk = 0, rst_n = 0;
  inj_ctrl_t inj [NN][3];
  logic bram_upset_we = 0;
  logic [10:0] bram_upset_addr = 0;
  logic [31:0] bram_upset_xor = 0;
  logic rec_fire, bram_init_done, uart_txd;
  report_rec_t rec;
  logic [NN-1:0] net_seu, net_tid, net_hold;
  logic time_check;

  asn_top `DUT_PARAMS dut (
    .clk, .rst_n, .inj, .bram_upset_we, .bram_upset_addr, .bram_upset_xor,
    .rec_fire, .rec, .net_seu, .net_tid, .net_hold, .time_check, .bram_init_done, .uart_txd
  );

  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---- scenario ----
  ftype_e ftype  [NN];
  int     famount[NN];       // expected amount field
  int     fwin   [NN];       // window length in cycles
  logic   active [NN];       // injections of network n are applied
  int     exp_dur[NN], got_dur[NN], nrec[NN];

  // mechanisms seen
  longint blind_pm;
  int m_seu = 0, m_tid = 0, m_mask = 0, m_frozen = 0, m_multi = 0, m_time = 0;
  int m_bram = 0, m_lines = 0, m_tcheck = 0, m_wrap = 0, m_skip = 0;

  function automatic inj_ctrl_t stuck(input logic [2:0] mask, input logic [2:0] value);
    return '{en: 1'b1, mask: mask, value: value, delay: 1'b0};
  endfunction
  function automatic inj_ctrl_t late();
    return '{en: 1'b1, mask: 3'b000, value: 3'b000, delay: 1'b1};
  endfunction

  // ---- expected durations: a visible fault counts at a rising edge unless
  // the network is held by the reporter in the cycle before that edge ----
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++)
      if (active[n]) begin
        if (!net_hold[n]) exp_dur[n]++;
        else m_frozen++;
      end
  end

  always @(posedge clk) begin
    if (rst_n && |net_seu) m_seu++;
    if (rst_n && |net_tid) m_tid++;
  end

  // ---- records ----
  function automatic string up(input string s);
    return s.toupper();
  endfunction

  string exp_lines [$];
  logic [CNT_W-1:0] last_time = 0;
  logic seen_time = 0;
  longint last_rec_cyc = 0;
  int maxwin = 0;

  always @(posedge clk) if (rec_fire && rst_n) begin
    last_rec_cyc = cyc;
    unique case (rec.kind)
      REC_CODE: begin
        int n;
        logic [31:0] c;
        c = rec.data[31:0];
        n = int'(c[31:28]);
        exp_lines.push_back(up($sformatf("%08X\r\n", c)));
        checks++;
        if (c[27:26] != 2'b11 || n >= NN || ftype[n] == F_NONE) begin
          failures++; $display("FAIL unexpected code %08X", c);
        end else begin
          logic seu;
          seu = (ftype[n] == F_SEU || ftype[n] == F_MIX);
          checks++;
          if (c[25] != seu || int'(c[24:20]) != famount[n]) begin
            failures++; $display("FAIL code %08X: expected type %0d amount %0d", c, seu, famount[n]);
          end
          got_dur[n] += int'(c[19:0]);
          nrec[n]++;
          if (nrec[n] == 2) m_multi++;
          if (ftype[n] == F_MIX) m_mask++;
        end
      end
      REC_TIME: begin
        exp_lines.push_back({"T", up($sformatf("%09X\r\n", 36'(rec.data)))});
        m_time++;
        if (seen_time && rec.data < last_time) m_wrap++;
        last_time = rec.data;
        seen_time = 1;
      end
      REC_BRAM: begin
        exp_lines.push_back({"Invalid BRAM ", up($sformatf("%08X\r\n", rec.data[31:0]))});
        m_bram++;
        checks++;
        if (rec.data[31:0] != (32'h5555_5555 ^ 32'h0000_0100) &&
            rec.data[31:0] != (32'h5555_5555 ^ 32'h8000_0001)) begin
          failures++; $display("FAIL memory word %08X", rec.data[31:0]);
        end
      end
      default: begin failures++; $display("FAIL record kind %0d data %h at cycle %0d", rec.kind, rec.data, cyc); end
    endcase
  end

  always @(posedge clk) if (time_check && rst_n) m_tcheck++;

  // ---- serial receiver ----
  string line = "";
  string got_lines [$];
  longint last_txd_cyc = 0;
  initial begin
    logic [7:0] c;
    forever begin
      @(negedge uart_txd);
      repeat (DIV + DIV / 2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin
        c[b] = uart_txd;
        if (b < 7) repeat (DIV) @(posedge clk);
      end
      repeat (DIV) @(posedge clk);
      checks++;
      if (uart_txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      line = {line, string'(c)};
      last_txd_cyc = cyc;
      if (c == 8'h0A) begin got_lines.push_back(line); line = ""; m_lines++; end
    end
  end

  initial begin
    repeat (`WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      for (int s = 0; s < 3; s++) inj[n][s] = '0;
      ftype[n] = F_NONE; famount[n] = 0; fwin[n] = 0; active[n] = 0;
      exp_dur[n] = 0; got_dur[n] = 0; nrec[n] = 0;
    end
`ifdef INJECT_ALL
    for (int n = 0; n < NN; n++) begin ftype[n] = F_SEU; famount[n] = 1; fwin[n] = `INJECT_ALL; end
`else
    // upsets: every site input carries static-high 1 and static-low 0
    // unless an earlier site flipped it
    ftype[0] = F_SEU; famount[0] = 1; fwin[0] = 100;
    ftype[1] = F_SEU; famount[1] = 2; fwin[1] = 300;
    ftype[2] = F_SEU; famount[2] = 3; fwin[2] = 32;
    ftype[3] = F_TID; famount[3] = MONSITE[2] + 1; fwin[3] = 200;
    ftype[4] = F_TID; famount[4] = MONSITE[0] + 1; fwin[4] = 50;
    ftype[5] = F_MIX; famount[5] = 1; fwin[5] = 400;
    ftype[6] = F_SEU; famount[6] = 1; fwin[6] = 1;
    ftype[7] = F_TID; famount[7] = MONSITE[1] + 1; fwin[7] = 40000;
    ftype[8] = F_SEU; famount[8] = 1; fwin[8] = 30000;
    for (int n = 9; n < 13; n++) begin ftype[n] = F_SEU; famount[n] = 1; fwin[n] = 500 * (n - 8); end
`endif

    repeat (3) @(posedge clk);
    #5 rst_n = 1;
    wait (bram_init_done);
    repeat (50) @(posedge clk);

    // open all windows right after a rising edge
    #5;
`ifdef INJECT_ALL
    for (int n = 0; n < NN; n++) inj[n][n % 3] = stuck(3'b100, 3'b000);
`else
    inj[0][0]  = stuck(3'b100, 3'b000);
    inj[1][0]  = stuck(3'b100, 3'b000); inj[1][2] = stuck(3'b010, 3'b010);
    inj[2][0]  = stuck(3'b100, 3'b000); inj[2][1] = stuck(3'b010, 3'b010); inj[2][2] = stuck(3'b100, 3'b100);
    inj[3][2]  = late();
    inj[4][0]  = late();
    inj[5][1]  = late(); inj[5][2] = stuck(3'b010, 3'b010);
    inj[6][1]  = stuck(3'b110, 3'b000);
    inj[7][1]  = late();
    inj[8][2]  = stuck(3'b100, 3'b000);
    for (int n = 9; n < 13; n++) inj[n][n % 3] = stuck(3'b010, 3'b010);
`endif
    for (int n = 0; n < NN; n++) active[n] = (ftype[n] != F_NONE);
    for (int n = 0; n < NN; n++) if (fwin[n] > maxwin) maxwin = fwin[n];
    fork
      for (int n = 0; n < NN; n++) begin
        automatic int k = n;
        if (ftype[k] != F_NONE) fork
          begin
            repeat (fwin[k]) @(posedge clk);
            #5;
            for (int s = 0; s < 3; s++) inj[k][s] = '0;
            active[k] = 0;
          end
        join_none
      end
      begin
        repeat (1000) @(posedge clk);
        #5 bram_upset_we = 1; bram_upset_addr = 11'd77; bram_upset_xor = 32'h0000_0100;
        @(posedge clk);
        #5 bram_upset_addr = 11'd1900; bram_upset_xor = 32'h8000_0001;
        @(posedge clk);
        #5 bram_upset_we = 0;
      end
    join
    repeat (maxwin + 10) @(posedge clk);
    // let the reporter and the serial line drain
    while (cyc - last_rec_cyc < 4 * NN + 40 || cyc - last_txd_cyc < 30 * DIV) @(posedge clk);
`ifdef SHORT_PERIODS
    // quiet time: time-checks and a counter wrap
    repeat (`QUIET) @(posedge clk);
    while (cyc - last_txd_cyc < 30 * DIV) @(posedge clk);
`endif

    for (int n = 0; n < NN; n++) begin
      checks++;
      if (got_dur[n] != exp_dur[n]) begin
        failures++; $display("FAIL network %0d duration %0d expected %0d (%0d records)", n, got_dur[n], exp_dur[n], nrec[n]);
      end
      checks++;
      if ((exp_dur[n] > 0) != (nrec[n] > 0)) begin failures++; $display("FAIL network %0d records %0d", n, nrec[n]); end
      if (ftype[n] == F_NONE && nrec[n] == 0) m_skip++;
    end
    checks++;
    if (got_lines.size() != exp_lines.size()) begin
      failures++; $display("FAIL %0d lines received, %0d records sent", got_lines.size(), exp_lines.size());
    end
    for (int i = 0; i < got_lines.size() && i < exp_lines.size(); i++) begin
      checks++;
      if (got_lines[i] != exp_lines[i]) begin failures++; $display("FAIL line %0d \"%s\" expected \"%s\"", i, got_lines[i], exp_lines[i]); end
    end

    $display("mechanisms: upset cycles %0d, delay cycles %0d, upset over delay %0d, frozen cycles %0d,",
             m_seu, m_tid, m_mask, m_frozen);
    $display("  repeated reports %0d, zero codes skipped %0d, timestamps %0d, memory reports %0d, lines %0d,",
             m_multi, m_skip, m_time, m_bram, m_lines);
    $display("  time-checks %0d, counter wraps %0d, %0d cycles", m_tcheck, m_wrap, cyc);
    checks++; if (m_seu == 0)    begin failures++; $display("FAIL no upset detected"); end
`ifndef INJECT_ALL
    checks++; if (m_tid == 0)    begin failures++; $display("FAIL no delay detected"); end
    checks++; if (m_mask == 0)   begin failures++; $display("FAIL upset never masked a delay"); end
`endif
    checks++; if (m_frozen == 0) begin failures++; $display("FAIL no fault during a freeze"); end
    checks++; if (m_multi == 0)  begin failures++; $display("FAIL no network reported twice"); end
`ifdef INJECT_ALL
    // blind time: share of the faulty cycles that fell into a freeze. With
    // every network faulty each one is frozen for one slot in sixteen
    // (15 codes and a timestamp per round), a little over 6 %.
    blind_pm = longint'(m_frozen) * 1000 / (longint'(NN) * `INJECT_ALL);
    $display("  blind time %0d.%0d %% of faulty cycles", blind_pm / 10, blind_pm % 10);
    checks++; if (blind_pm < 40 || blind_pm > 90) begin failures++; $display("FAIL blind time"); end
    checks++; if (m_skip != 0)   begin failures++; $display("FAIL quiet networks"); end
`else
    checks++; if (m_skip != 2)   begin failures++; $display("FAIL quiet networks"); end
`endif
    checks++; if (m_time == 0)   begin failures++; $display("FAIL no timestamp"); end
    checks++; if (m_bram != 2)   begin failures++; $display("FAIL memory reports %0d", m_bram); end
    checks++; if (m_lines == 0)  begin failures++; $display("FAIL no serial text"); end
`ifdef SHORT_PERIODS
    checks++; if (m_tcheck < 2)  begin failures++; $display("FAIL time-checks %0d", m_tcheck); end
    checks++; if (m_wrap == 0)   begin failures++; $display("FAIL counter never wrapped"); end
`endif
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
