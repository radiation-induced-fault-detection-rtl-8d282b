// asn_top: active sensor network for real-time radiation fault characterisation.
//
// One cycle_counter drives a shared input vector {1, 0, toggle} into
// NUM_NETWORKS sensor_network chains, each meant to be placed on its own
// region of the die so that a fault's network number gives its location.
// Each chain has its own network_analyzer, which detects single-event upsets
// (static bits that flip, counted per sensor) and delay faults (the toggling
// bit not reaching the end of the chain by the falling clock edge, with how
// far it got), and times how long each lasted. The fault_reporter visits the
// analyzers in turn and sends their non-zero 32-bit codes, a timestamp and
// any bad word found by the bram_checker to report_uart, which prints them
// as hex text lines on the serial output.
//
// Interface: 'inj' controls the three fault injection sites of every chain
// (see asn_pkg::inj_ctrl_t); 'bram_upset_*' flips bits of one memory word;
// 'rec_fire'/'rec' show each record as the printer takes it; 'net_seu' and
// 'net_tid' show, per network, an upset visible or a delay fault counted in
// this cycle; 'net_hold' shows which network is frozen for reporting and
// 'time_check' the 5-minute timestamp request. Timing: one clock domain, 25 MHz by default (40 ns period, so
// the toggle bit has 20 ns to cross a chain); delay sampling uses the
// falling edge. Reset is asynchronous, active low.
//
// Fifteen networks of 29 sensors, the code format, the reporting order and
// the 8 KB memory check follow the document. The document's embedded
// processor, which sequences the reporting and fills and reads the memory,
// is replaced here by the reporter and checker state machines.
module asn_top
  import asn_pkg::*;
#(
  parameter int unsigned     NUM_NETWORKS = ASN_NETWORKS,
  parameter int unsigned     CLK_HZ       = 25_000_000,
  parameter int unsigned     BAUD         = 230_400,
  parameter longint unsigned WRAP_CYCLES  = 64'd22_500_000_000,
  parameter longint unsigned CHECK_CYCLES = 64'd7_500_000_000,
  parameter int unsigned     BRAM_WORDS   = 2048,
  parameter int unsigned     BRAM_AW      = $clog2(BRAM_WORDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  inj_ctrl_t               inj [NUM_NETWORKS][ASN_SITES],
  input  logic                    bram_upset_we,
  input  logic [BRAM_AW-1:0]      bram_upset_addr,
  input  logic [31:0]             bram_upset_xor,
  output logic                    rec_fire,
  output report_rec_t             rec,
  output logic [NUM_NETWORKS-1:0] net_seu,
  output logic [NUM_NETWORKS-1:0] net_tid,
  output logic [NUM_NETWORKS-1:0] net_hold,
  output logic                    time_check,
  output logic                    bram_init_done,
  output logic                    uart_txd
);
  logic [CNT_W-1:0]        count;
  vec_t                    vec;
  logic [31:0]             codes [NUM_NETWORKS];
  logic [NUM_NETWORKS-1:0] hold, clear;
  logic                    bad_valid, bad_ack;
  logic [31:0]             bad_word;
  logic                    rec_valid, rec_ready;

  cycle_counter #(.WRAP_CYCLES(WRAP_CYCLES), .CHECK_CYCLES(CHECK_CYCLES)) u_counter (
    .clk, .rst_n, .count, .vec, .time_check
  );

  for (genvar n = 0; n < NUM_NETWORKS; n++) begin : g_net
    vec_t mon [ASN_MON];

    sensor_network #(.NUM_SENSORS(ASN_SENSORS), .NUM_MON(ASN_MON), .N_SITES(ASN_SITES)) u_chain (
      .clk, .vin(vec), .inj(inj[n]), .mon
    );

    network_analyzer #(.NUM_MON(ASN_MON), .NET_ID(4'(n))) u_analyzer (
      .clk, .rst_n, .vin(vec), .lsb(count[0]), .mon,
      .hold(hold[n]), .clear(clear[n]), .code(codes[n]),
      .seu_now(net_seu[n]), .tid_now(net_tid[n])
    );
  end

  bram_checker #(.WORDS(BRAM_WORDS), .AW(BRAM_AW)) u_bram_check (
    .clk, .rst_n, .upset_we(bram_upset_we), .upset_addr(bram_upset_addr),
    .upset_xor(bram_upset_xor), .bad_valid, .bad_word, .bad_ack, .init_done(bram_init_done)
  );

  fault_reporter #(.NUM_NETWORKS(NUM_NETWORKS)) u_reporter (
    .clk, .rst_n, .codes, .hold, .clear, .count, .time_check,
    .bram_valid(bad_valid), .bram_word(bad_word), .bram_ack(bad_ack),
    .rec_valid, .rec_ready, .rec
  );

  report_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .rec_valid, .rec_ready, .rec, .txd(uart_txd)
  );

  assign rec_fire = rec_valid && rec_ready;
  assign net_hold = hold;

  initial assert (NUM_NETWORKS <= 16) else $error("network number is one hex digit");
endmodule
