// tb_asn_top: end-to-end test of the sensor network with short timestamp
// periods (counter wrap every 60000 cycles, time-check every 20000) so that
// the 5-minute time-check records and the 15-minute counter wrap also occur;
// all other parameters are at their defaults. See tb_asn_top_body.svh.
`define DUT_PARAMS #(.WRAP_CYCLES(64'd60000), .CHECK_CYCLES(64'd20000))
`define SHORT_PERIODS
`define QUIET 70000
`define WATCHDOG 2000000
module tb_asn_top;
`include "tb_asn_top_body.svh"
endmodule
