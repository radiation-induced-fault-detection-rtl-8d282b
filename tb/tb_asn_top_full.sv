// tb_asn_top_full: end-to-end test of the sensor network with every
// parameter at its default (15 networks of 29 sensors, 25 MHz, 230400 baud,
// 8 KB memory, 15-minute timestamp counter). The 5-minute time-check and
// the counter wrap lie billions of cycles away and are covered by
// tb_asn_top instead. See tb_asn_top_body.svh.
`define DUT_PARAMS
`define WATCHDOG 2000000
module tb_asn_top_full;
`include "tb_asn_top_body.svh"
endmodule
