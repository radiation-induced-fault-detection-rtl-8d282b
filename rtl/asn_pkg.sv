// asn_pkg: types and constants shared by the active sensor network.
//
// The active sensor network watches for radiation-induced faults on an FPGA.
// Fifteen chains of 29 inverter "sensors" carry a three-bit vector: a static
// one, a static zero and a bit that toggles every clock cycle. Analyzers flag
// single-event upsets (a static bit that flips) and delay faults (the toggling
// bit not reaching the end of the chain by the falling clock edge), and a
// reporter prints 32-bit fault codes as eight hex characters over RS232.
//
// Fault code layout (follows the document's report format):
//   [31:28] network number, 0 .. 14 (printed '0' .. 'E')
//   [27:26] 2'b11 when a fault is present
//   [25]    1 = single-event upset, 0 = delay fault
//   [24:20] number of faulty sensors (upset) or delay value (delay)
//   [19:0]  clock cycles with the fault present since the last report
// so the second hex character reads 'E'/'F' for an upset and 'C'/'D' for a
// delay, and a network with no fault reports all zeros.
package asn_pkg;

  localparam int unsigned ASN_NETWORKS = 15;  // networks 0 .. E
  localparam int unsigned ASN_SENSORS  = 29;  // sensors per chain
  localparam int unsigned ASN_MON      = 25;  // monitored sensors per chain
  localparam int unsigned ASN_SITES    = 3;   // fault injection sites per chain
  localparam int unsigned DUR_W        = 20;  // duration field, five hex characters
  localparam int unsigned CNT_W        = 35;  // timestamp counter, 15 min at 25 MHz

  // Bit positions inside the three-bit sensor vector.
  localparam int unsigned B_HI  = 2;  // static high at the chain input
  localparam int unsigned B_LO  = 1;  // static low at the chain input
  localparam int unsigned B_TOG = 0;  // alternating bit

  typedef logic [2:0] vec_t;

  // Control of one fault injection site. A stuck-at injection replaces the
  // masked bits of the sensor input with 'value'; a delay injection feeds the
  // sensor the alternating bit as it was one clock cycle earlier.
  typedef struct packed {
    logic       en;
    logic [2:0] mask;
    logic [2:0] value;
    logic       delay;
  } inj_ctrl_t;

  typedef enum logic [1:0] {
    REC_CODE  = 2'd0,  // 32-bit fault code
    REC_TIME  = 2'd1,  // timestamp (counter value)
    REC_BRAM  = 2'd2   // word read from block memory that lost its pattern
  } rec_kind_e;

  typedef struct packed {
    rec_kind_e          kind;
    logic [CNT_W-1:0]   data;
  } report_rec_t;

  // Fault code assembly.
  function automatic logic [31:0] make_code(input logic [3:0] net, input logic seu,
                                            input logic [4:0] amount,
                                            input logic [DUR_W-1:0] dur);
    return {net, 2'b11, seu, amount, dur};
  endfunction

endpackage
