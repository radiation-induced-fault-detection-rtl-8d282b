// sensor: one three-input / three-output inverter block of a sensor chain.
//
// Every bit of the incoming vector is inverted ("100" leaves as "011"). The
// block also serves as a fault injection site: bits selected by inj_mask are
// taken from inj_val instead of from the previous sensor, which emulates a
// stuck-at fault on the wire into the sensor. With inj_mask = 0 the block is
// a plain inverter. Purely combinational; its propagation delay is what the
// delay check measures on silicon. The inverter function follows the
// document; the per-bit injection mask is this design's choice.
module sensor (
  input  logic [2:0] vin,
  input  logic [2:0] inj_mask,
  input  logic [2:0] inj_val,
  output logic [2:0] vout
);
  always_comb vout = ~((vin & ~inj_mask) | (inj_val & inj_mask));
endmodule
