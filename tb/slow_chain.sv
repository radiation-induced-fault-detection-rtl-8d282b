// slow_chain: behavioural model (simulation only, not synthesizable) of a
// placed sensor chain with a real propagation delay.
//
// Same topology as sensor_network with its defaults (29 inverting stages,
// monitored sensors at chain positions 0, 3, 6, 7, ... 28), but every stage
// switches stage_ps picoseconds after its input changes (transport delay),
// so the toggling bit reaches chain position c (c+1) * stage_ps after it was
// launched. Used to show how the analyzer's delay value follows a uniform
// slowdown of the chain, as heating or ionizing dose would cause.
module slow_chain #(
  parameter int unsigned NUM_SENSORS = 29,
  parameter int unsigned NUM_MON     = 25
) (
  input  logic [2:0] vin,
  input  int         stage_ps,
  output logic [2:0] mon [NUM_MON]
);
  localparam int unsigned PAIRS = (NUM_SENSORS - NUM_MON) / 2;

  logic [2:0] node [NUM_SENSORS + 1];   // node[c+1] is the output of stage c

  always @(vin) node[1] <= #(real'(stage_ps) / 1000.0) ~vin;
  for (genvar c = 1; c < NUM_SENSORS; c++) begin : g_stage
    always @(node[c]) node[c+1] <= #(real'(stage_ps) / 1000.0) ~node[c];
  end

  for (genvar m = 0; m < NUM_MON; m++) begin : g_mon
    localparam int unsigned POS = m + 2 * ((m < PAIRS) ? m : PAIRS);
    assign mon[m] = node[POS + 1];
  end
endmodule
