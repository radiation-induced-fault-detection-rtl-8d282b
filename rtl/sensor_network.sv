// sensor_network: one chain of inverter sensors spread over a region of the die.
//
// The generated vector {1, 0, toggle} enters sensor 0 and passes through
// NUM_SENSORS sensors. NUM_MON of them are monitored: their outputs go to the
// network analyzer as mon[0] .. mon[NUM_MON-1]. The remaining sensors are
// unmonitored delay buffers, placed in pairs after monitored sensors 0, 1, ...
// so that a pair inverts twice and every monitored sensor m still carries the
// input vector inverted m+1 times. With the defaults (29 sensors, 25
// monitored) the chain is
//   S0 B B S1 B B S2 S3 ... S24.
//
// Three fault injection sites sit at monitored sensors SITE_POS. A stuck-at
// injection replaces masked input bits of that sensor with a constant. A
// delay injection gives the sensor the alternating bit as it was one clock
// earlier (a register clocked on the rising edge), which is what the
// falling-edge sample sees when the signal has not arrived in time; this
// replaces the document's simulation-only 10 ns wait and is this design's
// choice. The chain itself is combinational; only the delay-injection
// registers use clk. The sensor outputs carry a 'keep' attribute so that
// synthesis does not merge the inverters away (placing each chain on its own
// region of the die is left to floorplanning constraints). Sensor counts, the pairwise buffer placement and three
// injection sites follow the document; the site positions are chosen here.
module sensor_network
  import asn_pkg::*;
#(
  parameter int unsigned NUM_SENSORS = ASN_SENSORS,
  parameter int unsigned NUM_MON     = ASN_MON,
  parameter int unsigned N_SITES     = ASN_SITES,
  parameter int unsigned SITE_POS [N_SITES] = '{4, 12, 20}
) (
  input  logic                 clk,
  input  vec_t                 vin,
  input  inj_ctrl_t            inj [N_SITES],
  output vec_t                 mon [NUM_MON]
);
  localparam int unsigned PAIRS = (NUM_SENSORS - NUM_MON) / 2;

  // chain position of monitored sensor m
  function automatic int unsigned chain_pos(input int unsigned m);
    return m + 2 * ((m < PAIRS) ? m : PAIRS);
  endfunction

  vec_t chain_in  [NUM_SENSORS];
  (* keep = "true" *) vec_t chain_out [NUM_SENSORS];
  logic [2:0] mask [NUM_SENSORS];
  logic [2:0] val  [NUM_SENSORS];
  logic       tog_late [N_SITES];

  // one-cycle-late copy of the alternating bit arriving at each site
  for (genvar s = 0; s < N_SITES; s++) begin : g_late
    always_ff @(posedge clk) tog_late[s] <= chain_in[chain_pos(SITE_POS[s])][B_TOG];
  end

  always_comb begin
    for (int unsigned c = 0; c < NUM_SENSORS; c++) begin
      mask[c] = '0;
      val[c]  = '0;
    end
    for (int unsigned s = 0; s < N_SITES; s++) begin
      if (inj[s].en) begin
        if (inj[s].delay) begin
          mask[chain_pos(SITE_POS[s])][B_TOG] = 1'b1;
          val[chain_pos(SITE_POS[s])][B_TOG]  = tog_late[s];
        end else begin
          mask[chain_pos(SITE_POS[s])] = inj[s].mask;
          val[chain_pos(SITE_POS[s])]  = inj[s].value;
        end
      end
    end
  end

  for (genvar c = 0; c < NUM_SENSORS; c++) begin : g_chain
    if (c == 0) begin : g_first
      assign chain_in[c] = vin;
    end else begin : g_next
      assign chain_in[c] = chain_out[c-1];
    end
    sensor u_sensor (.vin(chain_in[c]), .inj_mask(mask[c]), .inj_val(val[c]), .vout(chain_out[c]));
  end

  for (genvar m = 0; m < NUM_MON; m++) begin : g_mon
    assign mon[m] = chain_out[chain_pos(m)];
  end

  initial begin
    assert ((NUM_SENSORS - NUM_MON) % 2 == 0)
      else $error("unmonitored sensors must come in pairs");
    for (int unsigned s = 0; s < N_SITES; s++)
      assert (SITE_POS[s] < NUM_MON) else $error("injection site outside the chain");
  end
endmodule
