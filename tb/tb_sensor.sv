// tb_sensor: exhaustive check of the inverter sensor and its injection mask.
// Every combination of input, mask and injected value is applied; the
// expected output is built bit by bit: each bit is the inverse of the
// injected value where the mask is set and of the input elsewhere.
module tb_sensor;
  logic [2:0] vin, inj_mask, inj_val, vout;
  int checks = 0, failures = 0;

  sensor dut (.vin, .inj_mask, .inj_val, .vout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int m = 0; m < 8; m++)
        for (int v = 0; v < 8; v++) begin
          logic [2:0] exp_out;
          vin = 3'(a); inj_mask = 3'(m); inj_val = 3'(v);
          #1;
          for (int b = 0; b < 3; b++) exp_out[b] = m[b] ? !v[b] : !a[b];
          checks++;
          if (vout !== exp_out) begin
            failures++;
            $display("FAIL vin=%b mask=%b val=%b out=%b exp=%b", vin, inj_mask, inj_val, vout, exp_out);
          end
        end
    // the document's example: "100" leaves the sensor as "011"
    vin = 3'b100; inj_mask = '0; inj_val = '0; #1;
    checks++;
    if (vout !== 3'b011) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
