// tb_injected_fault_test: the injected-fault workload at full size. A
// stuck-at fault is held in every one of the 15 networks for 65536 cycles
// (2.6 ms at 25 MHz), all starting together. Every network must report
// type upset, amount 1, and durations that add up to the cycles the fault
// was present while the network was not frozen for reporting; the serial
// text must match the records. The share of faulty cycles lost to freezes
// (the blind time) is printed and must lie between 4 % and 9 %. All
// parameters are at their defaults. See
// tb_asn_top_body.svh.
`define DUT_PARAMS
`define INJECT_ALL 65536
`define WATCHDOG 3000000
module tb_injected_fault_test;
`include "tb_asn_top_body.svh"

  // outer limit in simulated time, beyond the cycle watchdog of the body
  initial begin
    #150ms;
    failures++;
    $display("simulated time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
