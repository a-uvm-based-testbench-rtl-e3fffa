// tb_workload_edge_modes: edge detection workload on the full chip. The input
// register is switched between LEVEL, HIT and EDGE mode in two rounds: LEVEL
// for 250 events, then HIT and EDGE for 125 each, about 20000, 10000 and
// 10000 BCs per mode in all. Fewer than six strips are hit per BC, and the
// triggers follow the statistics of the verification runs (L0 every ~40 BCs,
// LP/PR ~480 BCs later). Every packet is checked against the reference model
// of abcstar_env, the input register's own assertions check each mode, and
// all 256 channels must be seen hit at the input register output in each
// mode and in the events read out. Watchdog: 400000 BCs.
module tb_workload_edge_modes;
  int checks, failures;
  bit done;

  abcstar_env #(.TEST(1)) env (.checks, .failures, .done);

  initial begin
    repeat (400000) @(posedge env.BC);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
