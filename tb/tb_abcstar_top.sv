// tb_abcstar_top: end-to-end test of the ABCStar digital part at its default
// size, driven only through the chip pins. It runs the full feature sweep of
// abcstar_env: every edge mode and working mode, mask and latency changes,
// counter and soft reset, test pulses and register reads, with every packet
// on DataOut checked against a reference model. Each mechanism of the design
// (back-pressure, events split over several packets, empty events, PR served
// ahead of LP, ...) is counted, and one that never happened is a failure.
// A watchdog ends the run after 400000 BCs.
module tb_abcstar_top;
  int checks, failures;
  bit done;

  abcstar_env #(.TEST(0)) env (.checks, .failures, .done);

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
