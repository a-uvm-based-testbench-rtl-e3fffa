// tb_workload_trigger_mix: trigger combination workload on the full chip.
// 8800 L0 triggers (about 11000 packets) with intervals drawn around a mean
// of 40 BCs (1 MHz); every event is read by an LP and one in ten also by a PR,
// each after a delay drawn around 480 BCs. The test checks the measured means, that no request was
// dropped, every packet against the reference model of abcstar_env, and that
// all 256 channels appear in the events read out. Watchdog: 1000000 BCs.
module tb_workload_trigger_mix;
  int checks, failures;
  bit done;

  abcstar_env #(.TEST(3)) env (.checks, .failures, .done);

  initial begin
    repeat (1000000) @(posedge env.BC);
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
