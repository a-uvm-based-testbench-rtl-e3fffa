// tb_workload_mask_bits: mask workload on the full chip. New mask bits are
// written by command before each of eight runs of 100 events (about 32000
// BCs), a random mostly-on mask followed by its complement in turn, with
// fewer than six hit strips per BC. Every packet is checked against the reference model of
// abcstar_env, and every one of the 256 channels must be seen both passed and
// blocked by its mask bit. Watchdog: 400000 BCs.
module tb_workload_mask_bits;
  int checks, failures;
  bit done;

  abcstar_env #(.TEST(2)) env (.checks, .failures, .done);

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
