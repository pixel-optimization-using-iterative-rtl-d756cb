// tb_table2_sizes: runs one noisy frame through pipelines built for the
// two other frame sizes of the published timing table, 320x240 and
// 1024x768 (the 640x480 default has its own full-size test), checking
// every output pixel and the one-pixel-per-clock rate, and printing the
// clock count and the frame time at a 10.12 ns clock period.
module tb_table2_sizes;
  logic done_s, done_l;
  int checks_s, failures_s, checks_l, failures_l;

  ipc_frame_runner #(.W(320), .H(240), .NOISE_FIRST(20), .NFRAMES(1)) u_small (
    .done(done_s), .checks(checks_s), .failures(failures_s)
  );
  ipc_frame_runner #(.W(1024), .H(768), .NOISE_FIRST(20), .NFRAMES(1)) u_large (
    .done(done_l), .checks(checks_l), .failures(failures_l)
  );

  initial begin
    int failures;
    #1;  // let the runners clear done first
    fork
      wait (done_s && done_l);
      #50ms;
    join_any
    failures = failures_s + failures_l;
    if (!(done_s && done_l)) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks_s + checks_l, failures);
    $finish;
  end
endmodule
