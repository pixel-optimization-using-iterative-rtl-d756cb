// tb_noise_sweep: runs the pipeline (64x48 frames) on one synthetic image
// at the nine salt-and-pepper noise densities 10 % ... 90 %, checking every
// output pixel against the reference filters, the one-pixel-per-clock
// rate, and that the output improves on the noisy input up to 50 % noise;
// prints MSE and PSNR of input and output for each density.
module tb_noise_sweep;
  logic done;
  int checks, failures;

  ipc_frame_runner #(.W(64), .H(48), .NOISE_FIRST(10), .NOISE_STEP(10), .NFRAMES(9)) u_run (.*);

  initial begin
    #1;  // let the runners clear done first
    fork
      wait (done);
      #20ms;
    join_any
    if (!done) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
