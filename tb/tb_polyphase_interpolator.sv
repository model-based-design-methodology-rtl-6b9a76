// tb_polyphase_interpolator: checks the interpolate-by-4 stage end to end.
//
// Reference: the 20-tap prototype filter applied in direct form to the
// zero-stuffed input (3 zeros after every sample), then rounded half up and
// clamped to 12 bits. Stimulus: random samples, runs of full-scale steps
// (whose overshoot must saturate), random gaps on the input and random
// back-pressure on the output. Checked: every output value in order, exactly
// 4 outputs per input, the first output offered one cycle after the input is
// accepted, outputs held while not taken, and back-to-back input acceptance.
module tb_polyphase_interpolator;
  import src_pkg::*;

  localparam int NIN = 1500;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  sample_t in_data = '0, out_data;

  polyphase_interpolator dut (.*);

  always #5 clk = ~clk;

  sample_t xin [NIN];
  int      nout = 0, nin = 0, clips = 0, stalls = 0, b2b = 0;
  logic    prev_fire = 1'b0;

  function automatic sample_t ref_out(int j);
    longint s = 0, r;
    for (int i = 0; i < PP_TAPS; i++)
      if (j - i >= 0 && ((j - i) % PP_L) == 0) s += longint'(PP_COEF[i]) * longint'(xin[(j - i) / PP_L]);
    r = s + 8192;
    r = (r >= 0) ? r / 16384 : -((-r + 16383) / 16384);
    if (r > 2047 || r < -2048) clips++;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return sample_t'(r);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: full-scale square segments, then random
  initial begin
    for (int i = 0; i < NIN; i++)
      xin[i] = (i < 200) ? (((i / 10) % 2) != 0 ? -12'sd2048 : 12'sd2047) : sample_t'($urandom);
  end

  // producer
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (nin < NIN) begin
      @(negedge clk);
      if (!in_valid && ($urandom_range(0, 3) != 0 || nin > NIN/2)) begin
        in_valid = 1'b1; in_data = xin[nin];
      end
      @(posedge clk);
      if (in_valid && in_ready) begin
        nin++;
        #1 in_valid = 1'b0;
        if (nin < NIN && nin > NIN/2) begin in_valid = 1'b1; in_data = xin[nin]; end
      end
    end
  end

  // consumer with random back-pressure; cycle-level checks
  always @(negedge clk) out_ready <= (nin > NIN/2) ? 1'b1 : ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (prev_fire) begin
      checks++;
      if (!out_valid) begin failures++; $display("first output not offered 1 cycle after input"); end
    end
    if (out_valid && !out_ready) stalls++;
    if (in_valid && in_ready && out_valid) b2b++;
    if (out_valid && out_ready) begin
      sample_t e;
      e = ref_out(nout);
      checks++;
      if (out_data !== e) begin
        failures++;
        $display("MISMATCH output %0d: got %0d expected %0d", nout, out_data, e);
      end
      nout++;
    end
    prev_fire <= in_valid && in_ready;
  end

  initial begin
    wait (nin == NIN);
    repeat (20) @(posedge clk);
    checks++;
    if (nout != PP_L * NIN) begin failures++; $display("output count %0d, expected %0d", nout, PP_L*NIN); end
    checks++;
    if (clips == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (stalls == 0 || b2b == 0) begin failures++; $display("stall %0d / back-to-back %0d not exercised", stalls, b2b); end
    $display("outputs=%0d clips=%0d stalls=%0d back_to_back=%0d", nout, clips, stalls, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
