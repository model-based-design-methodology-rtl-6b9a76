// tb_hybrid_src_response: measures the passband magnitude response of the
// whole 8 kHz -> 44.1 kHz converter at its default configuration.
//
// For each test tone f (500 Hz, 1, 2, 3 kHz) the converter is reset and fed
// 440 samples of round(1500 * sin(2*pi*f*m/8000)) as fast as it accepts
// them, with the output always taken. Output n lies at input time
// t_n = (n*step/2^32 - 11.5) / 32000 s. Over the 1764 outputs with
// 10 ms <= t_n < 50 ms (a whole number of periods of every tone) the tone
// amplitude is estimated by correlating with sin and cos at f. The measured
// gain must be within 1.5 % of the gain of the interpolation low-pass,
// |sum_n h[n] exp(-j*2*pi*f*n/32000)| / (4 * 2^14), computed here from the
// coefficient table; the cubic Farrow interpolator adds well under 1 % of
// loss at these frequencies. 441 outputs per 80 inputs are checked too.
module tb_hybrid_src_response;
  import src_pkg::*;

  localparam int  NIN = 440;
  localparam real AMP = 1500.0;
  localparam real PI  = 3.14159265358979;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0;
  step_t   phase_step = STEP_32K_TO_44K1;
  logic    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_clipped;
  sample_t in_data = '0, out_data;

  hybrid_src dut (.*);

  always #5 clk = ~clk;

  real freq = 0.0, sum_s = 0.0, sum_c = 0.0;
  int  nin = 0, nout = 0, nwin = 0, cyc = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real lowpass_gain(real f);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < PP_TAPS; n++) begin
      re += real'(PP_COEF[n]) * $cos(2.0 * PI * f * n / 32000.0);
      im -= real'(PP_COEF[n]) * $sin(2.0 * PI * f * n / 32000.0);
    end
    return $sqrt(re * re + im * im) / (4.0 * 16384.0);
  endfunction

  always @(negedge clk) begin
    in_valid <= rst_n && (nin < NIN);
    in_data  <= sample_t'($rtoi(AMP * $sin(2.0 * PI * freq * nin / 8000.0) + 4096.5) - 4096);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) nin++;
    if (out_valid && out_ready) begin
      real t;
      t = (real'(nout) * real'(phase_step) / 4294967296.0 - 11.5) / 32000.0;
      if (t >= 0.010 && t < 0.050) begin
        sum_s += real'(out_data) * $sin(2.0 * PI * freq * t);
        sum_c += real'(out_data) * $cos(2.0 * PI * freq * t);
        nwin++;
      end
      nout++;
    end
  end

  initial begin
    automatic real tones [4] = '{500.0, 1000.0, 2000.0, 3000.0};
    foreach (tones[i]) begin
      real meas, expg;
      rst_n = 1'b0;
      freq = tones[i];
      nin = 0; nout = 0; nwin = 0; sum_s = 0.0; sum_c = 0.0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (nin == NIN);
      repeat (50) @(posedge clk);
      meas = 2.0 * $sqrt(sum_s * sum_s + sum_c * sum_c) / real'(nwin) / AMP;
      expg = lowpass_gain(freq);
      $display("tone %0.0f Hz: gain %0.4f, low-pass alone %0.4f, %0d outputs in window", freq, meas, expg, nwin);
      checks++;
      if (meas < expg * 0.985 || meas > expg * 1.015) begin
        failures++;
        $display("gain at %0.0f Hz off", freq);
      end
      checks++;
      if (nout != NIN * 441 / 80 + ((NIN * 441) % 80 != 0 ? 1 : 0)) begin
        failures++;
        $display("%0d outputs for %0d inputs", nout, NIN);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
