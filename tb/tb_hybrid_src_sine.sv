// tb_hybrid_src_sine: converts 20 ms of a 1 kHz tone from 8 kHz to 44.1 kHz
// with the converter at its default configuration and checks the result
// against the ideal continuous tone.
//
// Input: x[m] = round(1500 * sin(2*pi*1000*m/8000)), 160 samples, offered at
// a steady pace: with a 32 MHz clock, one input every 4 000 cycles and output
// n requested at cycle n * 32e6 / 44100 (rounded up), both counted from reset.
// Expected: output n sits on the input time axis at
// t_n = (n*step/2^32 - 2 - 9.5) / 32000 s (2 intermediate samples of Farrow
// delay, 9.5 of interpolation-filter delay), so out[n] should be close to
// G * 1500 * sin(2*pi*1000*t_n), G being the low-pass gain at 1 kHz. Once the
// filters have filled, every output must lie within TOL of that value. Also
// checked: exactly 441 outputs per 10 ms (882 in all) and that the
// converter never holds up the producer at these rates.
module tb_hybrid_src_sine;
  import src_pkg::*;

  localparam int    NIN    = 160;
  localparam int    NOUT   = 882;
  localparam real   AMP    = 1500.0;
  localparam real   GAIN   = 0.9962;   // |H(1 kHz)| of the interpolation low-pass / 4
  localparam real   TOL    = 10.0;     // LSB
  localparam real   PI     = 3.14159265358979;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0;
  step_t   phase_step = STEP_32K_TO_44K1;
  logic    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_clipped;
  sample_t in_data = '0, out_data;
  int      nout = 0, late = 0;
  real     maxerr = 0.0;

  hybrid_src dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NIN * 4000 + 20000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer: one sample every 4000 cycles
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NIN; m++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = sample_t'($rtoi(AMP * $sin(2.0 * PI * 1000.0 * m / 8000.0) + 0.5 + 4096.0) - 4096);
      @(posedge clk);
      while (!in_ready) begin late++; @(posedge clk); end
      @(negedge clk) in_valid = 1'b0;
      repeat (3998) @(posedge clk);
    end
  end

  // consumer: asks for output n at cycle n * 32e6 / 44100 after reset and
  // holds out_ready until it is served
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    wait (rst_n);
    for (int n = 0; n < NOUT; n++) begin
      while (real'(cyc) < real'(n) * 32.0e6 / 44100.0) @(negedge clk);
      out_ready = 1'b1;
      do @(posedge clk); while (!out_valid);
      @(negedge clk) out_ready = 1'b0;
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    real t, e, err;
    t   = (real'(nout) * real'(phase_step) / 4294967296.0 - 2.0 - 9.5) / 32000.0;
    e   = GAIN * AMP * $sin(2.0 * PI * 1000.0 * t);
    err = real'(out_data) - e;
    if (err < 0) err = -err;
    if (t > 0.003) begin
      checks++;
      if (err > maxerr) maxerr = err;
      if (err > TOL) begin
        failures++;
        $display("output %0d (t=%0.6f s): got %0d expected %0.1f", nout, t, out_data, e);
      end
    end
    nout++;
  end

  initial begin
    wait (rst_n);
    repeat (NIN * 4000 + 5000) @(posedge clk);
    checks++;
    if (nout != NOUT) begin failures++; $display("outputs %0d, expected %0d", nout, NOUT); end
    checks++;
    if (late != 0) begin failures++; $display("producer held up %0d cycles", late); end
    $display("outputs=%0d max_error=%0.2f LSB", nout, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
