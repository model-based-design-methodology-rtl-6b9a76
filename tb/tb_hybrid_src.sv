// tb_hybrid_src: end-to-end test of the hybrid converter at its defaults.
//
// Reference chain, written independently of the RTL structure:
//   mid[j] = clamp12(round(sum_i h[i] * u[j-i] / 2^14)), u = input with three
//            zeros inserted after each sample (direct-form interpolation);
//   out[n] = cubic Farrow on mid at absolute position P_n = sum of the steps
//            of the previous outputs (see tb_farrow_resampler).
// Phases: (1) 80 input samples (10 ms at 8 kHz) at the 8 kHz -> 44.1 kHz step
// with a free-running consumer: exactly 441 outputs must appear before the
// converter asks for sample 81; (2) random samples with full-scale square
// bursts, random input gaps and random back-pressure, first at 44.1 kHz, then
// switched to 8 kHz -> 48 kHz (step 2/3), then to a decimating step of 1.25.
// Every output is compared. Mechanisms counted (each must occur): input
// stall, output stall, one intermediate sample giving two outputs,
// intermediate samples skipped (decimating step), saturation in the
// interpolator, saturation at the output, and a change of ratio.
module tb_hybrid_src;
  import src_pkg::*;

  localparam int NIN = 1200;
  localparam step_t STEP_48K = 36'd2863311531;   // ceil(2^32 * 32000 / 48000)

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0;
  step_t   phase_step = STEP_32K_TO_44K1;
  logic    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_clipped;
  sample_t in_data = '0, out_data;

  hybrid_src dut (.*);

  always #5 clk = ~clk;

  sample_t xin [NIN];
  sample_t mid [PP_L*NIN];
  int      mid_clips = 0;
  longint  pos = 0;
  int      nin = 0, nout = 0, allow_in = 80;
  int      in_stall = 0, out_stall = 0, dual = 0, skip = 0, out_clips = 0, switches = 0;
  int      last_k = -1;
  step_t   last_step = STEP_32K_TO_44K1;

  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  function automatic longint clamp12(longint r, output logic c);
    c = (r > 2047) || (r < -2048);
    return (r > 2047) ? 2047 : (r < -2048) ? -2048 : r;
  endfunction

  function automatic longint midat(longint j);
    return (j < 0) ? 0 : longint'(mid[int'(j)]);
  endfunction

  task automatic build_mid();
    for (int j = 0; j < PP_L*NIN; j++) begin
      longint s = 0; logic c;
      for (int i = 0; i < PP_TAPS; i++)
        if (j - i >= 0 && (j - i) % PP_L == 0) s += longint'(PP_COEF[i]) * longint'(xin[(j - i) / PP_L]);
      mid[j] = sample_t'(clamp12(fdiv(s + 8192, 16384), c));
      if (c) mid_clips++;
    end
  endtask

  function automatic void ref_out(longint p, output sample_t y, output logic c);
    longint k, mu, t;
    longint vv [4];
    k  = p >>> 32;
    mu = (p & 64'hFFFF_FFFF) >> 16;
    for (int j = 0; j < 4; j++) begin
      vv[j] = 0;
      for (int i = 0; i < 4; i++) vv[j] += longint'(FAR_COEF[j][i]) * midat(k - longint'(i));
    end
    t = vv[3];
    for (int j = 2; j >= 0; j--) t = fdiv(t * mu, 65536) + vv[j];
    y = sample_t'(clamp12(fdiv(t + 8192, 16384), c));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NIN; i++)
      xin[i] = (i >= 200 && i < 320) ? (((i / 6) % 2) != 0 ? -12'sd2048 : 12'sd2047)
                                     : sample_t'($signed($urandom) >>> 21);
    build_mid();
  end

  always @(negedge clk) begin
    if (rst_n && nin < allow_in) begin
      in_data <= xin[nin];   // nin is the index of the next sample to hand over
      if (!in_valid) in_valid <= (allow_in == 80) ? 1'b1 : ($urandom_range(0, 2) != 0);
    end else in_valid <= 1'b0;
    out_ready <= (allow_in == 80) ? 1'b1 : ($urandom_range(0, 3) != 0);
    if (allow_in > 80)
      phase_step <= (nout < 2000) ? STEP_32K_TO_44K1 : (nout < 4000) ? STEP_48K : 36'h1_4000_0000;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) in_stall++;
    if (out_valid && !out_ready) out_stall++;
    if (in_valid && in_ready) nin++;
    if (out_valid && out_ready) begin
      sample_t e; logic c; int k;
      ref_out(pos, e, c);
      checks++;
      if (out_data !== e || out_clipped !== c) begin
        failures++;
        $display("MISMATCH output %0d: got %0d/%0b expected %0d/%0b", nout, out_data, out_clipped, e, c);
      end
      k = int'(pos >>> 32);
      if (k == last_k) dual++;
      if (k > last_k + 1 && last_k >= 0) skip++;
      if (c) out_clips++;
      if (phase_step != last_step) switches++;
      last_step = phase_step;
      last_k = k;
      pos += longint'(phase_step);
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nin == 80);
    repeat (40) @(posedge clk);
    checks++;
    if (nout != 441) begin failures++; $display("10 ms block: %0d outputs, expected 441", nout); end
    else $display("80 inputs at 8 kHz gave %0d outputs at 44.1 kHz", nout);
    allow_in = NIN;
    wait (nin == NIN);
    repeat (40) @(posedge clk);
    checks++;
    if (in_stall == 0 || out_stall == 0 || dual == 0 || skip == 0 || mid_clips == 0
        || out_clips == 0 || switches < 2) begin
      failures++;
      $display("mechanism never exercised");
    end
    $display("inputs=%0d outputs=%0d in_stall=%0d out_stall=%0d dual=%0d skip=%0d mid_clips=%0d out_clips=%0d switches=%0d",
             nin, nout, in_stall, out_stall, dual, skip, mid_clips, out_clips, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
