// tb_farrow_resampler: checks the Farrow resampler against an absolute-time
// reference.
//
// Reference: output n lies at position P_n = sum of the steps used by the
// outputs before it (P_0 = 0), in units of 2^-32 input periods. With
// k = floor(P_n) it is formed from inputs x[k], x[k-1], x[k-2], x[k-3]
// (zero before the first input), v_j = sum_i b_j(i) x[k-i], and the
// polynomial in mu = top 16 bits of frac(P_n), evaluated with 64-bit integers,
// rounded half up and clamped to 12 bits.
//
// Phases: (1) 320 inputs at the 32 kHz -> 44.1 kHz step, no back-pressure:
// exactly 441 outputs must appear before the resampler waits for input 321
// (10 ms of signal at both rates); (2) random samples with full-scale steps
// and random back-pressure, cycling through the default step, step = 1,
// step = 1.5 (decimation) and a random step. Also checked: an output is
// offered the cycle after its last input is accepted, and the mechanisms
// (one input -> two outputs, several inputs per output, saturation,
// back-pressure) all occur.
module tb_farrow_resampler;
  import src_pkg::*;

  localparam int NIN = 3000;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0;
  step_t   step = STEP_32K_TO_44K1;
  logic    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_clipped;
  sample_t in_data = '0, out_data;

  farrow_resampler dut (.*);

  always #5 clk = ~clk;

  sample_t xin [NIN];
  longint  pos = 0;          // P_n of the next output
  int      nin = 0, nout = 0, allow_in = 320;
  int      dual = 0, multi = 0, clips = 0, stalls = 0;
  int      last_k = -1;
  logic    expect_valid = 1'b0;

  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  function automatic longint xat(longint i);
    return (i < 0) ? 0 : longint'(xin[int'(i)]);
  endfunction

  function automatic void ref_out(longint p, output sample_t y, output logic c);
    longint k, mu, t, r;
    longint vv [4];
    k  = p >>> 32;
    mu = (p & 64'hFFFF_FFFF) >> 16;
    for (int j = 0; j < 4; j++) begin
      vv[j] = 0;
      for (int i = 0; i < 4; i++) vv[j] += longint'(FAR_COEF[j][i]) * xat(k - longint'(i));
    end
    t = vv[3];
    for (int j = 2; j >= 0; j--) t = fdiv(t * mu, 65536) + vv[j];
    r = fdiv(t + 8192, 16384);
    c = (r > 2047) || (r < -2048);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    y = sample_t'(r);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NIN; i++)
      xin[i] = (i >= 400 && i < 700) ? (((i / 7) % 2) != 0 ? -12'sd2048 : 12'sd2047) : sample_t'($urandom);
  end

  // producer: offers inputs up to allow_in
  always @(negedge clk) begin
    if (rst_n && nin < allow_in && nin < NIN) begin
      in_valid <= (allow_in == 320) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_data  <= xin[nin];
    end else in_valid <= 1'b0;
    out_ready <= (allow_in == 320) ? 1'b1 : ($urandom_range(0, 2) != 0);
  end

  // step schedule for phase 2, applied between outputs
  always @(negedge clk) if (allow_in > 320) begin
    case ((nout / 200) % 4)
      0: step <= STEP_32K_TO_44K1;
      1: step <= 36'h1_0000_0000;                   // 1.0
      2: step <= 36'h1_8000_0000;                   // 1.5
      default: if (nout % 200 == 0) step <= {4'h0, 32'($urandom)} | 36'h0_1000_0000;
    endcase
  end

  always @(posedge clk) if (rst_n) begin
    if (expect_valid) begin
      checks++;
      if (!out_valid) begin failures++; $display("output %0d not offered after its last input", nout); end
    end
    expect_valid <= 1'b0;
    if (out_valid && !out_ready) stalls++;
    if (in_valid && in_ready) begin
      nin++;
      if (nin - 1 == int'(pos >>> 32)) expect_valid <= 1'b1;
    end
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
      if (k > last_k + 1 && last_k >= 0) multi++;
      if (c) clips++;
      last_k = k;
      pos += longint'(step);
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nin == 320);
    repeat (10) @(posedge clk);
    checks++;
    if (nout != 441) begin failures++; $display("10 ms block: %0d outputs, expected 441", nout); end
    else $display("320 inputs at 32 kHz gave %0d outputs at 44.1 kHz", nout);
    allow_in = NIN;
    wait (nin == NIN);
    repeat (10) @(posedge clk);
    checks++;
    if (dual == 0 || multi == 0 || clips == 0 || stalls == 0) begin
      failures++;
      $display("mechanism not exercised: dual=%0d multi=%0d clips=%0d stalls=%0d", dual, multi, clips, stalls);
    end
    $display("inputs=%0d outputs=%0d dual=%0d multi=%0d clips=%0d stalls=%0d", nin, nout, dual, multi, clips, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
