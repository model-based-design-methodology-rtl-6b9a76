// tb_farrow_horner: checks the mu-polynomial evaluation.
//
// The reference expands the polynomial with 64-bit integers: starting from
// v[3] it repeatedly multiplies by mu, divides by 2^16 rounding towards minus
// infinity, and adds the next lower v; the final value is divided by 2^14
// with round-half-up and clamped to [-2048, 2047]. Corner cases: mu = 0 must
// give round(v[0]); constant-only inputs; values that overflow 12 bits must
// saturate and raise clipped. Then random v (in the range the sub-filters can
// produce) and random mu.
module tb_farrow_horner;
  import src_pkg::*;

  int checks = 0, failures = 0, clip_seen = 0;
  acc_t    v [FAR_ORDER+1];
  mu_t     mu;
  sample_t y;
  logic    clipped;

  farrow_horner dut (.v, .mu, .y, .clipped);

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  task automatic check();
    longint t, r;
    logic   c;
    #1;
    t = longint'(v[3]);
    for (int n = 2; n >= 0; n--) t = floor_div(t * longint'(mu), 65536) + longint'(v[n]);
    r = floor_div(t + 8192, 16384);
    c = 1'b0;
    if (r > 2047)  begin r = 2047;  c = 1'b1; end
    if (r < -2048) begin r = -2048; c = 1'b1; end
    checks++;
    if (longint'(y) != r || clipped != c) begin
      failures++;
      $display("MISMATCH v=%0d,%0d,%0d,%0d mu=%0d: got %0d/%0b expected %0d/%0b",
               v[0], v[1], v[2], v[3], mu, y, clipped, r, c);
    end
    if (c) clip_seen++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // mu = 0: output is v[0] rounded
    v = '{32'sd16384 * 100, 32'sd99999, -32'sd77777, 32'sd5555}; mu = '0; check();
    // linear term only, mu = 0.5: 200 * 0.5 = 100
    v = '{32'sd0, 32'sd16384 * 200, 32'sd0, 32'sd0}; mu = 16'h8000; check();
    // cubic only, mu = 0.5: 800 / 8 = 100
    v = '{32'sd0, 32'sd0, 32'sd0, 32'sd16384 * 800}; mu = 16'h8000; check();
    // positive and negative saturation
    v = '{32'sd16384 * 3000, 32'sd0, 32'sd0, 32'sd0}; mu = 16'h1234; check();
    v = '{-32'sd16384 * 3000, 32'sd0, 32'sd0, 32'sd0}; mu = 16'h1234; check();
    repeat (3000) begin
      foreach (v[n]) v[n] = acc_t'($signed($urandom) >>> 5);
      mu = mu_t'($urandom);
      check();
    end
    if (clip_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
