// tb_polyphase_branch: checks all four polyphase branches E_0..E_3.
//
// Random 12-bit delay-line contents (plus full-scale corner cases) are applied
// to one instance per branch. The expected value is built from the prototype
// filter the long way: the branch must equal the prototype h applied to the
// zero-stuffed sequence, i.e. sum over all 20 taps i with i = k (mod 4) of
// h[i] * taps[(i-k)/4]. Purely combinational, so each vector is checked after
// a #1 settle.
module tb_polyphase_branch;
  import src_pkg::*;

  int checks = 0, failures = 0;
  sample_t taps [PP_TPP];
  acc_t    acc  [PP_L];

  for (genvar k = 0; k < PP_L; k++) begin : g_dut
    polyphase_branch #(.PHASE(k)) dut (.taps(taps), .acc(acc[k]));
  end

  function automatic longint expected(int k);
    longint s = 0;
    for (int i = 0; i < PP_TAPS; i++)
      if ((i % PP_L) == k) s += longint'(PP_COEF[i]) * longint'(taps[(i - k) / PP_L]);
    return s;
  endfunction

  task automatic check_all();
    #1;
    for (int k = 0; k < PP_L; k++) begin
      checks++;
      if (longint'(acc[k]) != expected(k)) begin
        failures++;
        $display("MISMATCH branch %0d: got %0d expected %0d", k, acc[k], expected(k));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // impulse in each tap position
    for (int n = 0; n < PP_TPP; n++) begin
      foreach (taps[j]) taps[j] = (j == n) ? 12'sd1 : 12'sd0;
      check_all();
    end
    // full-scale corners
    foreach (taps[j]) taps[j] = 12'sd2047;
    check_all();
    foreach (taps[j]) taps[j] = -12'sd2048;
    check_all();
    // random vectors
    repeat (500) begin
      foreach (taps[j]) taps[j] = sample_t'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
