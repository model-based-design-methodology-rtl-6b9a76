// tb_farrow_subfilters: checks the transposed-form sub-filter bank.
//
// Random samples are loaded with random gaps between load strobes. The
// reference keeps the last four raw samples (direct form) and computes
// v[n] = sum_i b_n(i) * x[m-i]; after each load the registered outputs must
// match it on the next cycle and must not change while load is low.
module tb_farrow_subfilters;
  import src_pkg::*;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  sample_t in_data = '0;
  acc_t    v [FAR_ORDER+1];
  longint  hist [FAR_TAPS];

  farrow_subfilters dut (.clk, .rst_n, .load, .in_data, .v);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int n = 0; n <= FAR_ORDER; n++) begin
      longint e = 0;
      for (int i = 0; i < FAR_TAPS; i++) e += longint'(FAR_COEF[n][i]) * hist[i];
      checks++;
      if (longint'(v[n]) != e) begin
        failures++;
        $display("MISMATCH %s v[%0d]: got %0d expected %0d", what, n, v[n], e);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    compare("after reset");
    for (int s = 0; s < 2000; s++) begin
      sample_t x;
      x = (s % 97 == 5) ? 12'sd2047 : (s % 97 == 6) ? -12'sd2048 : sample_t'($urandom);
      @(negedge clk); load = 1'b1; in_data = x;
      @(negedge clk); load = 1'b0; in_data = sample_t'($urandom);
      for (int i = FAR_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(x);
      compare("after load");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      compare("idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
