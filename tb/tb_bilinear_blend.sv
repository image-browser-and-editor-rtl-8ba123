// Testbench for bilinear_blend: random taps, valid bits and fractions,
// each result compared with an integer reference of the weighted sum and
// checked to lie within the range of the four (background-substituted)
// taps. Directed cases check that zero fractions pass tap 0 through, that
// a fraction of 128 in both directions gives the rounded mean, and that
// four equal taps give the same colour at any fractions.
module tb_bilinear_blend;
  import img_pkg::*;
  rgb_t [3:0] tap;
  logic [3:0] tap_valid;
  logic [7:0] fx, fy;
  rgb_t out;
  int checks = 0, failures = 0;
  int n_rand = 0, n_zero = 0, n_mean = 0, n_flat = 0;

  bilinear_blend dut (.*);

  initial begin
    #10000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] chan(input rgb_t c, input int k);
    return (k == 0) ? c.r : (k == 1) ? c.g : c.b;
  endfunction

  // reference for one channel
  function automatic int ref_chan(input int k);
    int w [4], acc;
    w[0] = (256 - int'(fx)) * (256 - int'(fy));
    w[1] = int'(fx) * (256 - int'(fy));
    w[2] = (256 - int'(fx)) * int'(fy);
    w[3] = int'(fx) * int'(fy);
    acc = 32768;
    for (int i = 0; i < 4; i++)
      acc += w[i] * int'(tap_valid[i] ? chan(tap[i], k) : chan(BACKGROUND, k));
    return acc >>> 16;
  endfunction

  task automatic compare(input string what);
    #1;
    for (int k = 0; k < 3; k++) begin
      int lo, hi, v;
      lo = 255; hi = 0;
      for (int i = 0; i < 4; i++) begin
        v = int'(tap_valid[i] ? chan(tap[i], k) : chan(BACKGROUND, k));
        if (v < lo) lo = v;
        if (v > hi) hi = v;
      end
      check(int'(chan(out, k)) == ref_chan(k),
            $sformatf("%s ch%0d fx %0d fy %0d valid %b got %0d exp %0d", what, k, fx, fy,
                      tap_valid, chan(out, k), ref_chan(k)));
      check(int'(chan(out, k)) >= lo && int'(chan(out, k)) <= hi, $sformatf("%s ch%0d in range", what, k));
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 4; i++) tap[i] = rgb_t'(24'($urandom));
      tap_valid = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hf;
      fx = 8'($urandom); fy = 8'($urandom);
      if ($urandom_range(0, 9) == 0) fx = 8'hff;
      if ($urandom_range(0, 9) == 0) fy = 8'hff;
      compare("random"); n_rand++;
    end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) tap[i] = rgb_t'(24'($urandom));
      tap_valid = 4'($urandom) | 4'b0001;
      fx = 0; fy = 0;
      #1; check(out == tap[0], "zero fractions give tap 0"); n_zero++;
    end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) tap[i] = rgb_t'(24'($urandom));
      tap_valid = 4'hf; fx = 8'd128; fy = 8'd128;
      #1;
      for (int k = 0; k < 3; k++) begin
        int sum;
        sum = 0;
        for (int i = 0; i < 4; i++) sum += int'(chan(tap[i], k));
        check(int'(chan(out, k)) == (sum + 2) / 4, "centre gives the mean");
      end
      n_mean++;
    end
    for (int n = 0; n < 500; n++) begin
      tap[0] = rgb_t'(24'($urandom));
      for (int i = 1; i < 4; i++) tap[i] = tap[0];
      tap_valid = 4'hf; fx = 8'($urandom); fy = 8'($urandom);
      #1; check(out == tap[0], "flat area stays flat"); n_flat++;
    end
    check(n_rand > 0 && n_zero > 0 && n_mean > 0 && n_flat > 0, "every case run");
    $display("random %0d zero %0d mean %0d flat %0d", n_rand, n_zero, n_mean, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
