// tb_altro_adc: self-checking test of the ADC behavioural model.
// A differential ramp and random levels between VREFM and VREFP are
// applied; each code must match the ideal transfer (x + 1) * 512 within two
// LSB, x = (vin - vinb) / (vrefp - vrefm), and must appear 5.5 cycles after
// the sampling edge: it is on d at the rising edge 6 cycles later but not
// at the one 5 cycles later.
module tb_altro_adc;
  logic sclk = 0;
  real vin = 1.0, vinb = 1.0, vcm = 1.0, vrefp = 1.0, vrefm = 0.0;
  logic [9:0] d;
  int checks = 0, failures = 0;
  int ideal [$];

  altro_adc dut (.sclk, .vin, .vinb, .vcm, .vrefp, .vrefm, .d);
  always #5 sclk = !sclk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal_code(real x);
    int c = int'($floor((x + 1.0) * 512.0));
    if (c > 1023) c = 1023;
    if (c < 0) c = 0;
    return c;
  endfunction

  initial begin
    real x;
    int e;
    // latency: a step from -0.9 to +0.9 sampled at one edge
    vin = 0.55; vinb = 1.45;
    repeat (10) @(posedge sclk);
    #1 vin = 1.45; vinb = 0.55;
    @(posedge sclk);            // sampled here
    #1 vin = 0.55; vinb = 1.45;
    repeat (5) @(posedge sclk);
    #0; checks++;
    if (d > 100) begin failures++; $display("code too early: %0d", d); end
    @(posedge sclk); #0;
    checks++;
    if (d < 900) begin failures++; $display("code not there after 5.5 cycles: %0d", d); end
    // transfer function
    for (int i = 0; i < 3000; i++) begin
      @(negedge sclk);
      x = (i < 2000) ? -1.0 + real'(i) / 1000.0 : real'($urandom_range(0, 20000)) / 10000.0 - 1.0;
      vin = 1.0 + x / 2.0; vinb = 1.0 - x / 2.0;
      ideal.push_back(ideal_code(x));
      @(posedge sclk); #1;
      if (ideal.size() > 6) begin
        e = ideal.pop_front();
        checks++;
        if (int'(d) - e > 2 || e - int'(d) > 2) begin
          failures++;
          if (failures < 10) $display("code %0d ideal %0d", d, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
