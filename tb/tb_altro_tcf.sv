// tb_altro_tcf: self-checking test of the tail cancellation filter.
// A reference model evaluates the three cascaded sections
// w = x + K*w[n-1], y = w - L*w[n-1] in 64-bit integers (coefficients as
// fractions of 2**16, 7 fractional bits after padding, saturation to 18
// bits, rounding back to 11 bits) and is compared sample by sample with the
// filter output one cycle later. Cases: identity (all coefficients 0), a
// single pole/zero pair cancelling an exponential tail exactly, and random
// coefficients with random input. The one-cycle latency is checked.
module tb_altro_tcf;
  import altro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [10:0] din = 0, dout;
  tcf_coef_t coef = '0;
  int checks = 0, failures = 0;

  altro_tcf dut (.clk, .rst_n, .din, .coef, .dout);
  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint st [3];
  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction
  function automatic longint fl(longint a, longint b);   // floor(a*b / 2**16)
    longint p = a * b;
    return p >>> 16;
  endfunction
  function automatic int model(int x);
    longint v, w, r;
    longint k[3], l[3];
    k = '{coef.k1, coef.k2, coef.k3};
    l = '{coef.l1, coef.l2, coef.l3};
    v = longint'(x) * 128;
    for (int i = 0; i < 3; i++) begin
      w = sat18(v + fl(k[i], st[i]));
      v = sat18(w - fl(l[i], st[i]));
      st[i] = w;
    end
    r = (v + 64) >>> 7;
    if (r > 1023) r = 1023;
    if (r < -1024) r = -1024;
    return int'(r);
  endfunction

  task automatic run(int n, int mode);
    int x, exp_y;
    real tail;
    for (int t = 0; t < n; t++) begin
      case (mode)
        0: x = $urandom_range(0, 2047) - 1024;
        1: begin  // exponential tail with ratio K1: y settles to impulse
             tail = 800.0;
             for (int j = 0; j < t; j++) tail = tail * (real'(coef.k1) / 65536.0);
             x = (t < 40) ? int'(tail) : 0;
           end
        default: x = $urandom_range(0, 400) - 200;
      endcase
      din = 11'(x);
      exp_y = model(x);
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != exp_y) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d x=%0d got %0d exp %0d", t, x, dout, exp_y);
      end
    end
  endtask

  initial begin
    st = '{0, 0, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // identity
    coef = '0;
    run(200, 0);
    // pole at K1 cancelled by zero at L1: output of a pure exponential
    // x[n] = A*K^n is its first sample only (within rounding)
    coef = '0; coef.k1 = 16'd0; coef.l1 = 16'd52428;  // L1 = 0.8
    st = '{0, 0, 0};
    rst_n = 0; #1 rst_n = 1;
    begin
      int seen_big = 0;
      real tail = 800.0;
      for (int t = 0; t < 30; t++) begin
        din = 11'(int'(tail));
        void'(model(int'(tail)));
        tail = tail * 0.8;
        @(posedge clk); #1;
        if (t > 0 && (dout > 2 || dout < -2)) seen_big++;
      end
      checks++;
      if (seen_big != 0) begin failures++; $display("tail not cancelled (%0d)", seen_big); end
    end
    // random coefficients
    for (int r = 0; r < 5; r++) begin
      coef.k1 = 16'($urandom); coef.k2 = 16'($urandom); coef.k3 = 16'($urandom);
      coef.l1 = 16'($urandom); coef.l2 = 16'($urandom); coef.l3 = 16'($urandom);
      run(300, r[0] ? 0 : 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
