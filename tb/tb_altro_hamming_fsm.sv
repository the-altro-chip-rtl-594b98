// tb_altro_hamming_fsm: self-checking test of the SEU-protected machine.
// It checks the coding states idle 000000, wait 000111, done 011001 and
// the transitions on cstb and ready; then injects every single bit flip
// in every state and checks that the machine stays in (or moves on from)
// the same logical state, back on a coding value one cycle later, with
// err_single raised; and injects double flips that reach invalid values
// and checks the abort to idle with err_double.
module tb_altro_hamming_fsm;
  logic clk = 0, rst_n = 0, cstb = 0, ready = 0;
  logic [5:0] seu_flip = 0, code;
  logic st_idle, st_wait, st_done, err_single, err_double;
  int checks = 0, failures = 0;

  altro_hamming_fsm dut (.clk, .rst_n, .cstb, .ready, .seu_flip, .st_idle, .st_wait,
                         .st_done, .err_single, .err_double, .code);
  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(logic [5:0] c, string what);
    checks++;
    if (code !== c) begin failures++; $display("%s: code %b exp %b", what, code, c); end
  endtask

  task automatic go_to(int s);   // 0 idle, 1 wait, 2 done
    cstb = 0; ready = 0;
    repeat (3) @(posedge clk);
    #1;
    if (s >= 1) begin cstb = 1; @(posedge clk); #1; end
    if (s >= 2) begin ready = 1; @(posedge clk); #1; ready = 0; end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_code(6'b000000, "reset");
    cstb = 1; @(posedge clk); #1; expect_code(6'b000111, "cstb");
    @(posedge clk); #1; expect_code(6'b000111, "wait holds");
    ready = 1; @(posedge clk); #1; ready = 0; expect_code(6'b011001, "ready");
    checks++; if (!st_done) begin failures++; $display("not done"); end
    cstb = 0; @(posedge clk); #1; expect_code(6'b000000, "release");
    // single flips
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < 6; b++) begin
        logic [5:0] home;
        go_to(s);
        home = code;
        seu_flip = 6'(1 << b);
        @(posedge clk); #1;
        seu_flip = 0;
        checks++;
        if (!err_single || err_double || code == home) begin
          failures++; $display("single flip %0d in state %0d not seen (%b)", b, s, code);
        end
        checks++;
        if ((s == 0 && !st_idle) || (s == 1 && !st_wait) || (s == 2 && !st_done)) begin
          failures++; $display("derived state of %0d gives other outputs", s);
        end
        @(posedge clk); #1;
        expect_code(home, "recovery");
      end
    // a flip together with a due transition: wait + ready -> done directly
    go_to(1);
    seu_flip = 6'b000001;
    @(posedge clk); #1; seu_flip = 0;
    ready = 1; @(posedge clk); #1; ready = 0;
    expect_code(6'b011001, "derived wait moves on to done");
    // double flips into invalid values: abort to idle
    go_to(2);
    seu_flip = 6'b101000;          // 011001 -> 110001
    @(posedge clk); #1; seu_flip = 0;
    checks++;
    if (!err_double) begin failures++; $display("double flip not flagged (%b)", code); end
    @(posedge clk); #1;
    expect_code(6'b000000, "abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
