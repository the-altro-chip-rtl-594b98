// tb_altro_dmem: self-checking test of the two-clock memory altro_dmem.
// Random words are written on the write clock to every address and read
// back on an unrelated read clock; each read must return the last word
// written there exactly one read-clock cycle after re, and hold while re is
// low. A second pass overwrites half of the addresses.
module tb_altro_dmem;
  logic wclk = 0, rclk = 0;
  logic we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [40-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [40-1:0] ref_mem [1024];

  altro_dmem dut (.wclk, .we, .waddr, .wdata, .rclk(rclk), .re, .raddr, .rdata);
  always #4 wclk = !wclk;
  always #7 rclk = !rclk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(int step);
    for (int a = 0; a < 1024; a += step) begin
      @(negedge wclk);
      we = 1; waddr = 10'(a); wdata = {$urandom, $urandom};
      ref_mem[a] = wdata;
    end
    @(negedge wclk); we = 0;
  endtask

  task automatic check_all();
    logic [40-1:0] held;
    for (int a = 0; a < 1024; a++) begin
      @(negedge rclk); re = 1; raddr = 10'(a);
      @(negedge rclk); re = 0; raddr = 10'(1023 - a);
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rdata, ref_mem[a]);
      end
      held = rdata;
      @(negedge rclk);
      checks++;
      if (rdata !== held) begin failures++; $display("output did not hold"); end
    end
  endtask

  initial begin
    fill(1);
    check_all();
    fill(2);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
