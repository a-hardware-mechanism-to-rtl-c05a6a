// tb_wake_controller: random test of the per-register wake-up state.
// After reset only the reserved registers may be active. Each cycle random
// predecode and write-back wake requests are applied; in the next cycle the
// active set must be exactly reserved | predecode | write-back, so a
// register sleeps again right after the cycle it was requested for.
module tb_wake_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] pd_wake, wb_wake, wake_next, drowsy;
  localparam logic [31:0] RES = 32'hA000_0005;
  logic [31:0] exp_active;

  always #5 clk = ~clk;

  wake_controller dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pd_wake = '0; wb_wake = '0;
    @(posedge clk); #1;
    chk(drowsy == ~RES, "reset state: only reserved registers active");
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(drowsy == ~RES, "after reset release");
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] oh_a, oh_b, oh_c;
      @(negedge clk);
      oh_a = 32'd1 << $urandom_range(0, 31);
      oh_b = 32'd1 << $urandom_range(0, 31);
      oh_c = 32'd1 << $urandom_range(0, 31);
      pd_wake = ($urandom_range(0, 4) == 0) ? '0 : (oh_a | oh_b | oh_c);
      wb_wake = ($urandom_range(0, 1) == 0) ? '0 : (32'd1 << $urandom_range(0, 31));
      #1;
      exp_active = RES | pd_wake | wb_wake;
      chk(wake_next == exp_active, "wake_next");
      @(posedge clk); #1;
      chk(drowsy == ~exp_active, "active set one cycle later");
    end
    // with no requests everything but the reserved registers falls asleep
    @(negedge clk); pd_wake = '0; wb_wake = '0;
    @(posedge clk); #1;
    chk(drowsy == ~RES, "idle: back to reserved set only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
