// tb_ledcntl_m: software bits, hardware selection, activity stretch length
// (STRETCH = 20) and the watchdog/IRQ status LEDs.
module tb_ledcntl_m;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] led_ctrl;
  logic [4:0]  act;
  logic wd, ip, ia;
  logic [7:0]  led;
  int checks = 0, failures = 0;

  ledcntl_m #(.N_ACT(5), .STRETCH(20)) dut (.clk, .rst_n, .led_ctrl, .ch_active(act),
      .wd_any(wd), .irq_plc(ip), .irq_arm(ia), .led);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    int on;
    led_ctrl = 0; act = 0; wd = 0; ip = 0; ia = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    led_ctrl = 16'h00A5; @(negedge clk);
    chk("software pattern", led, 8'hA5);
    led_ctrl = 16'hFF00; @(negedge clk); @(negedge clk);
    chk("hardware idle", led, 8'h00);
    wd = 1; ip = 1; @(negedge clk); @(negedge clk);
    chk("wd and irq_plc", led, 8'h60);
    wd = 0; ip = 0; ia = 1; @(negedge clk); @(negedge clk);
    chk("irq_arm", led, 8'h80);
    ia = 0;
    // one-cycle activity pulse on channel 2 lights LED 2 for ~STRETCH cycles
    act = 5'b00100; @(negedge clk); act = 0;
    on = 0;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      if (led[2]) on++;
    end
    checks++;
    if (on < 19 || on > 21) begin failures++; $display("FAIL stretch %0d cycles", on); end
    chk("other LEDs dark", led[1:0], 0);
    // mixed selection: LED 2 hardware, others software
    led_ctrl = 16'h04FB; act = 5'b00100; @(negedge clk); act = 0; @(negedge clk);
    chk("mixed", led, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
