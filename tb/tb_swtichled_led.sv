// tb_swtichled_led: switch values arrive after the two-flop synchroniser plus
// the status register (3 cycles), no change flag for the power-up value, a
// change sets the flag, write-1 clears it, LED register write/read.
module tb_swtichled_led;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] dip; logic [3:0] rot;
  logic chg_clr, led_we, sw_chg;
  logic [15:0] led_wdata, led_ctrl;
  logic [11:0] sw_stat;
  int checks = 0, failures = 0;

  swtichled_led dut (.clk, .rst_n, .dip_sw(dip), .rotary_sw(rot), .chg_clr, .led_we,
                     .led_wdata, .sw_stat, .sw_chg, .led_ctrl);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    dip = 8'h5A; rot = 4'h3; chg_clr = 0; led_we = 0; led_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (6) @(negedge clk);
    chk("power-up value", sw_stat, 12'h35A);
    chk("no change flag at power-up", sw_chg, 0);
    // a change: visible after exactly 3 rising edges
    dip = 8'hA5;
    @(negedge clk); chk("not yet (1)", sw_stat, 12'h35A);
    @(negedge clk); chk("not yet (2)", sw_stat, 12'h35A);
    @(negedge clk); chk("after 3 cycles", sw_stat, 12'h3A5);
    @(negedge clk); chk("change flag", sw_chg, 1);
    chg_clr = 1; @(negedge clk); chg_clr = 0;
    chk("flag cleared", sw_chg, 0);
    repeat (4) @(negedge clk);
    chk("flag stays clear", sw_chg, 0);
    rot = 4'hC;
    repeat (4) @(negedge clk);
    chk("rotary value", sw_stat, 12'hCA5);
    chk("rotary change flag", sw_chg, 1);
    // LED register
    led_we = 1; led_wdata = 16'h81C3; @(negedge clk); led_we = 0;
    chk("led_ctrl", led_ctrl, 16'h81C3);
    led_wdata = 16'hFFFF; @(negedge clk);
    chk("led_ctrl holds without write", led_ctrl, 16'h81C3);
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
