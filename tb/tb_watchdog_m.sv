// tb_watchdog_m: with PRESCALE 10 and period 5 ticks an enabled, unkicked
// timer expires after 50 cycles; kicking keeps it alive; a disabled timer
// never expires; write-1 clears flags; expired_any follows.
module tb_watchdog_m;
  localparam int PS = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en_we, period_we, any;
  logic [4:0] en_wdata, kick, exp_clr, enable, expired;
  logic [15:0] period_wdata, period;
  int checks = 0, failures = 0;

  watchdog_m #(.N(5), .PRESCALE(PS)) dut (.clk, .rst_n, .en_we, .en_wdata, .kick,
      .period_we, .period_wdata, .exp_clr, .enable, .period, .expired, .expired_any(any));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    int t0, t1;
    en_we = 0; period_we = 0; en_wdata = 0; kick = 0; exp_clr = 0; period_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset period", period, 1000);
    period_we = 1; period_wdata = 5; @(negedge clk); period_we = 0;
    chk("period", period, 5);
    // enable timers 0 and 1 only
    en_we = 1; en_wdata = 5'b00011; @(negedge clk); en_we = 0;
    t0 = $time;
    // keep kicking timer 1 every 20 cycles
    fork
      begin
        for (int k = 0; k < 12; k++) begin
          repeat (19) @(negedge clk);
          kick = 5'b00010; @(negedge clk); kick = 0;
        end
      end
      begin
        wait (expired[0]);
        t1 = $time;
      end
    join
    // timer 0 restarts at 0 when enabled and sees 5 ticks of 10 cycles
    checks++;
    if ((t1 - t0) / 10 < 41 || (t1 - t0) / 10 > 51) begin
      failures++; $display("FAIL expiry after %0d cycles, expected 41..51", (t1 - t0) / 10);
    end
    chk("timer 1 kept alive", expired[1], 0);
    chk("disabled timers idle", expired[4:2], 0);
    chk("expired_any", any, 1);
    // clear and disable timer 0
    en_we = 1; en_wdata = 5'b00010; exp_clr = 5'b00001; @(negedge clk);
    en_we = 0; exp_clr = 0;
    chk("flag cleared", expired[0], 0);
    repeat (120) @(negedge clk);
    chk("timer 0 disabled stays clear", expired[0], 0);
    chk("timer 1 unkicked expires", expired[1], 1);
    exp_clr = 5'b11111; @(negedge clk); exp_clr = 0;
    chk("all clear", any, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
