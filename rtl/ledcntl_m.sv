// ledcntl_m: front-panel LED driver.
//
// Eight LEDs. Each LED shows either its software bit (led_ctrl[i], written by
// the entire-system control process on the ARM) or a hardware status bit,
// chosen by led_ctrl[8+i]. Hardware status: LEDs 0..4 light for STRETCH clock
// cycles after any activity of optical channel CH1..CH5, so that single
// transfers are visible; LED 5 is "a watchdog has expired", LED 6 the PLC
// interrupt and LED 7 the ARM interrupt. Outputs are registered, active high.
//
// LED control by the ARM process and the paths from the channels and the
// watchdog to this block follow the original design; the LED count, assignment and
// stretch time are this design's choices.
module ledcntl_m #(
  parameter int unsigned N_ACT   = 5,
  parameter int unsigned STRETCH = 4_000_000    // 40 ms at 100 MHz
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      led_ctrl,
  input  logic [N_ACT-1:0] ch_active,
  input  logic             wd_any,
  input  logic             irq_plc,
  input  logic             irq_arm,
  output logic [7:0]       led
);
  localparam int unsigned CW = $clog2(STRETCH + 1);
  logic [CW-1:0]    hold [N_ACT];
  logic [7:0]       hw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ACT; i++) hold[i] <= '0;
      led <= '0;
    end else begin
      for (int i = 0; i < N_ACT; i++)
        if (ch_active[i])       hold[i] <= CW'(STRETCH);
        else if (hold[i] != '0) hold[i] <= hold[i] - CW'(1);
      for (int i = 0; i < 8; i++)
        led[i] <= led_ctrl[8+i] ? hw[i] : led_ctrl[i];
    end
  end

  always_comb begin
    hw = '0;
    for (int i = 0; i < N_ACT && i < 5; i++) hw[i] = (hold[i] != '0);
    hw[5] = wd_any;
    hw[6] = irq_plc;
    hw[7] = irq_arm;
  end
endmodule
