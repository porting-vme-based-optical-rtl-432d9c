// swtichled_led: front-panel switch inputs and software LED register.
//
// The DIP switch (8 bits) and rotary switch (4 bits) are asynchronous inputs,
// brought into the 100 MHz domain by two flip-flops each. After reset the
// first synchronised value is taken as reference; afterwards every change sets
// the change flag (an interrupt source), which software clears by writing 1.
// The LED control register holds the LED pattern written by software and the
// per-LED selection between software and hardware status (see ledcntl_m).
//
// The block name and its connection to the DIP and rotary switches come from
// the block diagram; widths and register layout are this design's choices.
module swtichled_led #(
  parameter int unsigned DIP_W = 8,
  parameter int unsigned ROT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIP_W-1:0] dip_sw,      // asynchronous
  input  logic [ROT_W-1:0] rotary_sw,   // asynchronous
  input  logic             chg_clr,     // write-1-to-clear of the change flag
  input  logic             led_we,
  input  logic [15:0]      led_wdata,
  output logic [DIP_W+ROT_W-1:0] sw_stat,  // {rotary, dip}, synchronised
  output logic             sw_chg,
  output logic [15:0]      led_ctrl
);
  localparam int unsigned W = DIP_W + ROT_W;
  logic [W-1:0] s1, s2;
  logic [1:0]   settle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; sw_stat <= '0;
      settle <= '0; sw_chg <= 1'b0; led_ctrl <= '0;
    end else begin
      s1 <= {rotary_sw, dip_sw};
      s2 <= s1;
      sw_stat <= s2;
      if (settle != 2'd3) settle <= settle + 2'd1;
      if (settle == 2'd3 && s2 != sw_stat) sw_chg <= 1'b1;
      else if (chg_clr)                    sw_chg <= 1'b0;
      if (led_we) led_ctrl <= led_wdata;
    end
  end
endmodule
