// watchdog_m: watchdog timers of the communication procedure processes.
//
// One timer per channel process (N). A shared prescaler divides the 100 MHz
// clock into ticks of PRESCALE cycles (1 ms by default). A timer whose enable
// bit is set counts ticks; writing 1 to its kick bit restarts it from zero.
// When it reaches the period register (in ticks, at least 1) its expired flag
// is set and it restarts, so an unserviced process is reported once per
// period. Expired flags are cleared by writing 1; a new expiry wins over a
// clear in the same cycle. 'expired_any' is an interrupt source and an LED
// source.
//
// That the PL part holds watchdog timers for the communication procedure
// processes, kicked and checked by the entire-system control process, is from
// the original design; tick length, register layout and restart rule are this design's.
module watchdog_m #(
  parameter int unsigned N        = 5,
  parameter int unsigned PRESCALE = 100_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_we,
  input  logic [N-1:0] en_wdata,
  input  logic [N-1:0] kick,          // write-1 pulses
  input  logic         period_we,
  input  logic [15:0]  period_wdata,
  input  logic [N-1:0] exp_clr,       // write-1-to-clear
  output logic [N-1:0] enable,
  output logic [15:0]  period,
  output logic [N-1:0] expired,
  output logic         expired_any
);
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  logic [PW-1:0] pre;
  logic          tick;
  logic [15:0]   cnt [N];

  assign tick = (pre == PW'(PRESCALE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre     <= '0;
      enable  <= '0;
      period  <= 16'd1000;
      expired <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      pre <= tick ? '0 : pre + PW'(1);
      if (en_we)     enable <= en_wdata;
      if (period_we) period <= (period_wdata == '0) ? 16'd1 : period_wdata;
      for (int i = 0; i < N; i++) begin
        if (!enable[i] || kick[i]) begin
          cnt[i] <= '0;
          if (exp_clr[i]) expired[i] <= 1'b0;
        end else if (tick && (cnt[i] + 16'd1 >= period)) begin
          cnt[i]     <= '0;
          expired[i] <= 1'b1;
        end else begin
          if (tick) cnt[i] <= cnt[i] + 16'd1;
          if (exp_clr[i]) expired[i] <= 1'b0;
        end
      end
    end
  end

  assign expired_any = |expired;
endmodule
