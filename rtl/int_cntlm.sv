// int_cntlm: interrupt controller of the OPT-PLC logic.
//
// Two interrupt targets share one controller: target 0 is the IRQ line to the
// PLC bus (through the PLC-AVALON interface), target 1 the IRQ line to the ARM
// processor. For each target an event source that rises sets its status bit;
// a status bit stays set until software writes 1 to it (write-1-to-clear), and
// a set that coincides with a clear wins. The IRQ output of a target is the OR
// of its status bits that are enabled in its mask register. Outputs are
// registered, one clock after the source edge.
//
// The two IRQ destinations follow the block diagram; the status/mask register
// pair, the edge capture and the source assignment are this design's choices.
module int_cntlm #(
  parameter int unsigned N = 13            // sources per target
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] src      [2],        // level sources, target 0 = PLC, 1 = ARM
  input  logic [N-1:0] stat_clr [2],        // write-1-to-clear pulses
  input  logic         mask_we  [2],
  input  logic [N-1:0] mask_wdata [2],
  output logic [N-1:0] stat     [2],
  output logic [N-1:0] mask     [2],
  output logic         irq      [2]
);
  logic [N-1:0] src_q [2];

  for (genvar t = 0; t < 2; t++) begin : g_tgt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        src_q[t] <= '0;
        stat[t]  <= '0;
        mask[t]  <= '0;
        irq[t]   <= 1'b0;
      end else begin
        src_q[t] <= src[t];
        stat[t]  <= (stat[t] & ~stat_clr[t]) | (src[t] & ~src_q[t]);
        if (mask_we[t]) mask[t] <= mask_wdata[t];
        irq[t]   <= |(stat[t] & mask[t]);
      end
    end
  end

endmodule
