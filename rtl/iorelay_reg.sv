// iorelay_reg: request/done doorbells between the PLC-side CPU and the ARM.
//
// One request bit and one done bit per descriptor area (bit 0 = common DA,
// bits 1..5 = CH1..CH5). The Linux CPU on the PLC bus fills a descriptor area
// and sets its request bit; the request bit is an interrupt source towards the
// ARM, whose communication procedure process clears it, runs the procedure,
// and sets the done bit, which is an interrupt source towards the PLC bus.
// All four operations are write-1 vectors; a set and a clear of the same bit
// in one cycle leave it set. Registered, outputs valid the clock after the
// write.
//
// The block appears by name in the block diagram next to the interrupt
// controller; its doorbell function is this design's reading of that name.
module iorelay_reg #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_set,
  input  logic [N-1:0] req_clr,
  input  logic [N-1:0] done_set,
  input  logic [N-1:0] done_clr,
  output logic [N-1:0] req,
  output logic [N-1:0] done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req  <= '0;
      done <= '0;
    end else begin
      req  <= (req  & ~req_clr)  | req_set;
      done <= (done & ~done_clr) | done_set;
    end
  end
endmodule
