// tb_int_cntlm: edge capture, masking, write-1-to-clear, set-wins-over-clear
// and one-cycle IRQ latency for both targets, against a reference model.
module tb_int_cntlm;
  localparam int N = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] src [2], clr [2], mwd [2], stat [2], mask [2];
  logic mwe [2], irq [2];
  logic [N-1:0] m_src_q [2], m_stat [2], m_mask [2];
  logic m_irq [2];
  int checks = 0, failures = 0;

  int_cntlm #(.N(N)) dut (.clk, .rst_n, .src, .stat_clr(clr), .mask_we(mwe),
                          .mask_wdata(mwd), .stat, .mask, .irq);

  initial begin
    for (int t = 0; t < 2; t++) begin
      src[t] = 0; clr[t] = 0; mwd[t] = 0; mwe[t] = 0;
      m_src_q[t] = 0; m_stat[t] = 0; m_mask[t] = 0; m_irq[t] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      for (int t = 0; t < 2; t++) begin
        if ($urandom_range(3) == 0) src[t] = src[t] ^ (N'(1) << $urandom_range(N-1));
        clr[t] = ($urandom_range(4) == 0) ? N'($urandom) : '0;
        mwe[t] = ($urandom_range(20) == 0);
        mwd[t] = N'($urandom);
        // reference: next state
        m_irq[t]   = |(m_stat[t] & m_mask[t]);
        m_stat[t]  = (m_stat[t] & ~clr[t]) | (src[t] & ~m_src_q[t]);
        m_src_q[t] = src[t];
        if (mwe[t]) m_mask[t] = mwd[t];
      end
      @(negedge clk);
      for (int t = 0; t < 2; t++) begin
        checks++;
        if (stat[t] != m_stat[t] || mask[t] != m_mask[t] || irq[t] != m_irq[t]) begin
          failures++;
          $display("FAIL k=%0d t=%0d stat %h/%h mask %h/%h irq %b/%b", k, t,
                   stat[t], m_stat[t], mask[t], m_mask[t], irq[t], m_irq[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
