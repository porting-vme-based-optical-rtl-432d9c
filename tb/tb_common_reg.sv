// tb_common_reg: the common register area as software sees it. Doorbell
// request -> ARM interrupt, done -> PLC interrupt, channel-finished and
// watchdog events on both targets, switch change on the ARM target, masks,
// write-1-to-clear, LED register, watchdog registers, and the lock fields of
// a descriptor area routed to semaphore_reg.
module tb_common_reg;
  import opt_plc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lbus_req_t p, a;
  data_t pr, ar;
  logic [7:0] dip; logic [3:0] rot;
  logic [4:0] ch_done;
  logic irq_plc, irq_arm, wd_any;
  logic [15:0] led_ctrl;
  logic [5:0] locked;
  int checks = 0, failures = 0;

  common_reg #(.WD_PRESCALE(10)) dut (.clk, .rst_n, .p_req(p), .p_rdata(pr), .a_req(a),
    .a_rdata(ar), .dip_sw(dip), .rotary_sw(rot), .ch_done, .irq_plc, .irq_arm, .led_ctrl,
    .wd_any, .locked);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(bit arm, addr_t ad, data_t d);
    @(negedge clk);
    if (arm) a = '{1'b1, 1'b1, ad, d}; else p = '{1'b1, 1'b1, ad, d};
    @(negedge clk);
    a = '0; p = '0;
  endtask
  task automatic rd(bit arm, addr_t ad, output data_t d);
    @(negedge clk);
    if (arm) a = '{1'b1, 1'b0, ad, '0}; else p = '{1'b1, 1'b0, ad, '0};
    @(negedge clk);
    a = '0; p = '0;
    d = arm ? ar : pr;
  endtask
  function automatic addr_t cra(logic [6:0] o); return addr_t'(13'h0080 + o); endfunction

  initial begin
    data_t d;
    p = '0; a = '0; dip = 8'h11; rot = 4'h2; ch_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    rd(0, cra(CRA_SW_STAT), d); chk("switches", d, 16'h0211);
    // enable all interrupts
    wr(0, cra(CRA_INT_MASK_PLC), 16'h1FFF);
    wr(1, cra(CRA_INT_MASK_ARM), 16'h1FFF);
    rd(1, cra(CRA_INT_MASK_PLC), d); chk("mask plc", d, 16'h1FFF);
    chk("no irq yet", {irq_plc, irq_arm}, 0);
    // PLC rings the doorbell of CH2's DA (bit 2)
    wr(0, cra(CRA_RELAY_REQ), 16'h0004);
    repeat (2) @(negedge clk);
    chk("irq_arm from request", irq_arm, 1);
    chk("irq_plc quiet", irq_plc, 0);
    rd(1, cra(CRA_INT_STAT_ARM), d); chk("arm status bit 2", d, 16'h0004);
    rd(1, cra(CRA_RELAY_REQ), d); chk("request pending", d, 16'h0004);
    // ARM takes it, clears request and its status, reports done
    wr(1, cra(CRA_RELAY_REQ_CLR), 16'h0004);
    wr(1, cra(CRA_INT_STAT_ARM), 16'h0004);
    wr(1, cra(CRA_RELAY_DONE), 16'h0004);
    repeat (2) @(negedge clk);
    chk("irq_arm cleared", irq_arm, 0);
    chk("irq_plc from done", irq_plc, 1);
    rd(0, cra(CRA_INT_STAT_PLC), d); chk("plc status bit 2", d, 16'h0004);
    wr(0, cra(CRA_RELAY_DONE_CLR), 16'h0004);
    wr(0, cra(CRA_INT_STAT_PLC), 16'h0004);
    repeat (2) @(negedge clk);
    chk("irq_plc cleared", irq_plc, 0);
    // channel 4 finished -> bit 6+3 on both targets
    ch_done = 5'b01000; repeat (3) @(negedge clk);
    rd(0, cra(CRA_INT_STAT_PLC), d); chk("plc ch bit", d, 16'h0200);
    rd(1, cra(CRA_INT_STAT_ARM), d); chk("arm ch bit", d, 16'h0200);
    ch_done = 0;
    // masked source does not raise the line
    wr(0, cra(CRA_INT_STAT_PLC), 16'hFFFF);
    wr(1, cra(CRA_INT_STAT_ARM), 16'hFFFF);
    wr(0, cra(CRA_INT_MASK_PLC), 16'h0000);
    ch_done = 5'b00001; repeat (3) @(negedge clk); ch_done = 0;
    chk("masked: no irq_plc", irq_plc, 0);
    chk("unmasked arm: irq_arm", irq_arm, 1);
    wr(1, cra(CRA_INT_STAT_ARM), 16'hFFFF);
    // switch change -> ARM bit 12
    rot = 4'h7; repeat (5) @(negedge clk);
    rd(1, cra(CRA_SW_CHG), d); chk("switch change flag", d, 1);
    rd(1, cra(CRA_INT_STAT_ARM), d); chk("arm switch bit", d, 16'h1000);
    wr(1, cra(CRA_SW_CHG), 16'h0001);
    rd(1, cra(CRA_SW_CHG), d); chk("switch flag cleared", d, 0);
    wr(1, cra(CRA_INT_STAT_ARM), 16'hFFFF);
    // LED register
    wr(1, cra(CRA_LED_CTRL), 16'h1F3C);
    chk("led_ctrl", led_ctrl, 16'h1F3C);
    rd(0, cra(CRA_LED_CTRL), d); chk("led_ctrl readback", d, 16'h1F3C);
    // watchdog 3: period 2 ticks of 10 cycles
    wr(1, cra(CRA_WD_PERIOD), 16'd2);
    wr(1, cra(CRA_WD_ENABLE), 16'h0008);
    repeat (30) @(negedge clk);
    rd(0, cra(CRA_WD_EXPIRED), d); chk("watchdog 3 expired", d, 16'h0008);
    chk("wd_any", wd_any, 1);
    rd(1, cra(CRA_INT_STAT_ARM), d); chk("arm wd bit", d, 16'h0800);
    wr(1, cra(CRA_WD_ENABLE), 16'h0000);
    wr(1, cra(CRA_WD_EXPIRED), 16'h0008);
    rd(1, cra(CRA_WD_EXPIRED), d); chk("watchdog cleared", d, 0);
    // both buses write-1 in the same cycle: OR-ed
    @(negedge clk);
    p = '{1'b1, 1'b1, cra(CRA_RELAY_REQ), 16'h0001};
    a = '{1'b1, 1'b1, cra(CRA_RELAY_REQ), 16'h0020};
    @(negedge clk); p = '0; a = '0;
    rd(0, cra(CRA_RELAY_REQ), d); chk("write-1 OR", d, 16'h0021);
    // lock fields of DA 4 (0x0D00) go to semaphore_reg
    wr(0, 13'h0D04, 16'h0102);
    wr(0, 13'h0D06, 16'h0042);
    rd(1, 13'h0D02, d); chk("lock owner pid", d, 16'h0042);
    rd(1, 13'h0D00, d); chk("lock owner unit/slot", d, 16'h0102);
    chk("locked[4]", locked, 6'h10);
    rd(0, cra(7'h7E), d); chk("reserved reads 0", d, 0);
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
