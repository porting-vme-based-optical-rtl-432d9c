// tb_opt_plc_top: the whole OPT-PLC logic at its default parameters.
//
// Models around the design: a PLC-side CPU driving the Avalon port (32 MHz),
// a communication procedure process on the ARM driving the arm-local bus, one
// com_cnt_model slave per optical channel (80 MHz), constant module
// management information, and the front-panel switches.
//
// Scenario:
//  1. The PLC CPU reads the management information area and the switches.
//  2. Descriptor path, per channel CH1..CH5: the PLC CPU takes the DA lock,
//     is refused a second time under another process ID, writes a request
//     function code and send data into the DA, and rings the doorbell. The
//     ARM process sees irq_arm, reads the DA, runs the exchange through the
//     channel's I/O registers, writes the processing result and the receive
//     data into the DA and sets "done". The PLC CPU sees irq_plc, checks the
//     receive data (the slave model complements each word), releases the lock.
//  3. Direct path: the PLC CPU drives the CH3 I/O registers itself (as a
//     sequence CPU would), including a silent slave that times out.
//  4. All five channels run at once from the ARM.
//  5. Watchdog: an unkicked process watchdog expires after one 1 ms tick;
//     the LED shows it and the ARM interrupt fires.
//  6. A switch change raises the ARM interrupt.
// Each mechanism is counted and must happen at least once.
module tb_opt_plc_top;
  import opt_plc_pkg::*;
  logic clk_plc = 0, clk = 0, clk_opt = 0;
  logic plc_rst_n = 0, rst_n = 0, opt_rst_n = 0;
  always #15.625 clk_plc = ~clk_plc;
  always #5      clk     = ~clk;
  always #6.25   clk_opt = ~clk_opt;

  logic [11:0] avs_address; logic avs_read, avs_write, avs_waitrequest, irq_plc, irq_arm;
  data_t avs_writedata, avs_readdata, arm_rdata, info_p_rdata, info_a_rdata;
  lbus_req_t arm_req, info_p_req, info_a_req;
  logic [7:0] dip_sw, led; logic [3:0] rotary_sw; logic [5:0] da_locked;
  logic [N_CH-1:0] tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready;
  data_t tx_data [N_CH], rx_data [N_CH];
  int nf [N_CH], ns [N_CH];

  opt_plc_top dut (.*);

  for (genvar n = 0; n < N_CH; n++) begin : g_sl
    com_cnt_model #(.DELAY(60 + 10*n)) sl (.clk(clk_opt), .rst_n(opt_rst_n),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_last(tx_last[n]), .tx_ready(tx_ready[n]),
      .rx_valid(rx_valid[n]), .rx_data(rx_data[n]), .rx_last(rx_last[n]), .rx_ready(rx_ready[n]),
      .n_frames(nf[n]), .n_stalls(ns[n]));
  end

  // management information: read data = 0x4D00 | halfword index, one cycle latency
  always_ff @(posedge clk) begin
    if (info_p_req.req) info_p_rdata <= 16'h4D00 | data_t'(info_p_req.addr[6:1]);
    if (info_a_req.req) info_a_rdata <= 16'h4D00 | data_t'(info_a_req.addr[6:1]);
  end

  int checks = 0, failures = 0;
  int n_avalon = 0, n_arm = 0, n_lock_take = 0, n_lock_refused = 0, n_lock_release = 0;
  int n_doorbell = 0, n_irq_arm = 0, n_irq_plc = 0, n_ch_exchange = 0, n_direct = 0;
  int n_timeout = 0, n_concurrent = 0, n_wd = 0, n_sw = 0, n_led_act = 0, n_info = 0;
  int n_stall = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // ---------------- PLC-side CPU (Avalon master) ----------------
  task automatic plc_acc(bit we, addr_t ad, data_t d, output data_t r);
    @(negedge clk_plc);
    avs_address = ad[12:1]; avs_writedata = d; avs_read = !we; avs_write = we;
    @(posedge clk_plc);
    while (avs_waitrequest) @(posedge clk_plc);
    r = avs_readdata;
    @(negedge clk_plc);
    avs_read = 0; avs_write = 0;
    n_avalon++;
  endtask
  task automatic pw(addr_t ad, data_t d); data_t r; plc_acc(1, ad, d, r); endtask
  task automatic pr(addr_t ad, output data_t r); plc_acc(0, ad, '0, r); endtask

  // ---------------- ARM (arm-local bus master) ----------------
  semaphore arm_bus = new(1);
  task automatic arm_acc(bit we, addr_t ad, data_t d, output data_t r);
    arm_bus.get(1);
    @(negedge clk);
    arm_req = '{1'b1, we, ad, d};
    @(negedge clk);
    arm_req = '0;
    r = arm_rdata;
    n_arm++;
    arm_bus.put(1);
  endtask
  task automatic aw(addr_t ad, data_t d); data_t r; arm_acc(1, ad, d, r); endtask
  task automatic ar(addr_t ad, output data_t r); arm_acc(0, ad, '0, r); endtask

  function automatic addr_t da(int n, int off); return addr_t'(13'h0300 + n*13'h0280 + off); endfunction
  function automatic addr_t io(int ch, int off); return addr_t'(13'h0100 + ch*13'h0030 + off); endfunction
  function automatic addr_t cra(logic [6:0] o); return addr_t'(13'h0080 + o); endfunction

  // One exchange on channel ch through its I/O registers, from the ARM.
  task automatic arm_exchange(int ch, int len, data_t w [8], output data_t rx [8],
                              output int rlen, output bit tmo);
    data_t s;
    for (int i = 0; i < len; i++) aw(io(ch, IO_TX_DATA + 2*i), w[i]);
    aw(io(ch, IO_TX_LEN), data_t'(len));
    aw(io(ch, IO_CTRL), 16'h0001);
    do ar(io(ch, IO_STATUS), s); while (!s[1]);
    tmo = s[2];
    ar(io(ch, IO_RX_LEN), s); rlen = s;
    for (int i = 0; i < rlen; i++) ar(io(ch, IO_RX_DATA + 2*i), rx[i]);
    aw(io(ch, IO_STATUS), 16'h0006);
    n_ch_exchange++;
  endtask

  // Communication procedure process on the ARM: serves doorbells of DA 1..5.
  // Request function code 0x0010 = "write/read words": send data word 0 is
  // the count, the next words are sent to the slave.
  bit arm_stop = 0;
  initial begin : arm_process
    data_t st, code, cnt, w [8], rx [8];
    int rlen; bit tmo;
    arm_req = '0;
    wait (rst_n);
    aw(cra(CRA_INT_MASK_ARM), 16'h003E);       // doorbells only for now
    while (!arm_stop) begin
      @(negedge clk);
      if (!irq_arm) continue;
      n_irq_arm++;
      ar(cra(CRA_RELAY_REQ), st);
      for (int n = 1; n <= N_CH; n++) if (st[n]) begin
        aw(cra(CRA_RELAY_REQ_CLR), data_t'(1 << n));
        aw(cra(CRA_INT_STAT_ARM), data_t'(1 << n));
        ar(da(n, 16'h0008), code);
        aw(da(n, 16'h0010), 16'h0001);            // processing status: running
        ar(da(n, 16'h0020), cnt);
        for (int i = 0; i < cnt && i < 8; i++) ar(da(n, 16'h0022 + 2*i), w[i]);
        arm_exchange(n - 1, cnt, w, rx, rlen, tmo);
        aw(da(n, 16'h0012), (code == 16'h0010 && !tmo) ? 16'h0000 : 16'hFFFF);
        aw(da(n, 16'h0150), data_t'(rlen));
        for (int i = 0; i < rlen; i++) aw(da(n, 16'h0152 + 2*i), rx[i]);
        aw(da(n, 16'h0010), 16'h0000);            // processing status: idle
        aw(cra(CRA_RELAY_DONE), data_t'(1 << n));
      end
    end
  end

  always @(posedge clk) if (|(tx_valid & ~tx_ready)) n_stall++;
  int led_act_seen = 0;
  always @(posedge clk) if (led[4:0] != 0) led_act_seen = 1;

  initial begin : plc_cpu
    data_t r, w [8], rx [8];
    int rlen; bit tmo;
    avs_address = 0; avs_read = 0; avs_write = 0; avs_writedata = 0;
    dip_sw = 8'h3C; rotary_sw = 4'h5;
    repeat (4) @(negedge clk_plc);
    plc_rst_n = 1; rst_n = 1; opt_rst_n = 1;
    repeat (4) @(negedge clk_plc);

    // 1. management information and switches
    pr(13'h0006, r); chk("MMIA word 3", r, 16'h4D03); n_info++;
    pr(cra(CRA_SW_STAT), r); chk("switches", r, 16'h053C);
    pr(13'h0200, r); chk("reserved area reads 0", r, 0);
    pw(cra(CRA_INT_MASK_PLC), 16'h003E);
    pw(cra(CRA_LED_CTRL), 16'hFF00);              // all LEDs show hardware status

    // 2. descriptor path on every channel
    for (int n = 1; n <= N_CH; n++) begin
      int len;
      pw(da(n, 4), 16'h0102);                     // unit 1, slot 2
      pw(da(n, 6), 16'h0100 + data_t'(n));        // process ID
      pr(da(n, 2), r); chk("lock taken", r, 16'h0100 + n);
      if (r == 16'h0100 + n) n_lock_take++;
      pw(da(n, 4), 16'h0103);
      pw(da(n, 6), 16'h0200);
      pr(da(n, 2), r); chk("second process refused", r, 16'h0100 + n);
      if (r == 16'h0100 + n) n_lock_refused++;
      chk("da_locked", da_locked[n], 1);
      len = 2 + n;
      pw(da(n, 8), 16'h0010);                     // request function code
      pw(da(n, 16'h20), data_t'(len));
      for (int i = 0; i < len; i++) begin
        w[i] = data_t'(16'h1100 * n + i);
        pw(da(n, 16'h22 + 2*i), w[i]);
      end
      pw(cra(CRA_RELAY_REQ), data_t'(1 << n));
      n_doorbell++;
      while (!irq_plc) @(negedge clk_plc);
      n_irq_plc++;
      pr(cra(CRA_RELAY_DONE), r); chk("done bit", r, 1 << n);
      pw(cra(CRA_RELAY_DONE_CLR), data_t'(1 << n));
      pw(cra(CRA_INT_STAT_PLC), data_t'(1 << n));
      pr(da(n, 16'h12), r); chk("processing result", r, 0);
      pr(da(n, 16'h150), r); chk("receive count", r, len);
      for (int i = 0; i < len; i++) begin
        pr(da(n, 16'h152 + 2*i), r); chk("receive data", r, int'(data_t'(~w[i])));
      end
      pw(da(n, 2), 16'h0000);                     // release
      pr(da(n, 2), r); chk("released", r, 0);
      if (r == 0) n_lock_release++;
    end
    checks++; if (!led_act_seen) begin failures++; $display("FAIL no activity LED"); end
    else n_led_act++;

    // 3. direct path: PLC drives the CH3 I/O registers itself
    pw(io(2, IO_TX_DATA), 16'h0A0A);
    pw(io(2, IO_TX_DATA + 2), 16'h5050);
    pw(io(2, IO_TX_LEN), 16'd2);
    pw(io(2, IO_CTRL), 16'h0001);
    do pr(io(2, IO_STATUS), r); while (!r[1]);
    chk("direct: status", r, 16'h0002);
    pr(io(2, IO_RX_DATA), r);     chk("direct: rx0", r, 16'hF5F5);
    pr(io(2, IO_RX_DATA + 2), r); chk("direct: rx1", r, 16'hAFAF);
    n_direct++;
    // silent slave, 1 x 256 cycle time-out
    pw(io(2, IO_TIMEOUT), 16'd1);
    pw(io(2, IO_TX_DATA), 16'hDEAD);
    pw(io(2, IO_TX_LEN), 16'd1);
    pw(io(2, IO_CTRL), 16'h0001);
    do pr(io(2, IO_STATUS), r); while (!r[1]);
    chk("direct: time-out", r, 16'h0006);
    if (r == 16'h0006) n_timeout++;
    pw(io(2, IO_STATUS), 16'h0006);

    // 4. all channels at once from the ARM side
    arm_stop = 1;
    repeat (20) @(negedge clk);
    begin
      data_t ww [N_CH][8], rr [N_CH][8];
      int rl [N_CH]; bit tm [N_CH];
      for (int c = 0; c < N_CH; c++) for (int i = 0; i < 8; i++) ww[c][i] = data_t'($urandom);
      for (int c = 0; c < N_CH; c++) begin
        for (int i = 0; i < 8; i++) aw(io(c, IO_TX_DATA + 2*i), ww[c][i]);
        aw(io(c, IO_TX_LEN), 16'd8);
      end
      for (int c = 0; c < N_CH; c++) aw(io(c, IO_CTRL), 16'h0001);
      repeat (3) @(negedge clk);
      chk("all channels busy", dut.ch_active, 5'b11111);
      if (dut.ch_active == 5'b11111) n_concurrent++;
      for (int c = 0; c < N_CH; c++) begin
        do ar(io(c, IO_STATUS), r); while (!r[1]);
        chk("concurrent: no time-out", r, 16'h0002);
        for (int i = 0; i < 8; i++) begin
          ar(io(c, IO_RX_DATA + 2*i), r); chk("concurrent data", r, int'(data_t'(~ww[c][i])));
        end
      end
    end

    // 5. watchdog of process 0: period 1 tick (1 ms), not kicked
    aw(cra(CRA_INT_MASK_ARM), 16'h1800);
    aw(cra(CRA_INT_STAT_ARM), 16'hFFFF);
    aw(cra(CRA_WD_PERIOD), 16'd1);
    aw(cra(CRA_WD_ENABLE), 16'h0001);
    repeat (100_050) @(negedge clk);
    chk("watchdog expired", dut.wd_any, 1);
    chk("watchdog LED", led[5], 1);
    chk("ARM irq on watchdog", irq_arm, 1);
    if (led[5] && irq_arm) n_wd++;
    aw(cra(CRA_WD_ENABLE), 16'h0000);
    aw(cra(CRA_WD_EXPIRED), 16'h0001);
    aw(cra(CRA_INT_STAT_ARM), 16'hFFFF);
    repeat (3) @(negedge clk);
    chk("ARM irq cleared", irq_arm, 0);

    // 6. switch change
    rotary_sw = 4'hA;
    repeat (8) @(negedge clk);
    chk("ARM irq on switch", irq_arm, 1);
    pr(cra(CRA_SW_STAT), r); chk("new switch value", r, 16'h0A3C);
    if (r == 16'h0A3C) n_sw++;

    // every mechanism must have happened
    begin
      int cnt [string];
      int stalls;
      stalls = 0;
      for (int c = 0; c < N_CH; c++) stalls += ns[c];
      cnt["avalon access"] = n_avalon;  cnt["arm-local access"] = n_arm;
      cnt["MMIA read"] = n_info;        cnt["lock taken"] = n_lock_take;
      cnt["lock refused"] = n_lock_refused; cnt["lock released"] = n_lock_release;
      cnt["doorbell"] = n_doorbell;     cnt["irq_arm serviced"] = n_irq_arm;
      cnt["irq_plc serviced"] = n_irq_plc; cnt["channel exchange via DA"] = n_ch_exchange;
      cnt["direct I/O register exchange"] = n_direct; cnt["reply time-out"] = n_timeout;
      cnt["five channels concurrent"] = n_concurrent; cnt["watchdog expiry"] = n_wd;
      cnt["switch change"] = n_sw;      cnt["activity LED"] = n_led_act;
      cnt["tx back-pressure"] = stalls;
      foreach (cnt[k]) begin
        $display("  %-30s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
