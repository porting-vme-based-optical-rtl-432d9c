// tb_opt_plc_workloads: the full-size top against the OPT-VME figures.
//  * Descriptor payload: every one of the six descriptor areas carries a full
//    304-byte send-data block written from the PLC side and a full 304-byte
//    receive-data block written from the ARM side; both are read back across.
//  * Response time: channel 1 has a slave answering after 50 us (direct
//    connection), channel 2 one answering after 260 us (worst case through a
//    relay board). With the reset time-out (409.6 us) neither times out and
//    the measured exchange time brackets the slave delay.
//  * A slave slower than the time-out (channel 3, 450 us) is reported as a
//    time-out after 409.6 us.
module tb_opt_plc_workloads;
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

  // slave delays in 80 MHz cycles: 50 us, 260 us, 450 us, then short ones
  localparam int D0 = 4000, D1 = 20800, D2 = 36000;
  for (genvar n = 0; n < N_CH; n++) begin : g_sl
    com_cnt_model #(.DELAY(n == 0 ? D0 : n == 1 ? D1 : n == 2 ? D2 : 20), .STALL(0)) sl (
      .clk(clk_opt), .rst_n(opt_rst_n),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_last(tx_last[n]), .tx_ready(tx_ready[n]),
      .rx_valid(rx_valid[n]), .rx_data(rx_data[n]), .rx_last(rx_last[n]), .rx_ready(rx_ready[n]),
      .n_frames(nf[n]), .n_stalls(ns[n]));
  end
  assign info_p_rdata = '0;
  assign info_a_rdata = '0;

  int checks = 0, failures = 0;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic plc_acc(bit we, addr_t ad, data_t d, output data_t r);
    @(negedge clk_plc);
    avs_address = ad[12:1]; avs_writedata = d; avs_read = !we; avs_write = we;
    @(posedge clk_plc);
    while (avs_waitrequest) @(posedge clk_plc);
    r = avs_readdata;
    @(negedge clk_plc);
    avs_read = 0; avs_write = 0;
  endtask
  task automatic arm_acc(bit we, addr_t ad, data_t d, output data_t r);
    @(negedge clk);
    arm_req = '{1'b1, we, ad, d};
    @(negedge clk);
    arm_req = '0;
    r = arm_rdata;
  endtask
  function automatic addr_t da(int n, int off); return addr_t'(13'h0300 + n*13'h0280 + off); endfunction
  function automatic addr_t io(int ch, int off); return addr_t'(13'h0100 + ch*13'h0030 + off); endfunction
  function automatic data_t pat(int n, int i, int salt); return data_t'(n * 16'h1357 + i * 16'h0101 + salt); endfunction

  initial begin
    data_t r;
    real t0, us;
    avs_address = 0; avs_read = 0; avs_write = 0; avs_writedata = 0; arm_req = '0;
    dip_sw = 0; rotary_sw = 0;
    repeat (4) @(negedge clk_plc);
    plc_rst_n = 1; rst_n = 1; opt_rst_n = 1;
    repeat (4) @(negedge clk_plc);

    // ---- 304-byte send and receive blocks in all six descriptor areas ----
    for (int n = 0; n < N_DA; n++)
      for (int i = 0; i < 152; i++) plc_acc(1, da(n, 16'h0020 + 2*i), pat(n, i, 1), r);
    for (int n = 0; n < N_DA; n++)
      for (int i = 0; i < 152; i++) arm_acc(1, da(n, 16'h0150 + 2*i), pat(n, i, 7), r);
    for (int n = 0; n < N_DA; n++) begin
      int bad;
      bad = 0;
      for (int i = 0; i < 152; i++) begin
        arm_acc(0, da(n, 16'h0020 + 2*i), '0, r); if (r != pat(n, i, 1)) bad++;
        plc_acc(0, da(n, 16'h0150 + 2*i), '0, r); if (r != pat(n, i, 7)) bad++;
      end
      chk($sformatf("DA %0d: 304-byte blocks intact", n), bad, 0);
    end

    // ---- response times against the reset time-out ----
    for (int c = 0; c < 3; c++) begin
      arm_acc(0, io(c, IO_TIMEOUT), '0, r); chk("reset time-out", r, 128);
      arm_acc(1, io(c, IO_TX_DATA), data_t'(16'h0100 + c), r);
      arm_acc(1, io(c, IO_TX_LEN), 16'd1, r);
    end
    t0 = $realtime;
    for (int c = 0; c < 3; c++) arm_acc(1, io(c, IO_CTRL), 16'h0001, r);
    begin
      real te [3]; bit got [3];
      got = '{0, 0, 0};
      while (!(got[0] && got[1] && got[2])) begin
        @(negedge clk);
        if (!got[0] && dut.ch_done[0]) begin got[0] = 1; te[0] = $realtime; end
        if (!got[1] && dut.ch_done[1]) begin got[1] = 1; te[1] = $realtime; end
        if (!got[2] && dut.ch_done[2]) begin got[2] = 1; te[2] = $realtime; end
      end
      for (int c = 0; c < 3; c++) begin
        us = (te[c] - t0) / 1000.0;
        arm_acc(0, io(c, IO_STATUS), '0, r);
        $display("  channel %0d: exchange finished after %0.1f us, status %h", c + 1, us, r);
        if (c < 2) begin
          chk("no time-out", r, 16'h0002);
          checks++;
          if (us < (c == 0 ? 50.0 : 260.0) || us > (c == 0 ? 52.0 : 262.0)) begin
            failures++; $display("FAIL channel %0d response %0.1f us", c + 1, us);
          end
          arm_acc(0, io(c, IO_RX_DATA), '0, r); chk("reply word", r, int'(data_t'(~(16'h0100 + c))));
        end else begin
          chk("slow slave: time-out", r, 16'h0006);
          checks++;
          if (us < 409.6 || us > 411.0) begin failures++; $display("FAIL time-out at %0.1f us", us); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
