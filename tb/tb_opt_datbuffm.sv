// tb_opt_datbuffm: commands cross from the 100 MHz side to the 80 MHz side
// and replies come back intact; d_start is a single pulse per command; busy
// spans start..done; a start while busy is ignored; latency stays within the
// synchroniser bound.
module tb_opt_datbuffm;
  import opt_plc_pkg::*;
  logic clk = 0, oclk = 0, rst_n = 0, orst_n = 0;
  always #5 clk = ~clk;
  always #6.25 oclk = ~oclk;
  logic s_start, s_busy, s_done, d_start, d_rv;
  cmd_t s_cmd, d_cmd; reply_t s_reply, d_reply;
  int n_dstart = 0;
  int checks = 0, failures = 0;

  opt_datbuffm dut (.clk, .rst_n, .s_start, .s_cmd, .s_busy, .s_done, .s_reply,
                    .oclk, .orst_n, .d_start, .d_cmd, .d_reply_valid(d_rv), .d_reply);

  always @(posedge oclk) if (d_start) n_dstart++;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // 80 MHz responder: on d_start, answer after 5 cycles with a reply derived
  // from the command
  initial begin
    d_rv = 0; d_reply = '0;
    forever begin
      @(negedge oclk);
      if (d_start) begin
        repeat (5) @(negedge oclk);
        d_reply = '0;
        d_reply.timeout = d_cmd.tmo[0];
        d_reply.frm.len = d_cmd.frm.len;
        for (int i = 0; i < MAX_WORDS; i++) d_reply.frm.data[i] = d_cmd.frm.data[i] + 16'd1;
        d_rv = 1;
        @(negedge oclk);
        d_rv = 0;
      end
    end
  end

  initial begin
    cmd_t c; int t0, lat;
    s_start = 0; s_cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1; orst_n = 1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      c = '0;
      c.tmo = 16'($urandom);
      c.frm.len = 4'($urandom_range(0, 8));
      for (int i = 0; i < MAX_WORDS; i++) c.frm.data[i] = data_t'($urandom);
      @(negedge clk);
      s_cmd = c; s_start = 1;
      @(negedge clk);
      s_start = 0;
      s_cmd = ~c;                      // the crossing must use the stored copy
      chk("busy after start", s_busy, 1);
      // a second start while busy is ignored
      s_start = 1; @(negedge clk); s_start = 0;
      t0 = $time;
      while (!s_done) @(negedge clk);
      lat = ($time - t0) / 10;
      chk("reply timeout bit", s_reply.timeout, c.tmo[0]);
      chk("reply len", s_reply.frm.len, c.frm.len);
      for (int i = 0; i < MAX_WORDS; i++) chk("reply word", s_reply.frm.data[i], c.frm.data[i] + 16'd1);
      @(negedge clk);
      chk("not busy after done", s_busy, 0);
      checks++;
      if (lat > 20) begin failures++; $display("FAIL round trip %0d cycles", lat); end
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    chk("one d_start per accepted command", n_dstart, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
