// tb_plc_ifm: Avalon reads and writes at 32 MHz turn into single plc-local
// requests at 100 MHz with the right byte address, data and direction; read
// data comes back in the cycle waitrequest drops; every access is issued
// exactly once; the round trip stays within the synchroniser bound.
module tb_plc_ifm;
  import opt_plc_pkg::*;
  logic aclk = 0, clk = 0, arst_n = 0, rst_n = 0;
  always #15.625 aclk = ~aclk;   // 32 MHz
  always #5 clk = ~clk;          // 100 MHz
  logic [11:0] address; logic rd_, wr_, wait_;
  data_t wdata, rdata, m_rdata;
  lbus_req_t m_req;
  data_t mem [4096];
  int n_req = 0;
  int checks = 0, failures = 0;

  plc_ifm dut (.aclk, .arst_n, .avs_address(address), .avs_read(rd_), .avs_write(wr_),
    .avs_writedata(wdata), .avs_readdata(rdata), .avs_waitrequest(wait_),
    .clk, .rst_n, .m_req, .m_rdata);

  // plc-local slave: memory with one cycle of read latency
  always @(posedge clk) begin
    if (m_req.req) begin
      n_req++;
      if (m_req.addr[0]) begin failures++; $display("FAIL odd byte address"); end
      if (m_req.we) mem[m_req.addr[12:1]] <= m_req.wdata;
      m_rdata <= mem[m_req.addr[12:1]];
    end
  end

  task automatic av(bit we, logic [11:0] ad, data_t d, output data_t r, output int cyc);
    @(negedge aclk);
    address = ad; wdata = d; rd_ = !we; wr_ = we;
    cyc = 1;
    @(posedge aclk);
    while (wait_) begin @(posedge aclk); cyc++; end
    r = rdata;
    @(negedge aclk);
    rd_ = 0; wr_ = 0;
  endtask

  initial begin
    data_t r, ref_m [4096]; int cyc, maxc;
    address = 0; rd_ = 0; wr_ = 0; wdata = 0; m_rdata = 0;
    for (int i = 0; i < 4096; i++) begin mem[i] = 0; ref_m[i] = 0; end
    repeat (3) @(negedge aclk);
    arst_n = 1; rst_n = 1;
    maxc = 0;
    for (int k = 0; k < 300; k++) begin
      logic [11:0] ad; data_t d; bit we;
      ad = 12'($urandom_range(0, 63));
      we = $urandom_range(1);
      d = data_t'($urandom);
      av(we, ad, d, r, cyc);
      if (cyc > maxc) maxc = cyc;
      if (we) ref_m[ad] = d;
      else begin
        checks++;
        if (r !== ref_m[ad]) begin failures++; $display("FAIL read %h got %h exp %h", ad, r, ref_m[ad]); end
      end
    end
    checks++;
    if (n_req != 300) begin failures++; $display("FAIL %0d local requests for 300 accesses", n_req); end
    checks++;
    if (maxc > 8) begin failures++; $display("FAIL access took %0d aclk cycles", maxc); end
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (mem[i] !== ref_m[i]) begin failures++; $display("FAIL mem[%0d]", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
