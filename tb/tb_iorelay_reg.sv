// tb_iorelay_reg: random set/clear vectors against a reference model, and the
// set-over-clear rule.
module tb_iorelay_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] rs, rc, ds, dc, req, done;
  logic [5:0] mreq, mdone;
  int checks = 0, failures = 0;

  iorelay_reg #(.N(6)) dut (.clk, .rst_n, .req_set(rs), .req_clr(rc), .done_set(ds),
                            .done_clr(dc), .req, .done);

  initial begin
    rs = 0; rc = 0; ds = 0; dc = 0; mreq = 0; mdone = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (req != 0 || done != 0) failures++;
    for (int k = 0; k < 500; k++) begin
      rs = 6'($urandom); rc = 6'($urandom); ds = 6'($urandom); dc = 6'($urandom);
      if (k % 3 == 0) begin rs = 0; ds = 0; end
      mreq  = (mreq & ~rc) | rs;
      mdone = (mdone & ~dc) | ds;
      @(negedge clk);
      checks++;
      if (req != mreq || done != mdone) begin
        failures++; $display("FAIL k=%0d req %b/%b done %b/%b", k, req, mreq, done, mdone);
      end
    end
    rs = 6'b000001; rc = 6'b000001; ds = 0; dc = 0;
    @(negedge clk);
    checks++; if (!req[0]) begin failures++; $display("FAIL set must win over clear"); end
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
