// tb_semaphore_reg: lock take / test / release on all six descriptor areas
// from both buses, refusal while held, release rule, same-cycle contention
// (PLC applied first, so it wins), and the 'locked' outputs.
module tb_semaphore_reg;
  import opt_plc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lbus_req_t p, a;
  data_t pr, ar;
  logic [N_DA-1:0] locked;
  int checks = 0, failures = 0;

  semaphore_reg dut (.clk, .rst_n, .p_req(p), .p_rdata(pr), .a_req(a), .a_rdata(ar), .locked);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  function automatic addr_t da(int n, int off);
    return addr_t'(13'h0300 + n * 13'h0280 + off);
  endfunction

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

  task automatic take(bit arm, int n, data_t us, data_t pid);
    wr(arm, da(n, 4), us);
    wr(arm, da(n, 6), pid);
  endtask

  initial begin
    data_t d;
    p = '0; a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N_DA; n++) begin
      rd(0, da(n, 2), d); chk("free after reset", d, 0);
    end
    chk("none locked", locked, 0);
    // process 0x0101/pid 0x0011 takes DA n; second process is refused
    for (int n = 0; n < N_DA; n++) begin
      take(n % 2, n, data_t'(16'h0100 + n), data_t'(16'h0010 + n));
      rd(0, da(n, 0), d); chk("owner unit/slot", d, 16'h0100 + n);
      rd(1, da(n, 2), d); chk("owner pid", d, 16'h0010 + n);
      chk("locked bit", locked[n], 1);
      take(!(n % 2), n, 16'h0202, 16'h0077);
      rd(0, da(n, 2), d); chk("held lock not taken over", d, 16'h0010 + n);
      rd(1, da(n, 0), d); chk("owner unit/slot kept", d, 16'h0100 + n);
      rd(0, da(n, 4), d); chk("request record unit/slot", d, 16'h0202);
      rd(0, da(n, 6), d); chk("request record pid", d, 16'h0077);
    end
    chk("all locked", locked, 6'h3F);
    // non-zero write to owner pid is ignored
    wr(0, da(2, 2), 16'h5555);
    rd(0, da(2, 2), d); chk("no steal via owner field", d, 16'h0012);
    // release DA 2, then the waiting process can take it
    wr(1, da(2, 2), 16'h0000);
    rd(0, da(2, 2), d); chk("released", d, 0);
    rd(0, da(2, 0), d); chk("released unit/slot", d, 0);
    chk("locked after release", locked, 6'h3B);
    take(0, 2, 16'h0303, 16'h0099);
    rd(1, da(2, 2), d); chk("retaken", d, 16'h0099);
    // pid 0 never takes a lock
    wr(0, da(3, 2), 16'h0000);
    take(1, 3, 16'h0404, 16'h0000);
    rd(0, da(3, 2), d); chk("pid 0 does not lock", d, 0);
    // same-cycle contention on a free DA: PLC applied first and wins
    wr(0, da(3, 4), 16'h0A0A);
    wr(1, da(3, 4), 16'h0B0B);     // ARM's request record overwrites unit/slot
    @(negedge clk);
    p = '{1'b1, 1'b1, da(3, 6), 16'h00AA};
    a = '{1'b1, 1'b1, da(3, 6), 16'h00BB};
    @(negedge clk);
    p = '0; a = '0;
    rd(0, da(3, 2), d); chk("contention: PLC wins", d, 16'h00AA);
    // other DAs untouched
    rd(1, da(5, 2), d); chk("DA5 untouched", d, 16'h0015);
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
