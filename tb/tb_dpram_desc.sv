// tb_dpram_desc: checks the descriptor RAM against a reference array.
// Random writes on both ports, read-back on the opposite port, address
// mapping of the first and last word of each descriptor area, and the
// same-word collision rule (PLC port wins).
module tb_dpram_desc;
  import opt_plc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  lbus_req_t a, b;
  data_t ra, rb;
  int checks = 0, failures = 0;
  data_t ref_mem [DPRAM_WORDS];

  dpram_desc dut (.clk, .a_req(a), .a_rdata(ra), .b_req(b), .b_rdata(rb));

  task automatic chk(string what, data_t got, data_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic acc(bit port, bit we, addr_t ad, data_t wd, output data_t rd);
    lbus_req_t r;
    r = '{req:1'b1, we:we, addr:ad, wdata:wd};
    @(negedge clk);
    if (port) begin b = r; a = '0; end else begin a = r; b = '0; end
    @(negedge clk);
    a = '0; b = '0;
    rd = port ? rb : ra;
  endtask

  initial begin
    data_t d;
    addr_t ad;
    a = '0; b = '0;
    for (int i = 0; i < DPRAM_WORDS; i++) ref_mem[i] = '0;
    // clear the RAM through port A
    for (int i = 0; i < DPRAM_WORDS; i++) acc(0, 1, addr_t'(DA_BASE + 2*i), '0, d);
    // area boundaries: 0x0300, 0x057E, 0x0580, ... 0x11FE
    for (int n = 0; n < 6; n++) begin
      ad = addr_t'(13'h0300 + n*13'h0280);
      acc(0, 1, ad, data_t'(16'hA000 + n), d);
      ref_mem[(ad - 13'h0300) / 2] = data_t'(16'hA000 + n);
      ad = addr_t'(13'h0300 + (n+1)*13'h0280 - 2);
      acc(1, 1, ad, data_t'(16'hB000 + n), d);
      ref_mem[(ad - 13'h0300) / 2] = data_t'(16'hB000 + n);
    end
    for (int n = 0; n < 6; n++) begin
      ad = addr_t'(13'h0300 + n*13'h0280);
      acc(1, 0, ad, '0, d); chk("area start via B", d, data_t'(16'hA000 + n));
      ad = addr_t'(13'h0300 + (n+1)*13'h0280 - 2);
      acc(0, 0, ad, '0, d); chk("area end via A", d, data_t'(16'hB000 + n));
    end
    // random traffic on both ports; then both ports must read what the model holds
    for (int k = 0; k < 600; k++) begin
      int idx; bit p; data_t w;
      idx = $urandom_range(DPRAM_WORDS-1);
      p = 1'($urandom);
      w = data_t'($urandom);
      acc(p, 1, addr_t'(DA_BASE + 2*idx), w, d);
      ref_mem[idx] = w;
    end
    for (int i = 0; i < DPRAM_WORDS; i++) begin
      data_t da, db;
      acc(0, 0, addr_t'(DA_BASE + 2*i), '0, da);
      acc(1, 0, addr_t'(DA_BASE + 2*i), '0, db);
      chk("port A vs model", da, ref_mem[i]);
      chk("port B vs model", db, ref_mem[i]);
    end
    // deterministic write/readback
    for (int i = 0; i < DPRAM_WORDS; i += 37) begin
      acc(i[0], 1, addr_t'(DA_BASE + 2*i), data_t'(i * 3 + 1), d);
      acc(!i[0], 0, addr_t'(DA_BASE + 2*i), '0, d);
      chk("cross-port readback", d, data_t'(i * 3 + 1));
    end
    // simultaneous write to the same word: port A wins
    @(negedge clk);
    a = '{req:1'b1, we:1'b1, addr:13'h0802, wdata:16'h1111};
    b = '{req:1'b1, we:1'b1, addr:13'h0802, wdata:16'h2222};
    @(negedge clk);
    a = '0; b = '0;
    acc(1, 0, 13'h0802, '0, d); chk("collision: PLC wins", d, 16'h1111);
    // simultaneous writes to different words both land
    @(negedge clk);
    a = '{req:1'b1, we:1'b1, addr:13'h0900, wdata:16'h3333};
    b = '{req:1'b1, we:1'b1, addr:13'h0904, wdata:16'h4444};
    @(negedge clk);
    a = '0; b = '0;
    acc(0, 0, 13'h0900, '0, d); chk("dual write A", d, 16'h3333);
    acc(0, 0, 13'h0904, '0, d); chk("dual write B", d, 16'h4444);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
