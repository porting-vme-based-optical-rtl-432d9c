// common_reg: common register area (PLC address 0x0080-0x00FF) and the
// descriptor-area lock registers.
//
// Groups the five common blocks of the logic: iorelay_reg (doorbells),
// int_cntlm (interrupts to PLC bus and ARM), swtichled_led (switches, LED
// register), watchdog_m (process watchdogs) and semaphore_reg (lock flags at
// the head of each descriptor area). Both local buses reach every register:
// a request is taken when its address decodes to the CRA or to a lock field,
// and read data follows one clock later. If both buses write the same
// ordinary register in one cycle the PLC value is kept; for write-1 registers
// (clear, set, kick) the two writes are OR-ed.
//
// Interrupt sources, bit positions (see opt_plc_pkg):
//   PLC target: [5:0] relay done, [10:6] channel finished, [11] watchdog
//   ARM target: [5:0] relay request, [10:6] channel finished, [11] watchdog,
//               [12] switch change
// Membership of the five blocks follows the block diagram; the register layout
// is this design's choice.
module common_reg
  import opt_plc_pkg::*;
#(
  parameter int unsigned WD_PRESCALE = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  lbus_req_t   p_req,         // plc-local (unqualified; decoded here)
  output data_t       p_rdata,
  input  lbus_req_t   a_req,         // arm-local
  output data_t       a_rdata,
  input  logic [7:0]  dip_sw,
  input  logic [3:0]  rotary_sw,
  input  logic [N_CH-1:0] ch_done,   // channel transfer finished (level)
  output logic        irq_plc,
  output logic        irq_arm,
  output logic [15:0] led_ctrl,
  output logic        wd_any,
  output logic [N_DA-1:0] locked
);
  // ---------- decode ----------
  logic p_cra, a_cra, p_sem, a_sem;
  logic [6:0] p_off, a_off;
  assign p_cra = p_req.req && decode(p_req.addr) == RG_CRA;
  assign a_cra = a_req.req && decode(a_req.addr) == RG_CRA;
  assign p_sem = p_req.req && decode(p_req.addr) == RG_SEM;
  assign a_sem = a_req.req && decode(a_req.addr) == RG_SEM;
  assign p_off = {p_req.addr[6:1], 1'b0};
  assign a_off = {a_req.addr[6:1], 1'b0};

  function automatic logic p_wr(logic [6:0] o);
    return p_cra && p_req.we && p_off == o;
  endfunction
  function automatic logic a_wr(logic [6:0] o);
    return a_cra && a_req.we && a_off == o;
  endfunction
  // ordinary register: write strobe and data, PLC first
  function automatic logic any_wr(logic [6:0] o);
    return p_wr(o) || a_wr(o);
  endfunction
  function automatic data_t wr_data(logic [6:0] o);
    return p_wr(o) ? p_req.wdata : a_req.wdata;
  endfunction
  // write-1 register: OR of both buses
  function automatic data_t w1(logic [6:0] o);
    return (p_wr(o) ? p_req.wdata : '0) | (a_wr(o) ? a_req.wdata : '0);
  endfunction

  // ---------- iorelay_reg ----------
  logic [N_DA-1:0] relay_req, relay_done;
  logic [N_DA-1:0] w1_req, w1_reqclr, w1_done, w1_doneclr;
  assign w1_req     = N_DA'(w1(CRA_RELAY_REQ));
  assign w1_reqclr  = N_DA'(w1(CRA_RELAY_REQ_CLR));
  assign w1_done    = N_DA'(w1(CRA_RELAY_DONE));
  assign w1_doneclr = N_DA'(w1(CRA_RELAY_DONE_CLR));

  iorelay_reg #(.N(N_DA)) u_iorelay (
    .clk, .rst_n,
    .req_set (w1_req),
    .req_clr (w1_reqclr),
    .done_set(w1_done),
    .done_clr(w1_doneclr),
    .req     (relay_req),
    .done    (relay_done)
  );

  // ---------- swtichled_led ----------
  logic [11:0] sw_stat;
  logic        sw_chg;
  logic        w1_swchg;
  assign w1_swchg = 1'(w1(CRA_SW_CHG));

  swtichled_led #(.DIP_W(8), .ROT_W(4)) u_swled (
    .clk, .rst_n,
    .dip_sw, .rotary_sw,
    .chg_clr  (w1_swchg),
    .led_we   (any_wr(CRA_LED_CTRL)),
    .led_wdata(wr_data(CRA_LED_CTRL)),
    .sw_stat, .sw_chg, .led_ctrl
  );

  // ---------- watchdog_m ----------
  logic [N_CH-1:0] wd_en, wd_exp;
  logic [15:0]     wd_period;
  logic [N_CH-1:0] w1_kick, w1_expclr, en_wd;
  assign w1_kick   = N_CH'(w1(CRA_WD_KICK));
  assign w1_expclr = N_CH'(w1(CRA_WD_EXPIRED));
  assign en_wd     = N_CH'(wr_data(CRA_WD_ENABLE));

  watchdog_m #(.N(N_CH), .PRESCALE(WD_PRESCALE)) u_wd (
    .clk, .rst_n,
    .en_we       (any_wr(CRA_WD_ENABLE)),
    .en_wdata    (en_wd),
    .kick        (w1_kick),
    .period_we   (any_wr(CRA_WD_PERIOD)),
    .period_wdata(wr_data(CRA_WD_PERIOD)),
    .exp_clr     (w1_expclr),
    .enable      (wd_en),
    .period      (wd_period),
    .expired     (wd_exp),
    .expired_any (wd_any)
  );

  // ---------- int_cntlm ----------
  logic [N_IRQ-1:0] i_src [2], i_clr [2], i_mwd [2], i_stat [2], i_mask [2];
  logic             i_mwe [2], i_irq [2];
  logic [N_IRQ-1:0] w1_sp, w1_sa, mw_p, mw_a;
  assign w1_sp = N_IRQ'(w1(CRA_INT_STAT_PLC));
  assign w1_sa = N_IRQ'(w1(CRA_INT_STAT_ARM));
  assign mw_p  = N_IRQ'(wr_data(CRA_INT_MASK_PLC));
  assign mw_a  = N_IRQ'(wr_data(CRA_INT_MASK_ARM));

  always_comb begin
    i_src[0] = {1'b0, wd_any, ch_done, relay_done};
    i_src[1] = {sw_chg, wd_any, ch_done, relay_req};
    i_clr[0] = w1_sp;
    i_clr[1] = w1_sa;
    i_mwe[0] = any_wr(CRA_INT_MASK_PLC);
    i_mwe[1] = any_wr(CRA_INT_MASK_ARM);
    i_mwd[0] = mw_p;
    i_mwd[1] = mw_a;
  end

  int_cntlm #(.N(N_IRQ)) u_int (
    .clk, .rst_n,
    .src(i_src), .stat_clr(i_clr), .mask_we(i_mwe), .mask_wdata(i_mwd),
    .stat(i_stat), .mask(i_mask), .irq(i_irq)
  );
  assign irq_plc = i_irq[0];
  assign irq_arm = i_irq[1];

  // ---------- semaphore_reg ----------
  lbus_req_t p_sem_req, a_sem_req;
  data_t     p_sem_rd, a_sem_rd;
  always_comb begin
    p_sem_req = p_req; p_sem_req.req = p_sem;
    a_sem_req = a_req; a_sem_req.req = a_sem;
  end

  semaphore_reg u_sem (
    .clk, .rst_n,
    .p_req(p_sem_req), .p_rdata(p_sem_rd),
    .a_req(a_sem_req), .a_rdata(a_sem_rd),
    .locked
  );

  // ---------- read back ----------
  function automatic data_t cra_read(logic [6:0] o);
    unique case (o)
      CRA_INT_STAT_PLC: return data_t'(i_stat[0]);
      CRA_INT_MASK_PLC: return data_t'(i_mask[0]);
      CRA_INT_STAT_ARM: return data_t'(i_stat[1]);
      CRA_INT_MASK_ARM: return data_t'(i_mask[1]);
      CRA_RELAY_REQ:    return data_t'(relay_req);
      CRA_RELAY_DONE:   return data_t'(relay_done);
      CRA_SW_STAT:      return data_t'(sw_stat);
      CRA_SW_CHG:       return data_t'(sw_chg);
      CRA_LED_CTRL:     return led_ctrl;
      CRA_WD_ENABLE:    return data_t'(wd_en);
      CRA_WD_EXPIRED:   return data_t'(wd_exp);
      CRA_WD_PERIOD:    return wd_period;
      default:          return '0;
    endcase
  endfunction

  data_t p_cra_rd, a_cra_rd;
  logic  p_sem_q, a_sem_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_cra_rd <= '0; a_cra_rd <= '0; p_sem_q <= 1'b0; a_sem_q <= 1'b0;
    end else begin
      if (p_cra) p_cra_rd <= cra_read(p_off);
      if (a_cra) a_cra_rd <= cra_read(a_off);
      if (p_req.req) p_sem_q <= p_sem;
      if (a_req.req) a_sem_q <= a_sem;
    end
  end
  assign p_rdata = p_sem_q ? p_sem_rd : p_cra_rd;
  assign a_rdata = a_sem_q ? a_sem_rd : a_cra_rd;

endmodule
