// opt_plc_top: programmable-logic part of the OPT-PLC optical-link master.
//
// Two CPUs reach the same register space: the PLC-side CPU through the
// vendor's Avalon interface (32 MHz) and plc_ifm onto the plc-local bus, and
// the ARM processor through its AXI-to-BRAM converter onto the arm-local bus.
// Both buses run at 100 MHz and reach, in parallel, every slave:
//   0x0000-0x007F module management information (outside, info_* ports)
//   0x0080-0x00FF common_reg (interrupts, doorbells, switches/LEDs, watchdogs)
//   0x0100-0x01EF opt_mainm CH1..CH5 I/O register areas
//   0x0300-0x11FF descriptor areas: lock fields in semaphore_reg (inside
//                 common_reg), the rest in dpram_desc
// Reserved addresses read 0. Every local-bus access completes with read data
// one clock after the request (arm_rdata likewise). Each channel's 80 MHz
// word-stream port goes to its OPT-Protocol controller, which is outside.
// IRQ outputs go to the PLC interface (irq_plc) and to the ARM (irq_arm).
//
// The info_* request ports carry the arm-local address, write flag and data
// straight from arm_req (only req is gated by the decode), so those bits are
// wired from inputs by design: the external block needs the full request.
//
// Block set, bus structure, clocks and address map follow the original design; the
// register layouts inside the areas are this design's (see opt_plc_pkg).
module opt_plc_top
  import opt_plc_pkg::*;
#(
  parameter int unsigned WD_PRESCALE = 100_000,    // 1 ms watchdog tick
  parameter int unsigned LED_STRETCH = 4_000_000   // 40 ms activity LED
) (
  // PLC-AVALON interface side (32 MHz)
  input  logic        clk_plc,
  input  logic        plc_rst_n,
  input  logic [ADDR_W-2:0] avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  data_t       avs_writedata,
  output data_t       avs_readdata,
  output logic        avs_waitrequest,
  output logic        irq_plc,
  // 100 MHz logic clock and arm-local bus
  input  logic        clk,
  input  logic        rst_n,
  input  lbus_req_t   arm_req,
  output data_t       arm_rdata,
  output logic        irq_arm,
  // module management information area (external)
  output lbus_req_t   info_p_req,
  input  data_t       info_p_rdata,
  output lbus_req_t   info_a_req,
  input  data_t       info_a_rdata,
  // front panel
  input  logic [7:0]  dip_sw,
  input  logic [3:0]  rotary_sw,
  output logic [7:0]  led,
  output logic [N_DA-1:0] da_locked,   // descriptor area n is held by a process
  // optical channels, 80 MHz, towards com_cnt
  input  logic        clk_opt,
  input  logic        opt_rst_n,
  output logic [N_CH-1:0] tx_valid,
  output data_t       tx_data [N_CH],
  output logic [N_CH-1:0] tx_last,
  input  logic [N_CH-1:0] tx_ready,
  input  logic [N_CH-1:0] rx_valid,
  input  data_t       rx_data [N_CH],
  input  logic [N_CH-1:0] rx_last,
  output logic [N_CH-1:0] rx_ready
);
  lbus_req_t plc_req;
  data_t     plc_rdata;

  plc_ifm u_plc_ifm (
    .aclk(clk_plc), .arst_n(plc_rst_n),
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_waitrequest,
    .clk, .rst_n,
    .m_req(plc_req), .m_rdata(plc_rdata)
  );

  // ---------- decode ----------
  region_e   p_rg, a_rg, p_rg_q, a_rg_q;
  logic [2:0] p_ch, a_ch, p_ch_q, a_ch_q;
  assign p_rg = decode(plc_req.addr);
  assign a_rg = decode(arm_req.addr);
  assign p_ch = iora_ch(plc_req.addr);
  assign a_ch = iora_ch(arm_req.addr);

  function automatic lbus_req_t qual(lbus_req_t r, logic hit);
    lbus_req_t q;
    q = r;
    q.req = r.req && hit;
    return q;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_rg_q <= RG_NONE; a_rg_q <= RG_NONE; p_ch_q <= '0; a_ch_q <= '0;
    end else begin
      if (plc_req.req) begin p_rg_q <= p_rg; p_ch_q <= p_ch; end
      if (arm_req.req) begin a_rg_q <= a_rg; a_ch_q <= a_ch; end
    end
  end

  assign info_p_req = qual(plc_req, p_rg == RG_INFO);
  assign info_a_req = qual(arm_req, a_rg == RG_INFO);

  // ---------- descriptor RAM ----------
  data_t dp_p_rd, dp_a_rd;
  dpram_desc u_dpram (
    .clk,
    .a_req(qual(plc_req, p_rg == RG_DPRAM)), .a_rdata(dp_p_rd),
    .b_req(qual(arm_req, a_rg == RG_DPRAM)), .b_rdata(dp_a_rd)
  );

  // ---------- common registers ----------
  data_t cr_p_rd, cr_a_rd;
  logic [N_CH-1:0] ch_done, ch_active;
  logic [15:0]     led_ctrl;
  logic            wd_any;


  common_reg #(.WD_PRESCALE(WD_PRESCALE)) u_common (
    .clk, .rst_n,
    .p_req(plc_req), .p_rdata(cr_p_rd),
    .a_req(arm_req), .a_rdata(cr_a_rd),
    .dip_sw, .rotary_sw,
    .ch_done,
    .irq_plc, .irq_arm,
    .led_ctrl, .wd_any, .locked(da_locked)
  );

  ledcntl_m #(.N_ACT(N_CH), .STRETCH(LED_STRETCH)) u_led (
    .clk, .rst_n, .led_ctrl, .ch_active, .wd_any, .irq_plc, .irq_arm, .led
  );

  // ---------- optical channels ----------
  data_t ch_p_rd [N_CH], ch_a_rd [N_CH];

  for (genvar n = 0; n < N_CH; n++) begin : g_ch
    opt_mainm u_main (
      .clk, .rst_n,
      .p_req  (qual(plc_req, p_rg == RG_IORA && p_ch == 3'(n))),
      .p_rdata(ch_p_rd[n]),
      .a_req  (qual(arm_req, a_rg == RG_IORA && a_ch == 3'(n))),
      .a_rdata(ch_a_rd[n]),
      .active (ch_active[n]),
      .done   (ch_done[n]),
      .oclk(clk_opt), .orst_n(opt_rst_n),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_last(tx_last[n]),
      .tx_ready(tx_ready[n]),
      .rx_valid(rx_valid[n]), .rx_data(rx_data[n]), .rx_last(rx_last[n]),
      .rx_ready(rx_ready[n])
    );
  end

  // ---------- read data return ----------
  always_comb begin
    unique case (p_rg_q)
      RG_INFO:        plc_rdata = info_p_rdata;
      RG_CRA, RG_SEM: plc_rdata = cr_p_rd;
      RG_IORA:        plc_rdata = ch_p_rd[p_ch_q];
      RG_DPRAM:       plc_rdata = dp_p_rd;
      default:        plc_rdata = '0;
    endcase
    unique case (a_rg_q)
      RG_INFO:        arm_rdata = info_a_rdata;
      RG_CRA, RG_SEM: arm_rdata = cr_a_rd;
      RG_IORA:        arm_rdata = ch_a_rd[a_ch_q];
      RG_DPRAM:       arm_rdata = dp_a_rd;
      default:        arm_rdata = '0;
    endcase
  end

endmodule
