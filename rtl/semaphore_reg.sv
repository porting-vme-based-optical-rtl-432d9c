// semaphore_reg: exclusive-control (lock) registers of the descriptor areas.
//
// Several Linux CPU modules, and several processes on each, may use one
// descriptor area (DA). Each of the N_DA areas carries two lock-flag records in
// its first four halfwords:
//   +0x0000 owner {unit ID, slot ID}     +0x0002 owner process ID
//   +0x0004 request {unit ID, slot ID}   +0x0006 request process ID
// To take the lock a process writes its unit/slot to +0x0004 and then its
// (non-zero) process ID to +0x0006. If the area is free (owner process ID 0)
// that write copies the request record into the owner record in the same
// clock; the process then reads +0x0000/+0x0002 to see whether it now owns the
// area. Writing 0 to +0x0002 releases the lock; any other write there is
// ignored, so a held lock cannot be taken over.
//
// The record layout follows the descriptor map; the take/test/release rule
// above is this design's reading of "lock flag", which the original design names but
// does not spell out. Requests from the PLC port and the ARM port in the same
// cycle are applied PLC first, then ARM, so the test-and-set is atomic.
// Reads have one cycle of latency.
module semaphore_reg
  import opt_plc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lbus_req_t p_req,     // plc-local, qualified by decode (region RG_SEM)
  output data_t     p_rdata,
  input  lbus_req_t a_req,     // arm-local
  output data_t     a_rdata,
  output logic [N_DA-1:0] locked   // DA n is held
);

  typedef struct packed {
    data_t own_us;   // owner unit/slot
    data_t own_pid;
    data_t req_us;   // requester unit/slot
    data_t req_pid;
  } lock_t;

  lock_t lk_q [N_DA];
  lock_t lk_d [N_DA];

  function automatic lock_t apply(lock_t l_in, data_t wdata, logic [1:0] hw);
    lock_t l;
    l = l_in;
    unique case (hw)
      2'd0: ;                                         // owner record is read-only
      2'd1: if (wdata == '0) begin l.own_us = '0; l.own_pid = '0; end
      2'd2: l.req_us = wdata;
      2'd3: begin
        l.req_pid = wdata;
        if (l.own_pid == '0 && wdata != '0) begin
          l.own_us  = l.req_us;
          l.own_pid = wdata;
        end
      end
    endcase
    return l;
  endfunction

  function automatic data_t field(lock_t l, logic [1:0] hw);
    unique case (hw)
      2'd0: return l.own_us;
      2'd1: return l.own_pid;
      2'd2: return l.req_us;
      default: return l.req_pid;
    endcase
  endfunction

  logic [2:0] p_da, a_da;
  logic [1:0] p_hw, a_hw;
  assign p_da  = da_index(p_req.addr);
  assign a_da  = da_index(a_req.addr);
  assign p_hw  = 2'(da_offset(p_req.addr) >> 1);
  assign a_hw  = 2'(da_offset(a_req.addr) >> 1);

  always_comb begin
    for (int i = 0; i < N_DA; i++) lk_d[i] = lk_q[i];
    if (p_req.req && p_req.we) lk_d[p_da] = apply(lk_d[p_da], p_req.wdata, p_hw);
    if (a_req.req && a_req.we) lk_d[a_da] = apply(lk_d[a_da], a_req.wdata, a_hw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DA; i++) lk_q[i] <= '0;
      p_rdata <= '0;
      a_rdata <= '0;
    end else begin
      for (int i = 0; i < N_DA; i++) lk_q[i] <= lk_d[i];
      if (p_req.req) p_rdata <= field(lk_q[p_da], p_hw);
      if (a_req.req) a_rdata <= field(lk_q[a_da], a_hw);
    end
  end

  always_comb
    for (int i = 0; i < N_DA; i++) locked[i] = (lk_q[i].own_pid != '0);

endmodule
