// dpram_desc: descriptor RAM shared by the PLC side and the ARM side.
//
// Holds the six descriptor areas (common + CH1..CH5, 0x280 bytes each) at PLC
// byte addresses 0x0300-0x11FF as DEPTH 16-bit words. Port A is on the
// plc-local bus, port B on the arm-local bus; both are single-access ports with
// one cycle of read latency (read data is the old word on a write). The
// e-RT3 Linux CPU writes request function code and send data through port A,
// the communication procedure process on the ARM reads them and writes status,
// result and receive data through port B.
//
// Two ports on one RAM follow the block diagram. When both ports write the
// same word in the same cycle port A (PLC) wins: a design choice, the original design
// does not address collisions.
module dpram_desc
  import opt_plc_pkg::*;
#(
  parameter int unsigned DEPTH = DPRAM_WORDS
) (
  input  logic      clk,
  input  lbus_req_t a_req,     // plc-local, req already qualified by address decode
  output data_t     a_rdata,
  input  lbus_req_t b_req,     // arm-local
  output data_t     b_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  data_t mem [DEPTH];

  function automatic logic [AW-1:0] idx(addr_t a);
    return AW'((a - DA_BASE) >> 1);
  endfunction

  logic [AW-1:0] a_idx, b_idx;
  assign a_idx = idx(a_req.addr);
  assign b_idx = idx(b_req.addr);

  always_ff @(posedge clk) begin
    if (b_req.req && b_req.we && !(a_req.req && a_req.we && a_idx == b_idx))
      mem[b_idx] <= b_req.wdata;
    if (a_req.req && a_req.we)
      mem[a_idx] <= a_req.wdata;
  end

  always_ff @(posedge clk) begin
    if (a_req.req) a_rdata <= mem[a_idx];
    if (b_req.req) b_rdata <= mem[b_idx];
  end

endmodule
