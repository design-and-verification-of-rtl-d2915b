// apb_bridge: the APB master. It takes single read or write requests from
// the system bus side and runs each one as an APB transfer.
//
// A three-state machine (IDLE, SETUP, ACCESS) drives the bus. A request is
// accepted (req and gnt both high) in IDLE, or in the last ACCESS cycle of
// the previous transfer; its address, direction and write data are then
// latched and held on PADDR/PWRITE/PWDATA until the transfer completes. The
// next cycle is SETUP: the PSEL line of the addressed slave rises with
// PENABLE low. The cycle after is ACCESS: PENABLE rises and the bridge waits
// there while the selected slave holds PREADY low. The ACCESS cycle with
// PREADY high completes the transfer: done pulses, and for a read rdata
// carries the slave's PRDATA. The machine then returns to IDLE, or goes
// straight to SETUP if another request is waiting.
//
// Slave decoding: the word address inside a slave is PADDR[SEL_LSB-1:0];
// the field above it, PADDR[SEL_LSB +: SEL_W], picks PSEL[idx]. A request
// whose field names no slave runs with no PSEL raised and completes after
// one ACCESS cycle with read data zero.
//
// Interface: system side req, write, addr, wdata in; gnt, done, rdata out.
// APB side psel[NUM_SLAVES], penable, pwrite, paddr, pwdata out;
// prdata[NUM_SLAVES], pready[NUM_SLAVES] in, one pair per slave.
// Timing: a transfer occupies SETUP plus one ACCESS cycle per wait state
// plus one, so back-to-back zero-wait transfers finish every second cycle.
// The states, their PSEL/PENABLE values, the latched address and the
// PSEL1/PSEL2 select lines follow the document; the request handshake and
// the position of the select field are this design's choices.
module apb_bridge
  import apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter int unsigned SEL_LSB    = MEM_AW
) (
  input  logic                             pclk,
  input  logic                             presetn,
  // system bus side
  input  logic                             req,
  input  logic                             write,
  input  addr_t                            addr,
  input  data_t                            wdata,
  output logic                             gnt,
  output logic                             done,
  output data_t                            rdata,
  // APB side
  output logic [NUM_SLAVES-1:0]            psel,
  output logic                             penable,
  output logic                             pwrite,
  output addr_t                            paddr,
  output data_t                            pwdata,
  input  logic [NUM_SLAVES-1:0][DATA_W-1:0] prdata,
  input  logic [NUM_SLAVES-1:0]            pready
);

  localparam int unsigned SEL_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;

  apb_state_e       state_q, state_d;
  logic [SEL_W-1:0] idx;
  logic             idx_ok;
  logic             ready_sel;

  assign idx    = paddr[SEL_LSB +: SEL_W];
  assign idx_ok = (NUM_SLAVES > 1) ? (32'(idx) < NUM_SLAVES) : (idx == '0);

  always_comb begin
    psel = '0;
    if (state_q != APB_IDLE && idx_ok) psel[idx] = 1'b1;
  end

  assign penable   = (state_q == APB_ACCESS);
  assign ready_sel = idx_ok ? pready[idx] : 1'b1;
  assign done      = (state_q == APB_ACCESS) && ready_sel;
  assign rdata     = (done && !pwrite && idx_ok) ? prdata[idx] : '0;
  assign gnt       = (state_q == APB_IDLE) || done;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      APB_IDLE:   if (req) state_d = APB_SETUP;
      APB_SETUP:  state_d = APB_ACCESS;
      APB_ACCESS: if (ready_sel) state_d = req ? APB_SETUP : APB_IDLE;
      default:    state_d = APB_IDLE;
    endcase
  end

  always_ff @(posedge pclk) begin
    if (!presetn) begin
      state_q <= APB_IDLE;
      pwrite  <= 1'b0;
      paddr   <= '0;
      pwdata  <= '0;
    end else begin
      state_q <= state_d;
      if (req && gnt) begin
        pwrite <= write;
        paddr  <= addr;
        pwdata <= wdata;
      end
    end
  end

  // Bus rules on the master side.
  a_psel_onehot: assert property (@(posedge pclk) disable iff (!presetn) $onehot0(psel));
  a_enable_needs_sel: assert property (@(posedge pclk) disable iff (!presetn)
    (penable && idx_ok) |-> (psel != '0));
  a_addr_held: assert property (@(posedge pclk) disable iff (!presetn)
    (state_q != APB_IDLE && !done) |=> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)));

endmodule
