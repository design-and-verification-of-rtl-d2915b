// apb_slave: an APB peripheral made of a slave state machine and a 1K x 32
// memory.
//
// The slave follows the bridge through the IDLE, SETUP and ACCESS phases,
// which it decodes from PSEL and PENABLE. In a SETUP cycle the memory is
// already reading the word at PADDR[9:0], so read data is ready by the first
// ACCESS cycle. In ACCESS the slave holds PREADY low for WAIT_STATES cycles
// (a wait counter), then raises it for one cycle: that cycle ends the
// transfer, writing PWDATA into the memory when PWRITE is high, or
// presenting the memory word on PRDATA when PWRITE is low. Between reads
// PRDATA keeps showing the word of the last completed read (zero after
// reset), as in the document's read waveforms.
//
// Interface (APB): PCLK, PRESETn (active low), PSEL, PENABLE, PWRITE,
// PADDR[9:0], PWDATA[31:0] in; PRDATA[31:0], PREADY out.
// Timing: a transfer takes SETUP + (WAIT_STATES + 1) ACCESS cycles.
// The ports, the 10-bit address and the memory size follow the slave
// diagram; wait states are shown in the write and read waveforms but their
// number is not given, so WAIT_STATES is this design's parameter. The bus
// rules are checked by the assertions at the end.
module apb_slave
  import apb_pkg::*;
#(
  parameter int unsigned WAIT_STATES = 1,
  parameter int unsigned DEPTH       = 1024,
  parameter int unsigned AW          = $clog2(DEPTH)
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [AW-1:0]     paddr,
  input  data_t             pwdata,
  output data_t             prdata,
  output logic              pready
);

  localparam int unsigned CNT_W = $clog2(WAIT_STATES + 2);

  apb_state_e        phase;     // bus phase of the current cycle
  logic [CNT_W-1:0]  wait_cnt;  // ACCESS cycles already spent waiting
  logic              mem_we;
  data_t             mem_rdata;

  always_comb begin
    if (!psel)         phase = APB_IDLE;
    else if (!penable) phase = APB_SETUP;
    else               phase = APB_ACCESS;
  end

  assign pready = (phase == APB_ACCESS) && (wait_cnt == CNT_W'(WAIT_STATES));

  always_ff @(posedge pclk) begin
    if (!presetn)                           wait_cnt <= '0;
    else if (phase != APB_ACCESS || pready) wait_cnt <= '0;
    else                                    wait_cnt <= wait_cnt + 1'b1;
  end

  assign mem_we = pready && pwrite;

  apb_mem #(.DEPTH(DEPTH), .DW(DATA_W), .AW(AW)) u_mem (
    .clk   (pclk),
    .we    (mem_we),
    .addr  (paddr),
    .wdata (pwdata),
    .rdata (mem_rdata)
  );

  // PRDATA: the memory word in the completing cycle of a read, otherwise
  // the word of the last completed read.
  data_t prdata_q;

  always_ff @(posedge pclk) begin
    if (!presetn)              prdata_q <= '0;
    else if (pready && !pwrite) prdata_q <= mem_rdata;
  end

  assign prdata = (pready && !pwrite) ? mem_rdata : prdata_q;

  // APB rules seen from the slave side.
  // A SETUP cycle is always followed by an ACCESS cycle.
  a_setup_then_access: assert property (@(posedge pclk) disable iff (!presetn)
    (phase == APB_SETUP) |=> (phase == APB_ACCESS));
  // While the slave waits, the bridge keeps the transfer unchanged.
  a_hold_while_wait: assert property (@(posedge pclk) disable iff (!presetn)
    (phase == APB_ACCESS && !pready) |=>
      (phase == APB_ACCESS && $stable(paddr) && $stable(pwrite) && $stable(pwdata)));
  // ACCESS is only entered from SETUP (or stays in ACCESS while waiting).
  a_access_after_setup: assert property (@(posedge pclk) disable iff (!presetn)
    (phase != APB_SETUP && !(phase == APB_ACCESS && !pready)) |=> (phase != APB_ACCESS));

endmodule
