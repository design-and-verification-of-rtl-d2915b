// apb_top: an APB subsystem with one bridge and two memory slaves.
//
// The bridge turns requests from the system bus into APB transfers and
// drives PSEL1 and PSEL2; each select line enables one apb_slave, a state
// machine in front of a 1K x 32 memory. The two slaves share PENABLE,
// PWRITE, PADDR[9:0] and PWDATA; each returns its own PRDATA and PREADY to
// the bridge. PADDR bit 10 chooses the slave, bits 9:0 the word.
//
// The first slave answers without wait states and the second inserts
// SLV2_WAIT of them, so the subsystem shows both transfer kinds of the
// document's waveforms (plain and with wait states).
//
// Interface: PCLK, PRESETn; the system side req/write/addr/wdata in and
// gnt/done/rdata out (see apb_bridge); the APB bus itself is brought out
// for observation.
// The bridge-and-slave structure, the two select lines, the 10-bit slave
// address and the memory size follow the document; the wait-state counts
// and the address map are this design's choices.
module apb_top
  import apb_pkg::*;
#(
  parameter int unsigned SLV1_WAIT = 0,
  parameter int unsigned SLV2_WAIT = 1,
  parameter int unsigned DEPTH     = 1024
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        req,
  input  logic        write,
  input  addr_t       addr,
  input  data_t       wdata,
  output logic        gnt,
  output logic        done,
  output data_t       rdata,
  output logic [1:0]  psel,
  output logic        penable,
  output logic        pwrite,
  output addr_t       paddr,
  output data_t       pwdata,
  output logic [1:0]  pready
);

  logic [1:0][DATA_W-1:0] prdata;

  apb_bridge #(.NUM_SLAVES(2), .SEL_LSB($clog2(DEPTH))) u_bridge (
    .pclk, .presetn,
    .req, .write, .addr, .wdata, .gnt, .done, .rdata,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready
  );

  apb_slave #(.WAIT_STATES(SLV1_WAIT), .DEPTH(DEPTH)) u_slave1 (
    .pclk, .presetn,
    .psel    (psel[0]),
    .penable,
    .pwrite,
    .paddr   (paddr[$clog2(DEPTH)-1:0]),
    .pwdata,
    .prdata  (prdata[0]),
    .pready  (pready[0])
  );

  apb_slave #(.WAIT_STATES(SLV2_WAIT), .DEPTH(DEPTH)) u_slave2 (
    .pclk, .presetn,
    .psel    (psel[1]),
    .penable,
    .pwrite,
    .paddr   (paddr[$clog2(DEPTH)-1:0]),
    .pwdata,
    .prdata  (prdata[1]),
    .pready  (pready[1])
  );

endmodule
