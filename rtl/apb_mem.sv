// apb_mem: the 1K x 32 storage array behind an APB slave.
//
// A single-port synchronous RAM: on a rising edge of clk a write stores
// wdata at addr when we is high, and every edge registers the word at addr
// into rdata, so read data appears one cycle after the address. When we is
// high rdata is left holding its previous value. The contents have no reset,
// as is usual for RAM; a word reads as unknown until it is written.
//
// Interface: clk, we, addr[AW-1:0], wdata[DW-1:0] in; rdata[DW-1:0] out.
// Size (1K words of 32 bits) follows the slave diagram; the one-cycle
// registered read and the write/read port sharing are this design's choice.
module apb_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
