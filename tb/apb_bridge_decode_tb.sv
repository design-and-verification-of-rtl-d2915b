// apb_bridge_decode_tb: directed test of the bridge's slave decoding with
// three slaves, where the two-bit select field PADDR[11:10] has one value
// (3) that names no slave. Every slave model is always ready and returns a
// slave-specific word. For each select value the test issues a read and a
// write and checks which PSEL line rises, the two-cycle latency, and the
// read data; for the unused value it checks that no PSEL rises and that the
// read returns zero.
module apb_bridge_decode_tb;
  import apb_pkg::*;

  localparam int unsigned NS = 3;

  logic                pclk = 1'b0;
  logic                presetn;
  logic                req, write, gnt, done;
  addr_t               addr, paddr;
  data_t               wdata, rdata, pwdata;
  logic [NS-1:0]       psel, pready;
  logic                penable, pwrite;
  logic [NS-1:0][31:0] prdata;

  int checks = 0, failures = 0;

  apb_bridge #(.NUM_SLAVES(NS)) dut (.*);

  always #5 pclk = ~pclk;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      pready[i] = 1'b1;
      prdata[i] = 32'hC0DE_0000 | (i << 12) | 32'(paddr[9:0]);
    end
  end

  initial begin
    repeat (2000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic run(input int s, input bit wr, input logic [9:0] w);
    logic [NS-1:0] exp_sel;
    exp_sel = (s < NS) ? NS'(1) << s : '0;
    @(negedge pclk);
    req = 1; write = wr; addr = {20'h0, 2'(s), w}; wdata = $urandom;
    #1 check(32'(gnt), 1, "gnt in IDLE");
    @(negedge pclk);  // SETUP
    req = 0;
    check(32'(psel), 32'(exp_sel), "PSEL in SETUP");
    check(32'(penable), 0, "PENABLE in SETUP");
    check(32'(done), 0, "done in SETUP");
    @(negedge pclk);  // ACCESS
    check(32'(psel), 32'(exp_sel), "PSEL in ACCESS");
    check(32'(penable), 1, "PENABLE in ACCESS");
    check(32'(done), 1, "done after two cycles");
    if (!wr) check(rdata, (s < NS) ? (32'hC0DE_0000 | (s << 12) | 32'(w)) : 32'h0, "read data");
    @(negedge pclk);  // back in IDLE
    check(32'(psel), 0, "PSEL in IDLE");
    check(32'(penable), 0, "PENABLE in IDLE");
  endtask

  initial begin
    presetn = 0; req = 0; write = 0; addr = '0; wdata = '0;
    repeat (3) @(negedge pclk);
    presetn = 1;
    for (int s = 0; s < 4; s++) begin
      run(s, 0, 10'($urandom));
      run(s, 1, 10'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
