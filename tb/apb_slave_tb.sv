// apb_slave_tb: self-checking test of the APB memory slave.
// Two slaves are tested side by side, one with no wait states and one with
// three. A small APB master written as tasks runs write and read transfers
// (with and without idle cycles between them), counts the ACCESS cycles to
// PREADY and compares read data with a shadow memory. It also checks that
// PRDATA holds the last read word outside the completing cycle of a read
// and that a deselected slave ignores bus activity.
module apb_slave_tb;
  localparam int unsigned W0 = 0;
  localparam int unsigned W1 = 3;

  logic        pclk = 1'b0;
  logic        presetn;
  logic [1:0]  psel;
  logic        penable, pwrite;
  logic [9:0]  paddr;
  logic [31:0] pwdata;
  logic [31:0] prdata [2];
  logic        pready [2];
  logic [31:0] shadow [2][1024];
  bit          valid  [2][1024];
  logic [31:0] last_rd [2] = '{32'h0, 32'h0};
  int checks = 0, failures = 0;

  apb_slave #(.WAIT_STATES(W0)) dut0 (.pclk, .presetn, .psel(psel[0]), .penable, .pwrite,
    .paddr, .pwdata, .prdata(prdata[0]), .pready(pready[0]));
  apb_slave #(.WAIT_STATES(W1)) dut1 (.pclk, .presetn, .psel(psel[1]), .penable, .pwrite,
    .paddr, .pwdata, .prdata(prdata[1]), .pready(pready[1]));

  always #5 pclk = ~pclk;

  initial begin
    repeat (50000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One APB transfer to slave s; returns read data.
  task automatic xfer(input int s, input bit wr, input logic [9:0] a,
                      input logic [31:0] d, output logic [31:0] rd);
    int waits;
    // SETUP
    @(negedge pclk);
    psel = 2'b00; psel[s] = 1'b1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    #1 check(32'(pready[s]), 0, "PREADY low in SETUP");
    check(prdata[s], last_rd[s], "PRDATA holds in SETUP");
    // ACCESS
    @(negedge pclk);
    penable = 1;
    waits = 0;
    #1;
    while (!pready[s]) begin
      check(prdata[s], last_rd[s], "PRDATA holds while waiting");
      @(negedge pclk); #1;
      waits++;
      if (waits > 10) break;
    end
    check(waits, (s == 0) ? W0 : W1, $sformatf("wait states slave %0d", s));
    check(32'(pready[1-s]), 0, "other slave not ready");
    rd = prdata[s];
    if (!wr && valid[s][a]) check(rd, shadow[s][a], $sformatf("read slave %0d addr %0d", s, a));
    if (!wr) last_rd[s] = rd;
    if (wr) begin
      check(rd, last_rd[s], "PRDATA holds in write");
      shadow[s][a] = d; valid[s][a] = 1;
    end
  endtask

  task automatic go_idle();
    @(negedge pclk);
    psel = 0; penable = 0; pwrite = $urandom; paddr = 10'($urandom); pwdata = $urandom;
    #1 check(prdata[0], last_rd[0], "PRDATA 0 holds in IDLE");
    check(prdata[1], last_rd[1], "PRDATA 1 holds in IDLE");
    check(32'(pready[0]) + 32'(pready[1]), 0, "PREADY low in IDLE");
  endtask

  initial begin
    logic [31:0] rd;
    presetn = 0; psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    repeat (3) @(posedge pclk);
    @(negedge pclk) presetn = 1;
    // the four writes and the reads of the document's waveforms
    for (int s = 0; s < 2; s++) begin
      xfer(s, 1, 10'd7, 32'h60, rd);
      xfer(s, 1, 10'd1, 32'h24, rd);
      xfer(s, 1, 10'd0, 32'h4e, rd);
      xfer(s, 1, 10'd3, 32'h28, rd);
      go_idle();
      xfer(s, 0, 10'd7, 0, rd); check(rd, 32'h60, "read 7");
      xfer(s, 0, 10'd1, 0, rd); check(rd, 32'h24, "read 1");
      go_idle();
    end
    // random traffic with random idle gaps
    for (int n = 0; n < 3000; n++) begin
      automatic int s = $urandom_range(1, 0);
      automatic bit wr = (n < 400) ? 1'b1 : 1'($urandom);
      automatic logic [9:0] a = 10'($urandom_range(63, 0));
      if (n % 5 == 0) a = 10'($urandom);
      xfer(s, wr, a, $urandom, rd);
      if ($urandom_range(3, 0) == 0) go_idle();
    end
    // a write to slave 0 leaves slave 1's copy unchanged
    xfer(0, 1, 10'd9, 32'hDEAD_0000, rd);
    xfer(1, 1, 10'd9, 32'h0000_BEEF, rd);
    xfer(0, 0, 10'd9, 0, rd); check(rd, 32'hDEAD_0000, "slave 0 own data");
    xfer(1, 0, 10'd9, 0, rd); check(rd, 32'h0000_BEEF, "slave 1 own data");
    go_idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
