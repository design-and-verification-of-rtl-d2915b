// apb_mem_tb: self-checking test of the 1K x 32 synchronous RAM.
// Writes pseudo-random words to pseudo-random addresses while keeping a
// shadow copy, then reads addresses back and checks that each word appears
// exactly one cycle after its address, and that rdata holds still during a
// write cycle to another word.
module apb_mem_tb;
  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = 10;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   shadow [DEPTH];
  bit            valid  [DEPTH];
  int checks = 0, failures = 0;

  apb_mem #(.DEPTH(DEPTH), .DW(32)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    logic [31:0] held;
    we = 0; addr = '0; wdata = '0;
    foreach (valid[i]) valid[i] = 0;
    // fill part of the memory
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = 1; addr = AW'($urandom); wdata = $urandom;
      shadow[addr] = wdata; valid[addr] = 1;
    end
    // every address at both ends of the array
    for (int a = 0; a < DEPTH; a += DEPTH - 1) begin
      @(negedge clk);
      we = 1; addr = AW'(a); wdata = 32'hA5A5_0000 | a;
      shadow[a] = wdata; valid[a] = 1;
    end
    // read back, one cycle latency
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      we = 0; addr = AW'($urandom);
      if (n % 3 == 0) addr = AW'(n % 2 ? DEPTH - 1 : 0);
      @(posedge clk); #1;
      if (valid[addr]) check(rdata, shadow[addr], $sformatf("read %0d", addr));
      // a write cycle leaves rdata unchanged
      if (n % 7 == 0) begin
        held = rdata;
        @(negedge clk);
        we = 1; addr = addr + 1'b1; wdata = $urandom;
        shadow[addr] = wdata; valid[addr] = 1;
        @(posedge clk); #1;
        check(rdata, held, "rdata held during write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
