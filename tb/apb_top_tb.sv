// apb_top_tb: end-to-end test of the APB subsystem at its default
// parameters (slave 1 with no wait states, slave 2 with one, 1K x 32 words
// each).
// It first replays the transfers of the document's waveforms in both
// slaves: writes of 0x60, 0x24, 0x4e, 0x28 to words 7, 1, 0, 3, then reads
// of words 7 and 1. Then it runs random reads and writes, back to back or
// with idle gaps, and checks each read against a shadow copy of both
// memories. Every transfer's latency from acceptance to done is checked
// (2 cycles for slave 1, 3 for slave 2), as are the PSEL line and PENABLE
// in each phase. It counts how often each mechanism occurred (wait-state
// cycles, zero-wait transfers, back-to-back SETUP after ACCESS, return to
// IDLE, reads, writes, each select line) and fails if one never did.
module apb_top_tb;
  import apb_pkg::*;

  localparam int unsigned LAT1 = 2;  // SETUP + 1 ACCESS
  localparam int unsigned LAT2 = 3;  // SETUP + 1 wait + 1 ACCESS

  logic        pclk = 1'b0;
  logic        presetn;
  logic        req, write, gnt, done;
  addr_t       addr, paddr;
  data_t       wdata, rdata, pwdata;
  logic [1:0]  psel, pready;
  logic        penable, pwrite;

  apb_top dut (.*);

  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  int n_wait_cycles = 0, n_nowait = 0, n_b2b = 0, n_idle_ret = 0;
  int n_reads = 0, n_writes = 0, n_sel1 = 0, n_sel2 = 0;

  initial begin
    repeat (200000) @(posedge pclk);
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

  // shadow of both memories
  logic [31:0] shadow [2][1024];
  bit          valid  [2][1024];

  typedef struct {
    bit    wr;
    addr_t a;
    data_t d;
    int    t_acc;
  } txn_t;

  // stimulus list: the waveform transfers first, then random ones
  txn_t stim [$];
  bit   gap  [$];

  task automatic add(bit wr, addr_t a, data_t d, bit idle_after);
    stim.push_back('{wr: wr, a: a, d: d, t_acc: 0});
    gap.push_back(idle_after);
  endtask

  txn_t cur;
  bit   cur_valid = 0, cur_access = 0, taken = 0, last_done = 0, idle_gap = 0;
  int   cyc = 0, sent = 0, n_done = 0, total;

  initial begin
    for (int s = 0; s < 2; s++) begin
      automatic addr_t base = addr_t'(s) << 10;
      add(1, base | 7, 32'h60, 0);
      add(1, base | 1, 32'h24, 0);
      add(1, base | 0, 32'h4e, 0);
      add(1, base | 3, 32'h28, 1);
      add(0, base | 7, 0, 1);
      add(0, base | 7, 0, 0);
      add(0, base | 1, 0, 1);
    end
    for (int n = 0; n < 4000; n++) begin
      automatic addr_t a = {21'($urandom), 1'($urandom), 10'($urandom_range(127, 0))};
      if (n % 8 == 0) a[9:0] = 10'($urandom);
      add((n < 300) ? 1'b1 : 1'($urandom), a, $urandom, ($urandom_range(4, 0) == 0));
    end
    total = stim.size();

    presetn = 0; req = 0; write = 0; addr = '0; wdata = '0;
    repeat (3) @(negedge pclk);
    presetn = 1;
    while (n_done < total) begin
      @(negedge pclk);
      cyc++;
      begin : observe
        bit exp_done;
        int s;
        exp_done = 0;
        if (cur_valid) begin
          s = int'(cur.a[10]);
          check(32'(psel), 32'(2'b01 << s), "PSEL");
          check(32'(penable), 32'(cur_access), "PENABLE");
          check(paddr, cur.a, "PADDR");
          if (cur_access) begin
            if (!pready[s]) n_wait_cycles++;
            exp_done = (cyc - cur.t_acc) == ((s == 0) ? LAT1 : LAT2);
            check(32'(done), 32'(exp_done), "done at the expected cycle");
            if (done) begin
              if (s == 0) begin n_sel1++; n_nowait++; end else n_sel2++;
              if (cur.wr) begin
                shadow[s][cur.a[9:0]] = cur.d; valid[s][cur.a[9:0]] = 1; n_writes++;
              end else begin
                n_reads++;
                if (valid[s][cur.a[9:0]])
                  check(rdata, shadow[s][cur.a[9:0]], $sformatf("read slave %0d word %0d", s + 1, cur.a[9:0]));
              end
              n_done++;
              cur_valid = 0;
              exp_done = 1;
            end
          end else check(32'(done), 0, "done in SETUP");
          cur_access = 1;
        end else begin
          check(32'(psel), 0, "PSEL in IDLE");
          check(32'(penable), 0, "PENABLE in IDLE");
        end
        check(32'(gnt), 32'(!cur_valid), "gnt");
        last_done = exp_done;
      end
      if (taken || !req) begin
        req = 0;
        // an idle gap holds the next request until the bus is back in IDLE
        if (idle_gap && (cur_valid || last_done)) req = 0;
        else if (sent < total) begin
          req = 1; write = stim[sent].wr; addr = stim[sent].a; wdata = stim[sent].d;
          idle_gap = gap[sent];
          sent++;
        end
      end
      #1;
      taken = req && gnt;
      if (taken) begin
        if (last_done) n_b2b++;
        cur = '{wr: write, a: addr, d: wdata, t_acc: cyc};
        cur_valid = 1; cur_access = 0;
      end else if (last_done) n_idle_ret++;
    end
    $display("wait cycles=%0d zero-wait=%0d back-to-back=%0d return-to-idle=%0d reads=%0d writes=%0d PSEL1=%0d PSEL2=%0d",
             n_wait_cycles, n_nowait, n_b2b, n_idle_ret, n_reads, n_writes, n_sel1, n_sel2);
    check(32'(n_wait_cycles > 0), 1, "wait states happened");
    check(32'(n_nowait > 0), 1, "zero-wait transfers happened");
    check(32'(n_b2b > 0), 1, "back-to-back transfers happened");
    check(32'(n_idle_ret > 0), 1, "return to IDLE happened");
    check(32'(n_reads > 0 && n_writes > 0), 1, "reads and writes happened");
    check(32'(n_sel1 > 0 && n_sel2 > 0), 1, "both slaves selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
