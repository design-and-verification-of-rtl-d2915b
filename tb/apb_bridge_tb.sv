// apb_bridge_tb: self-checking test of the APB master.
// Two behavioural slave models answer on the APB side: each picks a random
// number of wait states (0 to 3) per transfer, drives PREADY from its own
// counter and returns read data that is a fixed function of slave and
// address. Unselected slaves drive random PREADY and PRDATA, so the test
// also proves the bridge listens only to the selected one. A driver issues
// random requests, sometimes back to back and sometimes with idle gaps.
// Every cycle the checker compares PSEL, PENABLE, PADDR, PWRITE, PWDATA,
// gnt and done with a cycle model of the IDLE/SETUP/ACCESS sequence, and
// checks the latency of each transfer (2 + wait states cycles after it was
// accepted) and its read data.
module apb_bridge_tb;
  import apb_pkg::*;

  localparam int unsigned NS = 2;

  logic                     pclk = 1'b0;
  logic                     presetn;
  logic                     req, write, gnt, done;
  addr_t                    addr, paddr;
  data_t                    wdata, rdata, pwdata;
  logic [NS-1:0]            psel, pready;
  logic                     penable, pwrite;
  logic [NS-1:0][31:0]      prdata;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_idle_ret = 0, n_wait = 0, n_nowait = 0, n_reads = 0, n_writes = 0;

  apb_bridge #(.NUM_SLAVES(NS)) dut (.*);

  always #5 pclk = ~pclk;

  initial begin
    repeat (100000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] slave_data(int s, addr_t a);
    return {a[15:0] ^ 16'h5A3C, 8'(s + 1), a[23:16]};
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // ---------------- slave models ----------------
  int          cnt [NS];
  int          tgt [NS];
  logic [NS-1:0] rnd_ready;
  logic [NS-1:0][31:0] rnd_data;

  always @(posedge pclk) begin
    for (int i = 0; i < NS; i++) begin
      if (psel[i] && !penable) tgt[i] <= $urandom_range(3, 0);
      if (psel[i] && penable && !pready[i]) cnt[i] <= cnt[i] + 1;
      else                                  cnt[i] <= 0;
      rnd_ready[i] <= 1'($urandom);
      rnd_data[i]  <= $urandom;
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      if (psel[i]) begin
        pready[i] = penable && (cnt[i] == tgt[i]);
        prdata[i] = pready[i] ? slave_data(i, paddr) : rnd_data[i];
      end else begin
        pready[i] = rnd_ready[i];
        prdata[i] = rnd_data[i];
      end
    end
  end

  // ---------------- reference and checker ----------------
  typedef struct {
    bit    wr;
    addr_t a;
    data_t d;
    int    t_acc;  // cycle of acceptance
  } txn_t;

  txn_t cur;
  bit   cur_valid = 0;
  bit   cur_access = 0;
  int   cyc = 0;
  int   cur_waits = 0;
  int   n_done = 0;
  bit   taken = 0, last_done = 0;

  initial begin
    presetn = 0; req = 0; write = 0; addr = '0; wdata = '0;
    foreach (cnt[i]) begin cnt[i] = 0; tgt[i] = 0; end
    repeat (3) @(negedge pclk);
    presetn = 1;
    while (n_done < 3000) begin
      @(negedge pclk);
      cyc++;
      begin : observe
        logic [NS-1:0] exp_sel;
        bit exp_done;
        int s;
        exp_done = 0;
        if (cur_valid) begin
          s = int'(cur.a[MEM_AW]);
          exp_sel = NS'(1) << s;
          check(32'(psel), 32'(exp_sel), "PSEL");
          check(cur.a, paddr, "PADDR");
          check(32'(cur.wr), 32'(pwrite), "PWRITE");
          check(cur.d, pwdata, "PWDATA");
          check(32'(penable), 32'(cur_access), "PENABLE");
          if (cur_access) begin
            exp_done = pready[s];
            check(32'(done), 32'(exp_done), "done");
            if (exp_done) begin
              check(cyc - cur.t_acc, 2 + tgt[s], "transfer latency");
              if (tgt[s] == 0) n_nowait++; else n_wait++;
              if (!cur.wr) begin
                check(rdata, slave_data(s, cur.a), "read data");
                n_reads++;
              end else n_writes++;
              n_done++;
              cur_valid = 0;
            end
          end else begin
            check(32'(done), 0, "done in SETUP");
          end
          cur_access = 1;
        end else begin
          check(32'(psel), 0, "PSEL idle");
          check(32'(penable), 0, "PENABLE idle");
          check(32'(done), 0, "done idle");
        end
        check(32'(gnt), 32'(!cur_valid), "gnt");
        last_done = exp_done;
      end
      // drive the next request; a request not yet accepted is held
      if (!req || taken) begin
        req   = ($urandom_range(9, 0) < 7);
        write = 1'($urandom);
        addr  = {$urandom} & 32'h0000_07FF;
        addr[31:24] = 8'($urandom);
        wdata = $urandom;
      end
      #1;
      taken = req && gnt;
      if (taken) begin
        if (last_done) n_b2b++;
        cur = '{wr: write, a: addr, d: wdata, t_acc: cyc};
        cur_valid = 1; cur_access = 0;
      end else if (last_done) n_idle_ret++;
    end
    $display("back-to-back=%0d return-to-idle=%0d waited=%0d no-wait=%0d reads=%0d writes=%0d",
             n_b2b, n_idle_ret, n_wait, n_nowait, n_reads, n_writes);
    checks++; if (n_b2b == 0 || n_idle_ret == 0 || n_wait == 0 || n_nowait == 0 ||
                  n_reads == 0 || n_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
