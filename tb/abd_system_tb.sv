// abd_system_tb: end-to-end test of the replicated memory system.
//
// Three clients, the ABD switch and three replicas, each replica in front of
// a storage-class memory model. Sizes are reduced so that operations collide
// (32 switch entries, pages of 4 lines, 300-cycle client time-out).
//   1. Each client runs random line reads and writes over three pages of its
//      own; every read is checked against a reference model. Meanwhile one
//      replica crashes for a while (a minority: service continues), later
//      two of them crash together (no majority: clients time out and re-send,
//      the switch restarts their operations) and recover.
//   2. Each client touches a fresh page so its dirty page is written back.
//   3. Each client reads every line of the next client's pages through its
//      own page buffer and the switch: the newest values must come back,
//      also for replicas that missed writes while down.
//   4. For every written line a majority of the memory devices must hold its
//      newest value.
// Each mechanism of the design is counted and must occur at least once:
// quorums of both phases, completed reads and writes, stale answers dropped,
// busy-entry drops, restarts, client re-sends, page hits, misses and
// write-backs, replica updates and replica drops.
module abd_system_tb;
  import abd_pkg::*;

  localparam int unsigned NC = 3, NR = 3, TE = 32, TO = 300, PB = 256;
  localparam int unsigned LINES = PB / LINE_BYTES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      cpu_req_valid [NC], cpu_req_ready [NC], cpu_req_write [NC];
  laddr_t    cpu_req_addr  [NC];
  line_t     cpu_req_wdata [NC];
  logic      cpu_rsp_valid [NC];
  line_t     cpu_rsp_rdata [NC];
  logic      fail [NR];
  logic      scm_req_valid [NR], scm_req_ready [NR], scm_req_write [NR];
  laddr_t    scm_req_addr  [NR];
  scm_word_t scm_req_wdata [NR];
  logic      scm_rsp_valid [NR];
  scm_word_t scm_rsp_rdata [NR];
  logic      cfg_we = 0;
  logic [0:0] cfg_group = '0;
  logic [NR-1:0] cfg_mask = '1;
  logic [NC-1:0] ev_retry, ev_page_hit, ev_page_miss, ev_page_writeback;
  logic [NR-1:0] ev_replica_drop, ev_replica_update;
  logic ev_busy_drop, ev_restart, ev_stale_drop, ev_ts_quorum, ev_rd_quorum,
        ev_write_done, ev_read_done;

  abd_system #(
    .NUM_CLIENTS(NC), .NUM_REPLICAS(NR), .TS_ENTRIES(TE), .NUM_GROUPS(1),
    .TIMEOUT(TO), .PAGE_BYTES(PB), .FIFO_DEPTH(16)
  ) dut (.*);

  for (genvar r = 0; r < NR; r++) begin : g_scm
    scm_model #(.LATENCY(3 + r), .STALL(r == 1)) u_scm (
      .clk, .req_valid(scm_req_valid[r]), .req_ready(scm_req_ready[r]),
      .req_write(scm_req_write[r]), .req_addr(scm_req_addr[r]), .req_wdata(scm_req_wdata[r]),
      .rsp_valid(scm_rsp_valid[r]), .rsp_rdata(scm_rsp_rdata[r])
    );
  end

  // ---------------- event counters ----------------
  typedef enum int {E_TSQ, E_RDQ, E_WDONE, E_RDONE, E_STALE, E_BUSY, E_RESTART,
                    E_RETRY, E_HIT, E_MISS, E_WB, E_UPD, E_RDROP, E_N} ev_e;
  int evc [E_N];
  string evn [E_N] = '{"timestamp quorum", "read quorum", "write done", "read done",
                       "stale answer dropped", "busy entry drop", "restart",
                       "client re-send", "page hit", "page miss", "page write-back",
                       "replica update", "replica drop"};
  always @(posedge clk) if (rst_n) begin
    evc[E_TSQ]     += int'(ev_ts_quorum);
    evc[E_RDQ]     += int'(ev_rd_quorum);
    evc[E_WDONE]   += int'(ev_write_done);
    evc[E_RDONE]   += int'(ev_read_done);
    evc[E_STALE]   += int'(ev_stale_drop);
    evc[E_BUSY]    += int'(ev_busy_drop);
    evc[E_RESTART] += int'(ev_restart);
    evc[E_RETRY]   += $countones(ev_retry);
    evc[E_HIT]     += $countones(ev_page_hit);
    evc[E_MISS]    += $countones(ev_page_miss);
    evc[E_WB]      += $countones(ev_page_writeback);
    evc[E_UPD]     += $countones(ev_replica_update);
    evc[E_RDROP]   += $countones(ev_replica_drop);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model ----------------
  line_t ref_m [laddr_t];
  function automatic line_t refv(laddr_t a);
    return ref_m.exists(a) ? ref_m[a] : '0;
  endfunction

  // page p (0..2) of client k
  function automatic laddr_t page_base(int k, int p);
    return laddr_t'((k * 4 + p) * 64) | laddr_t'(26'h100000);
  endfunction

  task automatic access(int k, bit wr, laddr_t a, line_t d);
    line_t exp_v;
    exp_v = refv(a);
    @(negedge clk);
    cpu_req_valid[k] = 1; cpu_req_write[k] = wr; cpu_req_addr[k] = a; cpu_req_wdata[k] = d;
    @(posedge clk); while (!cpu_req_ready[k]) @(posedge clk);
    @(negedge clk); cpu_req_valid[k] = 0;
    while (!cpu_rsp_valid[k]) @(posedge clk);
    check(cpu_rsp_rdata[k] == exp_v, $sformatf("client %0d line %h", k, a));
    if (wr) ref_m[a] = d;
  endtask

  task automatic client_run(int k, int n);
    laddr_t a;
    for (int i = 0; i < n; i++) begin
      a = page_base(k, $urandom_range(2)) + laddr_t'($urandom_range(LINES - 1));
      access(k, $urandom_range(1), a, {$urandom(), {15{32'(k + 1)}}} ^ line_t'(i));
    end
  endtask

  int holders;
  scm_word_t w;

  initial begin
    for (int k = 0; k < NC; k++) begin
      cpu_req_valid[k] = 0; cpu_req_write[k] = 0; cpu_req_addr[k] = '0; cpu_req_wdata[k] = '0;
    end
    for (int r = 0; r < NR; r++) fail[r] = 0;
    repeat (4) @(negedge clk); rst_n = 1;

    // 1. random traffic with replica crashes
    fork
      client_run(0, 40);
      client_run(1, 40);
      client_run(2, 40);
      begin
        repeat (1500) @(posedge clk);
        fail[2] = 1;
        repeat (3000) @(posedge clk);
        fail[1] = 1;
        repeat (1200) @(posedge clk);
        fail[1] = 0; fail[2] = 0;
      end
    join

    // 2. write back dirty pages
    for (int k = 0; k < NC; k++) access(k, 0, page_base(k, 3), '0);

    // 3. cross-client reads of every line
    for (int k = 0; k < NC; k++)
      for (int p = 0; p < 3; p++)
        for (int l = 0; l < LINES; l++)
          access(k, 0, page_base((k + 1) % NC, p) + laddr_t'(l), '0);

    // 4. a majority of the devices hold each newest value
    foreach (ref_m[a]) begin
      holders = 0;
      for (int r = 0; r < NR; r++) begin
        case (r)
          0: w = g_scm[0].u_scm.peek(a);
          1: w = g_scm[1].u_scm.peek(a);
          default: w = g_scm[2].u_scm.peek(a);
        endcase
        if (w.value == ref_m[a]) holders++;
      end
      check(holders >= 2, $sformatf("line %h on %0d devices", a, holders));
    end

    for (int e = 0; e < E_N; e++) begin
      $display("  %-22s %0d", evn[e], evc[e]);
      check(evc[e] > 0, $sformatf("mechanism '%s' never happened", evn[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
