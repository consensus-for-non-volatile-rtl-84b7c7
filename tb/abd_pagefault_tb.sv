// abd_pagefault_tb: the page-fault latency experiment on the default-size
// system.
//
// One client writes one line on each of NPAGES different pages, over and
// over, the way the evaluation of replicated memory measured its page-fault
// handling; three replicas serve it. The first write is a cold miss (one
// page fetched); every later write evicts a dirty page (64 ABD writes) and
// fetches the next one (64 ABD reads). Measured in clock cycles: the latency
// of every write, of a local hit in the page buffer, and of the ABD
// operations. Checks: each dirty fault moves exactly 2 x 64 lines, the
// fault latency is stable (all within 10% of the first), a hit takes 2
// cycles, and reading the pages back at the end returns every written line.
module abd_pagefault_tb;
  import abd_pkg::*;

  localparam int unsigned NC = 3, NR = 3, LINES = 4096 / LINE_BYTES, NPAGES = 30;

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

  abd_system dut (.*);

  for (genvar r = 0; r < NR; r++) begin : g_scm
    scm_model #(.LATENCY(4)) u_scm (
      .clk, .req_valid(scm_req_valid[r]), .req_ready(scm_req_ready[r]),
      .req_write(scm_req_write[r]), .req_addr(scm_req_addr[r]), .req_wdata(scm_req_wdata[r]),
      .rsp_valid(scm_rsp_valid[r]), .rsp_rdata(scm_rsp_rdata[r])
    );
  end

  int cyc = 0, n_wdone = 0, n_rdone = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    n_wdone += int'(ev_write_done);
    n_rdone += int'(ev_read_done);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lat;
  task automatic access(bit wr, laddr_t a, line_t d, output line_t q);
    int t0;
    @(negedge clk);
    cpu_req_valid[0] = 1; cpu_req_write[0] = wr; cpu_req_addr[0] = a; cpu_req_wdata[0] = d;
    @(posedge clk); while (!cpu_req_ready[0]) @(posedge clk);
    t0 = cyc;
    @(negedge clk); cpu_req_valid[0] = 0;
    while (!cpu_rsp_valid[0]) @(posedge clk);
    lat = cyc - t0;
    q = cpu_rsp_rdata[0];
  endtask

  function automatic laddr_t line_of(int p);
    return laddr_t'(p * 977 + 5) * laddr_t'(LINES) + laddr_t'(p % LINES);
  endfunction

  line_t q;
  int first_lat, w0, r0, lmin, lmax;

  initial begin
    for (int k = 0; k < NC; k++) begin
      cpu_req_valid[k] = 0; cpu_req_write[k] = 0; cpu_req_addr[k] = '0; cpu_req_wdata[k] = '0;
    end
    for (int r = 0; r < NR; r++) fail[r] = 0;
    repeat (4) @(negedge clk); rst_n = 1;

    access(1, line_of(0), line_t'(1000), q);           // cold miss
    check(n_rdone == LINES && n_wdone == 0, "cold fault fetches one page");
    $display("  cold fault            %0d cycles", lat);
    access(0, line_of(0), '0, q);
    check(lat == 2 && q == line_t'(1000), $sformatf("local hit %0d cycles", lat));

    lmin = 1 << 30; lmax = 0;
    for (int p = 1; p < NPAGES; p++) begin
      w0 = n_wdone; r0 = n_rdone;
      access(1, line_of(p), line_t'(1000 + p), q);
      check(n_wdone - w0 == LINES && n_rdone - r0 == LINES,
            $sformatf("fault %0d moved %0d/%0d lines", p, n_wdone - w0, n_rdone - r0));
      if (p == 1) first_lat = lat;
      if (lat < lmin) lmin = lat;
      if (lat > lmax) lmax = lat;
    end
    $display("  dirty fault           %0d..%0d cycles (%0d ABD operations each)", lmin, lmax, 2 * LINES);
    $display("  per ABD operation     ~%0d cycles", lmax / (2 * LINES));
    check(lmax - lmin <= first_lat / 10, "fault latency is stable");
    check(lmin > 100 * 2, "a fault costs far more than a local hit");

    // read everything back: the evicted pages live only in the replicas
    for (int p = 0; p < NPAGES; p++) begin
      access(0, line_of(p), '0, q);
      check(q == line_t'(1000 + p), $sformatf("page %0d read back", p));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
