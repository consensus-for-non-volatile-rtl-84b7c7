// abd_system_full_tb: one complete operation on the system at its default
// size (3 clients, 3 replicas, 16384 switch entries, 4 KB pages, 26-bit
// cache-line addresses spanning 4 GB).
//
// Client 0 writes one line near the top of the address space: the cold miss
// fetches its 64-line page with ABD reads, the write lands in the page
// buffer. Touching another page writes the dirty page back (64 ABD writes)
// and fetches the new one. Client 2 then reads the line through its own page
// buffer and must get the written value; all three memory devices must hold
// it with the same timestamp, and the operation counts must match the page
// size exactly.
module abd_system_full_tb;
  import abd_pkg::*;

  localparam int unsigned NC = 3, NR = 3, LINES = 4096 / LINE_BYTES;

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

  int n_wdone = 0, n_rdone = 0, n_retry = 0;
  always @(posedge clk) if (rst_n) begin
    n_wdone += int'(ev_write_done);
    n_rdone += int'(ev_read_done);
    n_retry += $countones(ev_retry);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(int k, bit wr, laddr_t a, line_t d, output line_t q);
    @(negedge clk);
    cpu_req_valid[k] = 1; cpu_req_write[k] = wr; cpu_req_addr[k] = a; cpu_req_wdata[k] = d;
    @(posedge clk); while (!cpu_req_ready[k]) @(posedge clk);
    @(negedge clk); cpu_req_valid[k] = 0;
    while (!cpu_rsp_valid[k]) @(posedge clk);
    q = cpu_rsp_rdata[k];
  endtask

  localparam laddr_t A = 26'h3FF_FFC5;     // a line in the last 4 KB page of 4 GB
  line_t D, q;
  scm_word_t w0, w1, w2;

  initial begin
    D = {16{32'hC0FF_EE00}} ^ line_t'(A);
    for (int k = 0; k < NC; k++) begin
      cpu_req_valid[k] = 0; cpu_req_write[k] = 0; cpu_req_addr[k] = '0; cpu_req_wdata[k] = '0;
    end
    for (int r = 0; r < NR; r++) fail[r] = 0;
    repeat (4) @(negedge clk); rst_n = 1;

    access(0, 1, A, D, q);
    check(q == '0, "fresh line reads zero");
    check(n_rdone == LINES && n_wdone == 0, $sformatf("cold miss: %0d ABD reads", n_rdone));
    access(0, 0, 26'h000_0040, '0, q);         // another page: dirty write-back
    check(n_wdone == LINES, $sformatf("write-back: %0d ABD writes", n_wdone));
    check(n_rdone == 2 * LINES, "new page fetched");
    access(2, 0, A, '0, q);
    check(q == D, "other client reads the written line");
    w0 = g_scm[0].u_scm.peek(A);
    w1 = g_scm[1].u_scm.peek(A);
    w2 = g_scm[2].u_scm.peek(A);
    check(w0.value == D && w1.value == D && w2.value == D, "all replicas hold the line");
    check(w0.ts == w1.ts && w1.ts == w2.ts && w0.ts[CID_W-1:0] == 0 && w0.ts != 0,
          $sformatf("timestamp %0d issued by client 0", w0.ts));
    check(n_retry == 0, "no time-outs without failures");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
