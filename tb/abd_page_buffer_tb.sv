// abd_page_buffer_tb: self-checking test of the client page buffer.
//
// The page buffer is connected to a memory model (an associative array of
// cache lines answering each request after a random few cycles, out of
// order). A reference model here keeps what every line must hold. The test checks: the first access
// misses and fetches the whole page (LINES reads, no writes); accesses to the
// buffered page hit and answer two cycles after they are taken, with no
// memory traffic; a miss on a dirty page writes every line of the old page
// back (every write acknowledged) before fetching the new one; a miss on a
// clean page writes nothing; line requests overlap and answers returning out
// of order land on the right lines; and every read returns the reference
// value. It ends with random traffic over three pages.
module abd_page_buffer_tb;
  import abd_pkg::*;

  localparam int unsigned PB = 512;                 // 8 lines, keeps the test short
  localparam int unsigned LINES = PB / LINE_BYTES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  laddr_t cpu_req_addr = '0; line_t cpu_req_wdata = '0;
  logic cpu_rsp_valid; line_t cpu_rsp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid = 0;
  laddr_t mem_req_addr, mem_rsp_addr = '0; line_t mem_req_wdata, mem_rsp_rdata = '0;
  logic ev_hit, ev_miss, ev_writeback;

  abd_page_buffer #(.PAGE_BYTES(PB)) dut (.*);

  // memory model: takes a request whenever ready (ready drops at random),
  // answers each after 2..9 cycles, one answer per cycle, in any order
  line_t  mem [laddr_t];
  int     n_rd = 0, n_wr = 0, cyc = 0, max_inflight = 0;
  laddr_t wb_addrs [$];
  laddr_t pa [$]; int pdue [$]; bit pw [$];
  int     early_fetch = 0;
  logic   rdy = 1;
  assign mem_req_ready = rdy;
  always @(negedge clk) cyc++;
  always @(posedge clk) begin
    int pick;
    mem_rsp_valid <= 1'b0;
    pick = -1;
    foreach (pdue[i]) if (pick < 0 && pdue[i] <= cyc && $urandom_range(1)) pick = i;
    if (pick >= 0) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_addr  <= pa[pick];
      mem_rsp_rdata <= mem.exists(pa[pick]) ? mem[pa[pick]] : line_t'(pa[pick]) * 3;
      pa.delete(pick); pdue.delete(pick); pw.delete(pick);
    end
    if (rst_n && mem_req_valid && rdy) begin
      if (mem_req_write) begin
        mem[mem_req_addr] = mem_req_wdata; n_wr++; wb_addrs.push_back(mem_req_addr);
      end else begin
        n_rd++;
        foreach (pw[i]) if (pw[i]) early_fetch++;
      end
      pw.push_back(mem_req_write);
      pa.push_back(mem_req_addr); pdue.push_back(cyc + 2 + $urandom_range(7));
    end
    if (pa.size() > max_inflight) max_inflight = pa.size();
    rdy <= ($urandom_range(4) != 0);
  end

  line_t ref_m [laddr_t];
  function automatic line_t refv(laddr_t a);
    return ref_m.exists(a) ? ref_m[a] : line_t'(a) * 3;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lat;
  task automatic access(bit wr, laddr_t a, line_t d);
    line_t exp_v;
    int t0;
    exp_v = refv(a);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_addr = a; cpu_req_wdata = d;
    @(posedge clk); while (!cpu_req_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk); cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(posedge clk);
    lat = cyc - t0;
    check(cpu_rsp_rdata == exp_v, $sformatf("data of line %h", a));
    if (wr) ref_m[a] = d;
  endtask

  int r0, w0;
  laddr_t a;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;

    // cold miss: whole page fetched, no write-back
    access(0, 26'h103, '0);
    check(n_rd == LINES && n_wr == 0, $sformatf("cold miss reads %0d writes %0d", n_rd, n_wr));
    // hits
    r0 = n_rd;
    access(1, 26'h101, line_t'(64'hAAAA));
    check(lat == 2, $sformatf("hit latency %0d", lat));
    access(0, 26'h101, '0);
    access(1, 26'h107, line_t'(64'hBBBB));
    check(n_rd == r0 && n_wr == 0, "hits make no memory traffic");
    // dirty miss: write back all lines of page 0x100, then fetch 0x208
    wb_addrs.delete();
    access(0, 26'h20A, '0);
    check(n_wr == LINES, $sformatf("dirty miss writes back %0d lines", n_wr));
    check(n_rd == r0 + LINES, "then fetches the new page");
    check(wb_addrs.size() == LINES && wb_addrs[0] == 26'h100 && wb_addrs[LINES-1] == 26'h107,
          "write-back covers the old page");
    check(mem[26'h101] == line_t'(64'hAAAA) && mem[26'h107] == line_t'(64'hBBBB),
          "written lines reached memory");
    // clean miss: no write-back
    w0 = n_wr;
    access(0, 26'h101, '0);
    check(n_wr == w0, "clean miss writes nothing back");

    // random traffic over three pages
    for (int k = 0; k < 200; k++) begin
      a = {LINE_ADDR_W'($urandom_range(2)) << $clog2(LINES)} | LINE_ADDR_W'($urandom_range(LINES-1)) | 26'h300;
      access($urandom_range(1), a, {16{$urandom()}});
    end

    check(early_fetch == 0, "no fetch while a write-back is unacknowledged");
    check(max_inflight > 1, $sformatf("transfers are pipelined (%0d in flight)", max_inflight));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
