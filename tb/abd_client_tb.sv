// abd_client_tb: self-checking test of the client memory controller.
//
// The testbench plays the host and the switch, with three request slots.
// It checks that host writes and reads become CLI_WRITE / CLI_READ messages
// with the client id, a {generation, slot} tag, the address and the data;
// that the host is held off once every slot is busy; that answers are taken
// in any order and reach the host with their address and data; that an
// answer with a stale generation is ignored; that an unanswered request is
// sent again, unchanged, exactly TIMEOUT+1 cycles after it left; that a
// reused slot gets the next generation; and that a message is held while
// the switch port is busy.
module abd_client_tb;
  import abd_pkg::*;

  localparam int unsigned TO = 40, CID = 6, NS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_req_valid = 0, host_req_ready, host_req_write = 0;
  laddr_t host_req_addr = '0; line_t host_req_wdata = '0;
  logic host_rsp_valid, host_rsp_write; laddr_t host_rsp_addr;
  line_t host_rsp_rdata; ts_t host_rsp_ts;
  logic tx_valid, tx_ready = 1; abd_msg_t tx_msg;
  logic rx_valid = 0; abd_msg_t rx_msg = '0;
  logic ev_retry;

  abd_client #(.CLIENT_ID(CID), .TIMEOUT(TO), .MAX_OUTSTANDING(NS)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, retries = 0;
  abd_msg_t txq [$]; int txt [$];
  int rsp_n = 0; line_t rsp_d; laddr_t rsp_a; logic rsp_w;

  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin txq.push_back(tx_msg); txt.push_back(cyc); end
    if (host_rsp_valid) begin
      rsp_n++; rsp_d = host_rsp_rdata; rsp_a = host_rsp_addr; rsp_w = host_rsp_write;
    end
    if (ev_retry) retries++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host(bit wr, laddr_t a, line_t d);
    @(negedge clk);
    host_req_valid = 1; host_req_write = wr; host_req_addr = a; host_req_wdata = d;
    @(posedge clk); while (!host_req_ready) @(posedge clk);
    @(negedge clk); host_req_valid = 0;
  endtask

  task automatic answer(msg_op_e op, tag_t tag, laddr_t a, line_t v);
    @(negedge clk);
    rx_valid = 1; rx_msg = '0; rx_msg.op = op; rx_msg.tag = tag; rx_msg.client = cid_t'(CID);
    rx_msg.addr = a; rx_msg.value = v; rx_msg.ts = 32'd77;
    @(negedge clk); rx_valid = 0;
  endtask

  abd_msg_t m [3], m2;
  int tsent [3];
  line_t D1, D2, D3;

  initial begin
    D1 = {8{64'hDEAD_BEEF_0000_0001}};
    D2 = {8{64'h0123_4567_89AB_CDEF}};
    D3 = {8{64'h5555_AAAA_5555_AAAA}};
    repeat (3) @(negedge clk); rst_n = 1;

    // three requests fill the three slots
    host(1, 26'h2A, D1);
    host(0, 26'h3B, '0);
    host(0, 26'h4C, '0);
    repeat (3) @(posedge clk); #1;
    check(txq.size() == 3, $sformatf("three messages sent (%0d)", txq.size()));
    for (int k = 0; k < 3 && txq.size() > 0; k++) begin
      m[k] = txq.pop_front(); tsent[k] = txt.pop_front();
    end
    check(m[0].op == MSG_CLI_WRITE && m[0].client == CID && m[0].addr == 26'h2A &&
          m[0].value == D1 && m[0].tag == 8'h00, "write message contents");
    check(m[1].op == MSG_CLI_READ && m[1].addr == 26'h3B && m[1].tag == 8'h01, "read in slot 1");
    check(m[2].op == MSG_CLI_READ && m[2].addr == 26'h4C && m[2].tag == 8'h02, "read in slot 2");
    check(!host_req_ready, "host held off with all slots busy");

    // out-of-order answer to slot 1
    answer(MSG_CLI_READ_RSP, m[1].tag, 26'h3B, D2);
    repeat (2) @(posedge clk); #1;
    check(rsp_n == 1 && rsp_d == D2 && rsp_a == 26'h3B && !rsp_w, "slot 1 answered first");
    check(host_req_ready, "freed slot accepts");
    // stale generation for slot 0
    answer(MSG_CLI_WRITE_ACK, m[0].tag + 8'h04, 26'h2A, '0);
    repeat (2) @(posedge clk); #1;
    check(rsp_n == 1, "stale-generation answer ignored");
    // a new request reuses slot 1 with the next generation
    host(1, 26'h5D, D3);
    repeat (3) @(posedge clk); #1;
    if (txq.size() > 0) begin
      m2 = txq.pop_front(); void'(txt.pop_front());
      check(m2.tag == 8'h05 && m2.addr == 26'h5D, $sformatf("reused slot tag %h", m2.tag));
    end else check(0, "reused slot sent nothing");

    // slots 0 and 2 time out and are re-sent unchanged
    while (cyc < tsent[2] + TO + 4) @(posedge clk);
    #1;
    check(retries == 2, $sformatf("two re-sends (%0d)", retries));
    if (txq.size() == 2) begin
      m2 = txq.pop_front();
      check(m2 == m[0], "slot 0 re-send is identical");
      check(txt.pop_front() - tsent[0] == TO + 1, "slot 0 re-sent after TIMEOUT+1 cycles");
      m2 = txq.pop_front();
      check(m2 == m[2], "slot 2 re-send is identical");
      check(txt.pop_front() - tsent[2] == TO + 1, "slot 2 re-sent after TIMEOUT+1 cycles");
    end else check(0, $sformatf("%0d re-sent messages", txq.size()));

    answer(MSG_CLI_WRITE_ACK, m[0].tag, 26'h2A, '0);
    answer(MSG_CLI_READ_RSP, m[2].tag, 26'h4C, D1);
    answer(MSG_CLI_WRITE_ACK, 8'h05, 26'h5D, '0);
    repeat (2) @(posedge clk); #1;
    check(rsp_n == 4 && rsp_w && rsp_a == 26'h5D, "all answered");
    check(host_rsp_ts == 32'd77, "timestamp passed to host");

    // tx back-pressure: request held until taken
    tx_ready = 0;
    host(1, 26'h6E, D2);
    repeat (5) @(posedge clk); #1;
    check(txq.size() == 0 && tx_valid, "held while switch port busy");
    tx_ready = 1;
    @(posedge clk); #1;
    check(txq.size() == 1, "taken when ready");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
