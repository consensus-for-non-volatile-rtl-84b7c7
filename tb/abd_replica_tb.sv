// abd_replica_tb: self-checking test of the ABD replica server.
//
// One replica in front of a storage-class memory model. The test sends the
// three message kinds and checks every answer against values worked out
// here: a fresh line reads as timestamp 0; a write with a larger timestamp
// is stored, one with a smaller or equal timestamp is acknowledged but
// ignored; reads return (value, timestamp); tags, address, client and the
// replica id are echoed. It then checks the crash input (no answer, drop
// pulses) and the overflow of the input queue (exactly the messages that
// fit are answered, in order), and the service time of one message.
module abd_replica_tb;
  import abd_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned RID   = 5;

  logic clk = 0, rst_n = 0, fail = 0;
  always #5 clk = ~clk;

  logic in_valid = 0; abd_msg_t in_msg = '0;
  logic out_valid, out_ready = 1; abd_msg_t out_msg;
  logic scm_req_valid, scm_req_ready, scm_req_write, scm_rsp_valid;
  laddr_t scm_req_addr; scm_word_t scm_req_wdata, scm_rsp_rdata;
  logic ev_drop, ev_update;

  abd_replica #(.REPLICA_ID(RID), .FIFO_DEPTH(DEPTH)) dut (.*);

  scm_model #(.LATENCY(3)) u_scm (
    .clk, .req_valid(scm_req_valid), .req_ready(scm_req_ready), .req_write(scm_req_write),
    .req_addr(scm_req_addr), .req_wdata(scm_req_wdata),
    .rsp_valid(scm_rsp_valid), .rsp_rdata(scm_rsp_rdata)
  );

  int checks = 0, failures = 0, drops = 0, updates = 0;
  abd_msg_t rq [$];
  always @(posedge clk) begin
    if (out_valid && out_ready && rst_n) rq.push_back(out_msg);
    if (ev_drop && rst_n) drops++;
    if (ev_update && rst_n) updates++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic abd_msg_t mk(msg_op_e op, laddr_t a, ts_t t, line_t v, tag_t tag);
    abd_msg_t m = '0;
    m.op = op; m.addr = a; m.ts = t; m.value = v; m.tag = tag; m.client = cid_t'(3);
    return m;
  endfunction

  task automatic send(abd_msg_t m);
    @(negedge clk); in_valid = 1; in_msg = m;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic get(output abd_msg_t m, output int cyc);
    cyc = 0;
    while (rq.size() == 0 && cyc < 200) begin @(posedge clk); cyc++; end
    #1;
    if (rq.size() == 0) begin m = '0; check(0, "no response"); end
    else m = rq.pop_front();
  endtask

  abd_msg_t r; int cyc; scm_word_t w;
  line_t X, Y;

  initial begin
    X = {16{32'hA5A5_0001}};
    Y = {16{32'h5A5A_0002}};
    repeat (3) @(negedge clk); rst_n = 1;

    // fresh line: timestamp 0
    send(mk(MSG_GET_TS, 26'h123, 0, '0, 8'd1)); get(r, cyc);
    check(r.op == MSG_TS_RSP && r.ts == 0 && r.tag == 1 && r.addr == 26'h123 &&
          r.src == rid_t'(RID) && r.client == 3, "GET_TS on a fresh line");
    // one message: dequeue, read handshake, memory latency, decide, respond
    check(cyc <= 8, $sformatf("GET_TS service time %0d cycles", cyc));

    // write with larger timestamp: stored
    send(mk(MSG_WRITE, 26'h123, 33, X, 8'd2)); get(r, cyc);
    check(r.op == MSG_WRITE_ACK && r.tag == 2 && r.ts == 33, "WRITE ack");
    w = u_scm.peek(26'h123);
    check(w.ts == 33 && w.value == X, "WRITE stored");

    send(mk(MSG_GET_TS, 26'h123, 0, '0, 8'd3)); get(r, cyc);
    check(r.op == MSG_TS_RSP && r.ts == 33, "GET_TS after write");

    // smaller timestamp: acknowledged, ignored
    send(mk(MSG_WRITE, 26'h123, 20, Y, 8'd4)); get(r, cyc);
    check(r.op == MSG_WRITE_ACK && r.tag == 4, "old WRITE still acknowledged");
    // equal timestamp: acknowledged, ignored
    send(mk(MSG_WRITE, 26'h123, 33, Y, 8'd5)); get(r, cyc);
    check(r.op == MSG_WRITE_ACK && r.tag == 5, "equal-ts WRITE acknowledged");

    send(mk(MSG_READ, 26'h123, 0, '0, 8'd6)); get(r, cyc);
    check(r.op == MSG_READ_RSP && r.ts == 33 && r.value == X, "READ returns newest (v,ts)");
    check(updates == 1, $sformatf("exactly one update, saw %0d", updates));

    // newer write replaces
    send(mk(MSG_WRITE, 26'h123, 65, Y, 8'd7)); get(r, cyc);
    send(mk(MSG_READ, 26'h123, 0, '0, 8'd8)); get(r, cyc);
    check(r.ts == 65 && r.value == Y, "newer write replaces");

    // crash: no answer
    fail = 1;
    send(mk(MSG_READ, 26'h123, 0, '0, 8'd9));
    repeat (20) @(posedge clk);
    check(rq.size() == 0, "failed replica is silent");
    check(drops == 1, $sformatf("drop pulse while failed, saw %0d", drops));
    fail = 0; drops = 0;

    // queue overflow with the response port blocked
    out_ready = 0;
    @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      in_valid = 1; in_msg = mk(MSG_GET_TS, 26'(k), 0, '0, tag_t'(100 + k));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(drops == 20 - (DEPTH + 1), $sformatf("overflow drops %0d", drops));
    out_ready = 1;
    repeat (400) @(posedge clk);
    check(rq.size() == DEPTH + 1, $sformatf("answers after overflow %0d", rq.size()));
    for (int k = 0; k < DEPTH + 1 && rq.size() > 0; k++) begin
      r = rq.pop_front();
      check(r.tag == tag_t'(100 + k), "answers in order");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
