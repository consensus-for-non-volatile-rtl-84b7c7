// abd_switch_tb: self-checking test of the ABD coordinator in the switch.
//
// The testbench plays three clients and three replicas around one switch and
// checks each message the switch emits against values worked out here:
//   - a write: GET_TS multicast to all replicas; after two (a majority of
//     three) timestamp answers the WRITE carries t = p*32 + client that is
//     larger than every answer; the third answer is dropped as stale; after
//     two ACKs the client gets CLI_WRITE_ACK with its own tag;
//   - a read: READ multicast; the write-back carries the (v,ts) with the
//     largest ts of the first two answers; after two ACKs the client gets v;
//   - a second write to the same line gets a timestamp above the first one;
//   - a request for a busy entry from another client (also through an
//     aliasing address), or another request of the owner, is dropped; a
//     re-send of the request in flight restarts the operation under a new
//     id and answers to the old id are dropped;
//   - a multicast group of two replicas needs both answers, and with two
//     groups the line address picks the group;
//   - every output appears exactly one cycle after its input is taken.
module abd_switch_tb;
  import abd_pkg::*;

  localparam int unsigned NC = 3, NR = 3, TE = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     cli_in_valid [NC];
  abd_msg_t cli_in_msg   [NC];
  logic     cli_in_ready [NC];
  logic     rep_in_valid [NR];
  abd_msg_t rep_in_msg   [NR];
  logic     rep_in_ready [NR];
  logic     rep_out_valid;
  abd_msg_t rep_out_msg;
  logic [NR-1:0] rep_out_mask;
  logic [NC-1:0] cli_out_valid;
  abd_msg_t cli_out_msg;
  logic     cfg_we = 0;
  logic [0:0] cfg_group = '0;
  logic [NR-1:0] cfg_mask = '1;
  logic ev_busy_drop, ev_restart, ev_stale_drop, ev_ts_quorum, ev_rd_quorum,
        ev_write_done, ev_read_done;

  abd_switch #(.NUM_CLIENTS(NC), .NUM_REPLICAS(NR), .TS_ENTRIES(TE), .NUM_GROUPS(1)) dut (.*);

  // second switch with two multicast groups: group = line address mod 2
  logic     g_cli_in_valid [NC];
  abd_msg_t g_cli_in_msg   [NC];
  logic     g_cli_in_ready [NC];
  logic     g_rep_in_valid [NR];
  abd_msg_t g_rep_in_msg   [NR];
  logic     g_rep_in_ready [NR];
  logic     g_rep_out_valid;
  abd_msg_t g_rep_out_msg;
  logic [NR-1:0] g_rep_out_mask;
  logic [NC-1:0] g_cli_out_valid;
  abd_msg_t g_cli_out_msg;
  logic     g_cfg_we = 0;
  logic [0:0] g_cfg_group = '0;
  logic [NR-1:0] g_cfg_mask = '1;
  logic [6:0] g_ev;
  abd_switch #(.NUM_CLIENTS(NC), .NUM_REPLICAS(NR), .TS_ENTRIES(TE), .NUM_GROUPS(2)) dut_g (
    .clk, .rst_n,
    .cli_in_valid(g_cli_in_valid), .cli_in_msg(g_cli_in_msg), .cli_in_ready(g_cli_in_ready),
    .rep_in_valid(g_rep_in_valid), .rep_in_msg(g_rep_in_msg), .rep_in_ready(g_rep_in_ready),
    .rep_out_valid(g_rep_out_valid), .rep_out_msg(g_rep_out_msg), .rep_out_mask(g_rep_out_mask),
    .cli_out_valid(g_cli_out_valid), .cli_out_msg(g_cli_out_msg),
    .cfg_we(g_cfg_we), .cfg_group(g_cfg_group), .cfg_mask(g_cfg_mask),
    .ev_busy_drop(g_ev[0]), .ev_restart(g_ev[1]), .ev_stale_drop(g_ev[2]), .ev_ts_quorum(g_ev[3]),
    .ev_rd_quorum(g_ev[4]), .ev_write_done(g_ev[5]), .ev_read_done(g_ev[6])
  );

  task automatic group_send(laddr_t a, logic [NR-1:0] exp_mask);
    @(negedge clk);
    g_cli_in_valid[0] = 1;
    g_cli_in_msg[0] = mk(MSG_CLI_READ, 0, int'(a), a, 0, '0, 0);
    @(posedge clk); #1;   // taken at this edge (sole requester), output registered
    check(g_rep_out_valid && g_rep_out_mask == exp_mask && g_rep_out_msg.addr == a,
          $sformatf("line %h goes to group mask %b", a, g_rep_out_mask));
    @(negedge clk); g_cli_in_valid[0] = 0;
  endtask

  int checks = 0, failures = 0;
  int n_busy = 0, n_restart = 0, n_stale = 0;
  int cyc = 0, t_in = 0;
  abd_msg_t rq [$]; int rq_t [$]; logic [NR-1:0] rq_mask [$];
  abd_msg_t cq [$]; int cq_t [$]; logic [NC-1:0] cq_port [$];

  always @(negedge clk) cyc++;   // stable across each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (rep_out_valid) begin rq.push_back(rep_out_msg); rq_t.push_back(cyc); rq_mask.push_back(rep_out_mask); end
      if (cli_out_valid != 0) begin cq.push_back(cli_out_msg); cq_t.push_back(cyc); cq_port.push_back(cli_out_valid); end
      if (ev_busy_drop) n_busy++;
      if (ev_restart) n_restart++;
      if (ev_stale_drop) n_stale++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic abd_msg_t mk(msg_op_e op, int client, int tag, laddr_t a, ts_t t, line_t v, int src);
    abd_msg_t m = '0;
    m.op = op; m.client = cid_t'(client); m.tag = tag_t'(tag); m.addr = a;
    m.ts = t; m.value = v; m.src = rid_t'(src);
    return m;
  endfunction

  // Present one message on a port until it is taken; remember the cycle.
  task automatic from_client(int k, abd_msg_t m);
    @(negedge clk); cli_in_valid[k] = 1; cli_in_msg[k] = m;
    @(posedge clk); while (!cli_in_ready[k]) @(posedge clk);
    t_in = cyc;
    @(negedge clk); cli_in_valid[k] = 0;
  endtask
  task automatic from_replica(int r, abd_msg_t m);
    @(negedge clk); rep_in_valid[r] = 1; rep_in_msg[r] = m;
    @(posedge clk); while (!rep_in_ready[r]) @(posedge clk);
    t_in = cyc;
    @(negedge clk); rep_in_valid[r] = 0;
  endtask

  task automatic expect_rep(output abd_msg_t m, input msg_op_e op, input logic [NR-1:0] mask, input string what);
    repeat (2) @(posedge clk); #1;
    if (rq.size() != 1) begin
      check(0, $sformatf("%s: %0d multicasts", what, rq.size()));
      m = '0; rq.delete(); rq_t.delete(); rq_mask.delete();
      return;
    end
    m = rq.pop_front();
    check(m.op == op && rq_mask.pop_front() == mask, $sformatf("%s: op %s", what, m.op.name()));
    check(rq_t.pop_front() == t_in + 1, $sformatf("%s: one-cycle latency", what));
  endtask

  task automatic expect_cli(output abd_msg_t m, input msg_op_e op, input int k, input string what);
    repeat (2) @(posedge clk); #1;
    if (cq.size() != 1) begin
      check(0, $sformatf("%s: %0d client answers", what, cq.size()));
      m = '0; cq.delete(); cq_t.delete(); cq_port.delete();
      return;
    end
    m = cq.pop_front();
    check(m.op == op && cq_port.pop_front() == NC'(1 << k), $sformatf("%s: op %s", what, m.op.name()));
    check(cq_t.pop_front() == t_in + 1, $sformatf("%s: one-cycle latency", what));
  endtask

  task automatic expect_none(string what);
    repeat (2) @(posedge clk); #1;
    check(rq.size() == 0 && cq.size() == 0, $sformatf("%s: nothing emitted", what));
    rq.delete(); rq_t.delete(); rq_mask.delete(); cq.delete(); cq_t.delete(); cq_port.delete();
  endtask

  abd_msg_t m, w;
  line_t V1, V2, V3;
  tag_t op_a, op_b;
  ts_t  t1, t2;

  initial begin
    for (int k = 0; k < NC; k++) begin cli_in_valid[k] = 0; cli_in_msg[k] = '0; end
    for (int r = 0; r < NR; r++) begin rep_in_valid[r] = 0; rep_in_msg[r] = '0; end
    for (int k = 0; k < NC; k++) begin g_cli_in_valid[k] = 0; g_cli_in_msg[k] = '0; end
    for (int r = 0; r < NR; r++) begin g_rep_in_valid[r] = 0; g_rep_in_msg[r] = '0; end
    V1 = {16{32'h1111_0001}}; V2 = {16{32'h2222_0002}}; V3 = {16{32'h3333_0003}};
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------------- write by client 1 ----------------
    from_client(1, mk(MSG_CLI_WRITE, 1, 7, 26'h40005, 0, V1, 0));
    expect_rep(m, MSG_GET_TS, 3'b111, "write phase 1");
    op_a = m.tag;
    check(m.addr == 26'h40005 && m.client == 1, "GET_TS address and client");
    from_replica(0, mk(MSG_TS_RSP, 1, op_a, 26'h40005, 32'd5, '0, 0));
    expect_none("first timestamp answer");
    from_replica(2, mk(MSG_TS_RSP, 1, op_a, 26'h40005, 32'd70, '0, 2));
    expect_rep(w, MSG_WRITE, 3'b111, "write phase 2");
    // smallest p*32+1 above 70 is 97
    t1 = w.ts;
    check(w.ts == 32'd97 && w.value == V1 && w.tag == op_a, $sformatf("chosen t=%0d value", w.ts));
    from_replica(1, mk(MSG_TS_RSP, 1, op_a, 26'h40005, 32'd900, '0, 1));
    expect_none("late timestamp answer");
    check(n_stale == 1, "late answer counted stale");
    from_replica(1, mk(MSG_WRITE_ACK, 1, op_a, 26'h40005, t1, '0, 1));
    expect_none("first ack");
    from_replica(0, mk(MSG_WRITE_ACK, 1, op_a, 26'h40005, t1, '0, 0));
    expect_cli(m, MSG_CLI_WRITE_ACK, 1, "write done");
    check(m.tag == 7 && m.ts == t1, "write ack carries client tag");
    from_replica(2, mk(MSG_WRITE_ACK, 1, op_a, 26'h40005, t1, '0, 2));
    expect_none("third ack after completion");

    // ---------------- read by client 2 ----------------
    from_client(2, mk(MSG_CLI_READ, 2, 3, 26'h40005, 0, '0, 0));
    expect_rep(m, MSG_READ, 3'b111, "read phase 1");
    op_b = m.tag;
    check(op_b != op_a, "new operation id");
    from_replica(2, mk(MSG_READ_RSP, 2, op_b, 26'h40005, t1, V1, 2));
    expect_none("first read answer");
    from_replica(0, mk(MSG_READ_RSP, 2, op_b, 26'h40005, 32'd33, V2, 0));
    expect_rep(w, MSG_WRITE, 3'b111, "read write-back");
    check(w.ts == t1 && w.value == V1, "write-back keeps the largest timestamp");
    from_replica(0, mk(MSG_WRITE_ACK, 2, op_b, 26'h40005, t1, '0, 0));
    expect_none("first write-back ack");
    from_replica(1, mk(MSG_WRITE_ACK, 2, op_b, 26'h40005, t1, '0, 1));
    expect_cli(m, MSG_CLI_READ_RSP, 2, "read done");
    check(m.value == V1 && m.tag == 3, "read returns the value");

    // ---------------- second write by client 0: t above the first ----------------
    from_client(0, mk(MSG_CLI_WRITE, 0, 9, 26'h40005, 0, V3, 0));
    expect_rep(m, MSG_GET_TS, 3'b111, "second write phase 1");
    op_a = m.tag;
    from_replica(0, mk(MSG_TS_RSP, 0, op_a, 26'h40005, 32'd2, '0, 0));
    expect_none("ts answer");
    from_replica(1, mk(MSG_TS_RSP, 0, op_a, 26'h40005, 32'd3, '0, 1));
    expect_rep(w, MSG_WRITE, 3'b111, "second write phase 2");
    // previous t=97 dominates the stale answers: next p*32+0 above 97 is 128
    t2 = w.ts;
    check(t2 == 32'd128, $sformatf("second t=%0d", t2));

    // ---------------- busy entry ----------------
    from_client(2, mk(MSG_CLI_READ, 2, 4, 26'h40005, 0, '0, 0));
    expect_none("other client on busy entry");
    from_client(2, mk(MSG_CLI_READ, 2, 4, 26'h40005 + TE, 0, '0, 0));
    expect_none("aliasing line on busy entry");
    from_client(0, mk(MSG_CLI_READ, 0, 10, 26'h40005, 0, '0, 0));
    expect_none("owner's other request on busy entry");
    check(n_busy == 3, $sformatf("busy drops %0d", n_busy));
    // owner re-sends: restart with a new id
    from_client(0, mk(MSG_CLI_WRITE, 0, 9, 26'h40005, 0, V3, 0));
    expect_rep(m, MSG_GET_TS, 3'b111, "restart");
    check(m.tag != op_a && n_restart == 1, "restart under a new id");
    from_replica(0, mk(MSG_WRITE_ACK, 0, op_a, 26'h40005, t2, '0, 0));
    from_replica(1, mk(MSG_WRITE_ACK, 0, op_a, 26'h40005, t2, '0, 1));
    expect_none("answers to the aborted operation");
    op_a = m.tag;
    from_replica(1, mk(MSG_TS_RSP, 0, op_a, 26'h40005, 32'd128, '0, 1));
    from_replica(2, mk(MSG_TS_RSP, 0, op_a, 26'h40005, 32'd97, '0, 2));
    expect_rep(w, MSG_WRITE, 3'b111, "restarted phase 2");
    check(w.ts == 32'd160 && w.value == V3, $sformatf("restarted t=%0d", w.ts));
    from_replica(2, mk(MSG_WRITE_ACK, 0, op_a, 26'h40005, w.ts, '0, 2));
    from_replica(1, mk(MSG_WRITE_ACK, 0, op_a, 26'h40005, w.ts, '0, 1));
    expect_cli(m, MSG_CLI_WRITE_ACK, 0, "restarted write done");

    // ---------------- group of two replicas ----------------
    @(negedge clk); cfg_we = 1; cfg_mask = 3'b011; @(negedge clk); cfg_we = 0;
    from_client(1, mk(MSG_CLI_READ, 1, 11, 26'h00012, 0, '0, 0));
    expect_rep(m, MSG_READ, 3'b011, "two-replica group");
    op_b = m.tag;
    from_replica(0, mk(MSG_READ_RSP, 1, op_b, 26'h00012, 32'd0, '0, 0));
    expect_none("one of two answers is no majority");
    from_replica(1, mk(MSG_READ_RSP, 1, op_b, 26'h00012, 32'd0, '0, 1));
    expect_rep(w, MSG_WRITE, 3'b011, "two of two answers");

    // ---------------- two multicast groups ----------------
    @(negedge clk); g_cfg_we = 1; g_cfg_group = 1'b0; g_cfg_mask = 3'b011;
    @(negedge clk); g_cfg_group = 1'b1; g_cfg_mask = 3'b110;
    @(negedge clk); g_cfg_we = 0;
    group_send(26'h00020, 3'b011);
    group_send(26'h00031, 3'b110);

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
