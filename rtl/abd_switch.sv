// abd_switch: the in-network ABD coordinator of the programmable switch.
//
// Clients send plain cache-line reads and writes; the switch runs both phases
// of the ABD protocol with the replica set on their behalf, so the clients
// need no knowledge of replication.
//   write: GET_TS to all replicas -> on a majority of TS_RSP choose
//          t = p*M + i larger than every ts_j seen and the last t chosen
//          for this entry -> WRITE(v,t) to all -> on a majority of ACKs
//          answer the client with CLI_WRITE_ACK.
//   read:  READ to all -> on a majority of READ_RSP keep the (v,ts) with
//          the largest ts -> write it back with WRITE(v,ts) -> on a
//          majority of ACKs answer the client with CLI_READ_RSP(v).
//
// State. The switch holds TS_ENTRIES entries; a cache line uses entry
// (line address mod TS_ENTRIES), i.e. one timestamp per block of cache
// lines. An entry keeps the operation in flight (owner client, its tag, line
// address, phase, an operation id), the value buffer of the line and the
// timestamps. Four separate arrays of 8-bit counters count the timestamp
// and write quorums of a write and the read and write-back quorums of a
// read, as in the paper's switch program. Busy and seen bits are reset; the
// data arrays are not, so they can be built as memories.
//
// Messages to replicas go out as one multicast: rep_out_mask is the port
// mask of the replica group the line belongs to, taken from the multicast
// group table (group = line address mod NUM_GROUPS; all replicas after
// reset, rewritable through cfg_*). Client answers go out on the port of the
// client (cli_out_valid is one-hot). Outputs never stall: like a switch, it
// forwards and the receivers drop what they cannot hold; lost messages are
// recovered by the client's time-out and re-send.
//
// A request for an entry that is busy with another client's operation is
// dropped (the client re-sends after its time-out). A request from the
// owner of a busy entry restarts the operation under a new operation id.
// Responses whose id, address or phase do not match the entry are stale and
// dropped, which also discards the responses that arrive after a quorum.
//
// Timing: one input message is accepted per cycle (round-robin over all
// client and replica ports), its entry is read, updated and written in the
// same cycle, and the resulting messages appear on the registered outputs
// the next cycle.
//
// Own choices: the entry sharing and busy rule, the operation id, the one
// message per cycle rate, and the ack-count quorum (each replica answers a
// message once, so counting answers counts distinct replicas).
module abd_switch
  import abd_pkg::*;
#(
  parameter int unsigned NUM_CLIENTS  = 3,
  parameter int unsigned NUM_REPLICAS = 3,
  parameter int unsigned TS_ENTRIES   = 16384,
  parameter int unsigned NUM_GROUPS   = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from clients
  input  logic                    cli_in_valid [NUM_CLIENTS],
  input  abd_msg_t                cli_in_msg   [NUM_CLIENTS],
  output logic                    cli_in_ready [NUM_CLIENTS],
  // from replicas
  input  logic                    rep_in_valid [NUM_REPLICAS],
  input  abd_msg_t                rep_in_msg   [NUM_REPLICAS],
  output logic                    rep_in_ready [NUM_REPLICAS],
  // multicast to replicas
  output logic                    rep_out_valid,
  output abd_msg_t                rep_out_msg,
  output logic [NUM_REPLICAS-1:0] rep_out_mask,
  // to clients
  output logic [NUM_CLIENTS-1:0]  cli_out_valid,
  output abd_msg_t                cli_out_msg,
  // multicast group table
  input  logic                    cfg_we,
  input  logic [$clog2(NUM_GROUPS > 1 ? NUM_GROUPS : 2)-1:0] cfg_group,
  input  logic [NUM_REPLICAS-1:0] cfg_mask,
  // one-cycle event pulses
  output logic                    ev_busy_drop,
  output logic                    ev_restart,
  output logic                    ev_stale_drop,
  output logic                    ev_ts_quorum,
  output logic                    ev_rd_quorum,
  output logic                    ev_write_done,
  output logic                    ev_read_done
);
  localparam int unsigned P    = NUM_CLIENTS + NUM_REPLICAS;
  localparam int unsigned IDXW = $clog2(TS_ENTRIES);
  localparam int unsigned GW   = $clog2(NUM_GROUPS > 1 ? NUM_GROUPS : 2);

  typedef enum logic [1:0] {PH_TS, PH_WR, PH_RD, PH_WB} phase_e;

  typedef struct packed {
    phase_e phase;
    tag_t   opid;
    cid_t   client;
    tag_t   ctag;
    laddr_t addr;
    ts_t    tsmax;   // phase 1: largest ts seen; phase 2: the t in use
    ts_t    last_t;  // last timestamp chosen by a write at this entry
  } entry_t;

  // ---------------- state ----------------
  entry_t            ent   [TS_ENTRIES];
  line_t             vbuf  [TS_ENTRIES];
  logic [QCNT_W-1:0] q_ts  [TS_ENTRIES];  // write: timestamp quorum
  logic [QCNT_W-1:0] q_wr  [TS_ENTRIES];  // write: write quorum
  logic [QCNT_W-1:0] q_rd  [TS_ENTRIES];  // read: read quorum
  logic [QCNT_W-1:0] q_wb  [TS_ENTRIES];  // read: write-back quorum
  logic [TS_ENTRIES-1:0] busy_q, seen_q;
  logic [NUM_REPLICAS-1:0] grp_mask [NUM_GROUPS];

  // ---------------- input arbitration ----------------
  logic [P-1:0]            req, grant;
  logic [$clog2(P)-1:0]    grant_idx;
  abd_msg_t                in_msg [P];

  always_comb begin
    for (int unsigned k = 0; k < NUM_CLIENTS; k++) begin
      req[k]    = cli_in_valid[k];
      in_msg[k] = cli_in_msg[k];
    end
    for (int unsigned k = 0; k < NUM_REPLICAS; k++) begin
      req[NUM_CLIENTS+k]    = rep_in_valid[k];
      in_msg[NUM_CLIENTS+k] = rep_in_msg[k];
    end
  end

  abd_rr_arbiter #(.N(P)) u_arb (
    .clk, .rst_n, .req, .advance(1'b1), .grant, .grant_idx
  );

  always_comb begin
    for (int unsigned k = 0; k < NUM_CLIENTS; k++)  cli_in_ready[k] = grant[k];
    for (int unsigned k = 0; k < NUM_REPLICAS; k++) rep_in_ready[k] = grant[NUM_CLIENTS+k];
  end

  // ---------------- processing ----------------
  logic               sel_v;
  abd_msg_t           m;
  logic [IDXW-1:0]    e;
  logic [GW-1:0]      g;
  logic [NUM_REPLICAS-1:0] gmask;
  logic [QCNT_W-1:0]  quorum;
  entry_t             cur, nxt;
  line_t              vcur, vnxt;
  logic               we, busy_n, seen_n;
  logic [QCNT_W-1:0]  qts_n, qwr_n, qrd_n, qwb_n, cnt;
  ts_t                floor_t, t_new;
  logic               match;

  logic               rep_v_n;
  abd_msg_t           rep_m_n;
  logic [NUM_CLIENTS-1:0] cli_v_n;
  abd_msg_t           cli_m_n;
  logic ev_busy_n, ev_restart_n, ev_stale_n, ev_tsq_n, ev_rdq_n, ev_wd_n, ev_rd_n;

  assign sel_v = |grant;
  assign m     = in_msg[grant_idx];
  assign e     = m.addr[IDXW-1:0];
  assign g     = GW'(m.addr % NUM_GROUPS);
  assign gmask = grp_mask[g];
  assign quorum = majority(16'(gmask));
  assign cur   = ent[e];
  assign vcur  = vbuf[e];

  always_comb begin
    nxt    = cur;
    vnxt   = vcur;
    busy_n = busy_q[e];
    seen_n = seen_q[e];
    qts_n  = q_ts[e];
    qwr_n  = q_wr[e];
    qrd_n  = q_rd[e];
    qwb_n  = q_wb[e];
    we     = 1'b0;
    cnt    = '0;
    floor_t = '0;
    t_new  = '0;
    rep_v_n = 1'b0;
    rep_m_n = '0;
    cli_v_n = '0;
    cli_m_n = '0;
    {ev_busy_n, ev_restart_n, ev_stale_n, ev_tsq_n, ev_rdq_n, ev_wd_n, ev_rd_n} = '0;
    match = busy_q[e] && (m.tag == cur.opid) && (m.addr == cur.addr);

    if (sel_v) begin
      unique case (m.op)
        MSG_CLI_READ, MSG_CLI_WRITE: begin
          if (busy_q[e] && !(cur.client == m.client && cur.ctag == m.tag)) begin
            ev_busy_n = 1'b1;
          end else begin
            ev_restart_n = busy_q[e];
            we          = 1'b1;
            busy_n      = 1'b1;
            nxt.opid    = cur.opid + tag_t'(1);
            nxt.client  = m.client;
            nxt.ctag    = m.tag;
            nxt.addr    = m.addr;
            nxt.tsmax   = '0;
            nxt.phase   = (m.op == MSG_CLI_WRITE) ? PH_TS : PH_RD;
            vnxt        = m.value;
            qts_n = '0; qwr_n = '0; qrd_n = '0; qwb_n = '0;
            rep_v_n        = 1'b1;
            rep_m_n.op     = (m.op == MSG_CLI_WRITE) ? MSG_GET_TS : MSG_READ;
            rep_m_n.client = m.client;
            rep_m_n.tag    = cur.opid + tag_t'(1);
            rep_m_n.addr   = m.addr;
          end
        end

        MSG_TS_RSP: begin
          if (match && cur.phase == PH_TS) begin
            we        = 1'b1;
            cnt       = q_ts[e] + QCNT_W'(1);
            qts_n     = cnt;
            if (m.ts > cur.tsmax) nxt.tsmax = m.ts;
            if (cnt == quorum) begin
              // t greater than every ts_j received and the previous t
              floor_t    = (seen_q[e] && cur.last_t > nxt.tsmax) ? cur.last_t : nxt.tsmax;
              t_new      = next_ts(floor_t, cur.client);
              nxt.last_t = t_new;
              nxt.tsmax  = t_new;
              seen_n     = 1'b1;
              nxt.phase  = PH_WR;
              qwr_n      = '0;
              ev_tsq_n   = 1'b1;
              rep_v_n        = 1'b1;
              rep_m_n.op     = MSG_WRITE;
              rep_m_n.client = cur.client;
              rep_m_n.tag    = cur.opid;
              rep_m_n.addr   = cur.addr;
              rep_m_n.ts     = t_new;
              rep_m_n.value  = vcur;
            end
          end else begin
            ev_stale_n = 1'b1;
          end
        end

        MSG_READ_RSP: begin
          if (match && cur.phase == PH_RD) begin
            we    = 1'b1;
            cnt   = q_rd[e] + QCNT_W'(1);
            qrd_n = cnt;
            if (q_rd[e] == '0 || m.ts > cur.tsmax) begin
              nxt.tsmax = m.ts;
              vnxt      = m.value;
            end
            if (cnt == quorum) begin
              nxt.phase  = PH_WB;
              qwb_n      = '0;
              ev_rdq_n   = 1'b1;
              rep_v_n        = 1'b1;
              rep_m_n.op     = MSG_WRITE;
              rep_m_n.client = cur.client;
              rep_m_n.tag    = cur.opid;
              rep_m_n.addr   = cur.addr;
              rep_m_n.ts     = nxt.tsmax;
              rep_m_n.value  = vnxt;
            end
          end else begin
            ev_stale_n = 1'b1;
          end
        end

        MSG_WRITE_ACK: begin
          if (match && (cur.phase == PH_WR || cur.phase == PH_WB)) begin
            we = 1'b1;
            if (cur.phase == PH_WR) begin
              cnt   = q_wr[e] + QCNT_W'(1);
              qwr_n = cnt;
            end else begin
              cnt   = q_wb[e] + QCNT_W'(1);
              qwb_n = cnt;
            end
            if (cnt == quorum) begin
              busy_n = 1'b0;
              cli_v_n[int'(cur.client) % NUM_CLIENTS] = 1'b1;
              cli_m_n.op     = (cur.phase == PH_WR) ? MSG_CLI_WRITE_ACK : MSG_CLI_READ_RSP;
              cli_m_n.client = cur.client;
              cli_m_n.tag    = cur.ctag;
              cli_m_n.addr   = cur.addr;
              cli_m_n.ts     = cur.tsmax;
              cli_m_n.value  = (cur.phase == PH_WB) ? vcur : '0;
              ev_wd_n = (cur.phase == PH_WR);
              ev_rd_n = (cur.phase == PH_WB);
            end
          end else begin
            ev_stale_n = 1'b1;
          end
        end

        default: ev_stale_n = 1'b1;   // not a message the switch consumes
      endcase
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk) begin
    if (we) begin
      ent[e]  <= nxt;
      vbuf[e] <= vnxt;
      q_ts[e] <= qts_n;
      q_wr[e] <= qwr_n;
      q_rd[e] <= qrd_n;
      q_wb[e] <= qwb_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      seen_q <= '0;
      for (int unsigned k = 0; k < NUM_GROUPS; k++) grp_mask[k] <= '1;
    end else begin
      if (we) begin
        busy_q[e] <= busy_n;
        seen_q[e] <= seen_n;
      end
      if (cfg_we) grp_mask[cfg_group] <= cfg_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_out_valid <= 1'b0;
      cli_out_valid <= '0;
      {ev_busy_drop, ev_restart, ev_stale_drop, ev_ts_quorum, ev_rd_quorum,
       ev_write_done, ev_read_done} <= '0;
    end else begin
      rep_out_valid <= rep_v_n;
      cli_out_valid <= cli_v_n;
      {ev_busy_drop, ev_restart, ev_stale_drop, ev_ts_quorum, ev_rd_quorum,
       ev_write_done, ev_read_done} <=
        {ev_busy_n, ev_restart_n, ev_stale_n, ev_tsq_n, ev_rdq_n, ev_wd_n, ev_rd_n};
    end
  end

  always_ff @(posedge clk) begin
    rep_out_msg  <= rep_m_n;
    rep_out_mask <= gmask;
    cli_out_msg  <= cli_m_n;
  end

  // A multicast always names at least one replica; a client answer one port.
  assert property (@(posedge clk) disable iff (!rst_n) rep_out_valid |-> (rep_out_mask != '0));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cli_out_valid));

endmodule
