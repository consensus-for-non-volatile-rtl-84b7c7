// abd_replica: the server side of ABD at one storage-class memory instance.
//
// Each cache line of the memory holds a value and its ABD timestamp. The
// replica answers the switch's messages one at a time:
//   GET_TS      -> TS_RSP carrying the stored timestamp ts_k
//   READ        -> READ_RSP carrying the stored (v_k, ts_k)
//   WRITE(v,t)  -> if t > ts_k the line becomes (v,t); WRITE_ACK either way
// The unconditional acknowledgement is needed for progress: the write-back
// of a read usually carries a timestamp equal to the one already stored.
// Responses echo the operation id (tag), client and address and carry this
// replica's id in src.
//
// Messages arrive through an input FIFO of FIFO_DEPTH entries; a message
// that finds it full is dropped and pulses ev_drop, as a network port would.
// While fail is high the replica behaves as a crashed server: it drops its
// queue and all input and sends nothing.
//
// Memory port (to the SCM device): a request is taken when scm_req_valid and
// scm_req_ready are both high; a read returns its word on scm_rsp_valid any
// number of cycles later, writes return nothing. One read is outstanding at
// a time. Response port: out_valid holds out_msg until out_ready.
//
// Timing per message: one cycle to dequeue, the read handshake, the memory
// latency, one cycle to decide, an optional write handshake, then the
// response handshake. The sequential one-message-at-a-time service and the
// memory port protocol are this design's choices.
module abd_replica
  import abd_pkg::*;
#(
  parameter int unsigned REPLICA_ID = 0,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fail,
  // from the switch
  input  logic      in_valid,
  input  abd_msg_t  in_msg,
  // to the switch
  output logic      out_valid,
  output abd_msg_t  out_msg,
  input  logic      out_ready,
  // storage-class memory port
  output logic      scm_req_valid,
  input  logic      scm_req_ready,
  output logic      scm_req_write,
  output laddr_t    scm_req_addr,
  output scm_word_t scm_req_wdata,
  input  logic      scm_rsp_valid,
  input  scm_word_t scm_rsp_rdata,
  // event pulses
  output logic      ev_drop,
  output logic      ev_update
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_WAIT, S_DECIDE, S_WR, S_RSP} state_e;

  state_e    st_q;
  abd_msg_t  cur_q, head;
  scm_word_t word_q;
  logic      full, empty, pop, accept;

  // only the messages a replica serves are queued
  assign accept = in_valid && !fail &&
                  (in_msg.op == MSG_GET_TS || in_msg.op == MSG_READ || in_msg.op == MSG_WRITE);

  abd_fifo #(.T(abd_msg_t), .DEPTH(FIFO_DEPTH)) u_q (
    .clk, .rst_n, .flush(fail), .push(accept), .din(in_msg),
    .pop, .dout(head), .full, .empty
  );

  assign pop = (st_q == S_IDLE) && !empty && !fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_drop   <= 1'b0;
      ev_update <= 1'b0;
    end else begin
      ev_drop   <= (in_valid && fail) || (accept && full);
      ev_update <= (st_q == S_DECIDE) && !fail && cur_q.op == MSG_WRITE && cur_q.ts > word_q.ts;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
    end else if (fail) begin
      st_q <= S_IDLE;
    end else begin
      unique case (st_q)
        S_IDLE:   if (!empty) st_q <= S_RD;
        S_RD:     if (scm_req_ready) st_q <= S_WAIT;
        S_WAIT:   if (scm_rsp_valid) st_q <= S_DECIDE;
        S_DECIDE: st_q <= (cur_q.op == MSG_WRITE && cur_q.ts > word_q.ts) ? S_WR : S_RSP;
        S_WR:     if (scm_req_ready) st_q <= S_RSP;
        S_RSP:    if (out_ready) st_q <= S_IDLE;
        default:  st_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (pop) cur_q <= head;
    if (st_q == S_WAIT && scm_rsp_valid) word_q <= scm_rsp_rdata;
    if (st_q == S_DECIDE) begin
      out_msg        <= cur_q;
      out_msg.src    <= rid_t'(REPLICA_ID);
      unique case (cur_q.op)
        MSG_GET_TS: begin
          out_msg.op    <= MSG_TS_RSP;
          out_msg.ts    <= word_q.ts;
          out_msg.value <= '0;
        end
        MSG_READ: begin
          out_msg.op    <= MSG_READ_RSP;
          out_msg.ts    <= word_q.ts;
          out_msg.value <= word_q.value;
        end
        default: begin
          out_msg.op    <= MSG_WRITE_ACK;
          out_msg.value <= '0;
        end
      endcase
    end
  end

  assign out_valid     = (st_q == S_RSP) && !fail;
  assign scm_req_valid = (st_q == S_RD || st_q == S_WR) && !fail;
  assign scm_req_write = (st_q == S_WR);
  assign scm_req_addr  = cur_q.addr;
  assign scm_req_wdata = '{ts: cur_q.ts, value: cur_q.value};

  // A response is held until the switch takes it.
  assert property (@(posedge clk) disable iff (!rst_n || fail)
                   out_valid && !out_ready |=> out_valid && $stable(out_msg));

endmodule
