// abd_client: client memory controller for replicated storage-class memory.
//
// The controller knows nothing of replication: it turns a host read or write
// of one 64-byte cache line into a single CLI_READ or CLI_WRITE message to the
// switch and waits for the matching CLI_READ_RSP or CLI_WRITE_ACK. Up to
// MAX_OUTSTANDING requests (10 by default, the concurrency the paper sizes
// the switch for) are in flight at once, each in a slot of its own. The tag
// of a request is {generation, slot}: the slot finds the request when an
// answer arrives, the generation (incremented each time the slot is reused)
// tells an answer to an earlier occupant apart, and such answers are ignored.
// Messages can be lost in the network, so when a slot gets no answer within
// TIMEOUT cycles its identical request is sent again, TIMEOUT+1 cycles after
// the last send (ev_retry pulses).
//
// Host side: a request is taken when host_req_valid and host_req_ready are
// both high; ready is high while a slot is free. Answers come in the order
// the switch completes them, as a one-cycle host_rsp_valid pulse with the
// line address, the read data (zero for a write), the timestamp the line got
// and whether it was a write.
// Network side: tx_valid holds tx_msg until tx_ready; the lowest-numbered
// slot waiting to send goes first. rx_valid is a one-cycle message from the
// switch, always accepted.
//
// The request/response format, the slot and tag scheme and the TIMEOUT
// value are this design's choices; the re-send on time-out follows the
// protocol's rule for lost packets.
module abd_client
  import abd_pkg::*;
#(
  parameter int unsigned CLIENT_ID       = 0,
  parameter int unsigned TIMEOUT         = 4096,
  parameter int unsigned MAX_OUTSTANDING = 10
) (
  input  logic     clk,
  input  logic     rst_n,
  // host
  input  logic     host_req_valid,
  output logic     host_req_ready,
  input  logic     host_req_write,
  input  laddr_t   host_req_addr,
  input  line_t    host_req_wdata,
  output logic     host_rsp_valid,
  output logic     host_rsp_write,
  output laddr_t   host_rsp_addr,
  output line_t    host_rsp_rdata,
  output ts_t      host_rsp_ts,
  // network
  output logic     tx_valid,
  output abd_msg_t tx_msg,
  input  logic     tx_ready,
  input  logic     rx_valid,
  input  abd_msg_t rx_msg,
  // event pulse
  output logic     ev_retry
);
  localparam int unsigned NS = MAX_OUTSTANDING;
  localparam int unsigned SW = $clog2(NS > 1 ? NS : 2);   // slot bits of a tag
  localparam int unsigned GW = TAG_W - SW;                // generation bits
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  typedef enum logic [1:0] {SL_FREE, SL_SEND, SL_WAIT} slot_e;

  slot_e         st_q    [NS];
  abd_msg_t      req_q   [NS];
  logic [GW-1:0] gen_q   [NS];
  logic [TW-1:0] timer_q [NS];

  // free slot for a new host request, slot to send next
  logic          have_free, have_send;
  logic [SW-1:0] free_idx, send_idx;
  always_comb begin
    have_free = 1'b0; free_idx = '0;
    have_send = 1'b0; send_idx = '0;
    for (int k = NS - 1; k >= 0; k--) begin
      if (st_q[k] == SL_FREE) begin have_free = 1'b1; free_idx = SW'(k); end
      if (st_q[k] == SL_SEND) begin have_send = 1'b1; send_idx = SW'(k); end
    end
  end

  assign host_req_ready = have_free;
  assign tx_valid       = have_send;
  assign tx_msg         = req_q[send_idx];

  // answer matching
  logic [SW-1:0] rx_slot;
  logic          answer;
  assign rx_slot = rx_msg.tag[SW-1:0];
  assign answer  = rx_valid && rx_msg.client == cid_t'(CLIENT_ID) &&
                   int'(rx_slot) < NS && st_q[rx_slot] == SL_WAIT &&
                   rx_msg.tag == req_q[rx_slot].tag &&
                   ((req_q[rx_slot].op == MSG_CLI_WRITE && rx_msg.op == MSG_CLI_WRITE_ACK) ||
                    (req_q[rx_slot].op == MSG_CLI_READ  && rx_msg.op == MSG_CLI_READ_RSP));

  logic take;
  assign take = host_req_valid && have_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) begin
        st_q[k]    <= SL_FREE;
        gen_q[k]   <= '0;
        timer_q[k] <= '0;
      end
      host_rsp_valid <= 1'b0;
      ev_retry       <= 1'b0;
    end else begin
      host_rsp_valid <= answer;
      ev_retry       <= 1'b0;
      for (int k = 0; k < NS; k++) begin
        unique case (st_q[k])
          SL_FREE: if (take && free_idx == SW'(k)) st_q[k] <= SL_SEND;
          SL_SEND: if (tx_ready && send_idx == SW'(k)) begin
            st_q[k]    <= SL_WAIT;
            timer_q[k] <= '0;
          end
          SL_WAIT: begin
            if (answer && rx_slot == SW'(k)) begin
              st_q[k]  <= SL_FREE;
              gen_q[k] <= gen_q[k] + GW'(1);
            end else if (timer_q[k] == TW'(TIMEOUT - 1)) begin
              st_q[k]  <= SL_SEND;
              ev_retry <= 1'b1;
            end else begin
              timer_q[k] <= timer_q[k] + TW'(1);
            end
          end
          default: st_q[k] <= SL_FREE;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      req_q[free_idx]        <= '0;
      req_q[free_idx].op     <= host_req_write ? MSG_CLI_WRITE : MSG_CLI_READ;
      req_q[free_idx].client <= cid_t'(CLIENT_ID);
      req_q[free_idx].tag    <= {gen_q[free_idx], free_idx};
      req_q[free_idx].addr   <= host_req_addr;
      req_q[free_idx].value  <= host_req_write ? host_req_wdata : '0;
    end
    if (answer) begin
      host_rsp_write <= (rx_msg.op == MSG_CLI_WRITE_ACK);
      host_rsp_addr  <= rx_msg.addr;
      host_rsp_rdata <= rx_msg.value;
      host_rsp_ts    <= rx_msg.ts;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tx_valid && !tx_ready |=> tx_valid);

endmodule
