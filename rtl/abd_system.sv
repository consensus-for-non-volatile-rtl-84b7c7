// abd_system: replicated storage-class main memory kept consistent by a
// programmable switch running the ABD protocol.
//
// NUM_CLIENTS clients, each a page buffer in front of a memory controller,
// sit on one switch port each. The switch (abd_switch) runs both ABD phases
// for every cache-line read and write against NUM_REPLICAS memory instances
// (abd_replica), each in front of its own storage-class memory device. A
// request completes once a majority of the replicas has answered each phase,
// so the memory stays available and linearizable while a minority of the
// replicas has failed (fail[r] makes replica r crash).
//
//   cpu[k] -> abd_page_buffer -> abd_client --+            +--> abd_replica[0] <-> scm[0]
//                                             +-> abd_switch +--> abd_replica[1] <-> scm[1]
//   cpu[j] -> ...                          ---+  (multicast) +--> abd_replica[2] <-> scm[2]
//
// The links are plain wires: a message the switch multicasts reaches every
// replica of the line's group in the next cycle, and the replicas' input
// queues drop what they cannot hold. The memory devices are outside this
// module: their ports (see abd_replica) are brought out per replica.
//
// Defaults: three replicas (the memory instances of the paper's setup),
// three clients as in its system picture, a 4 KB page buffer and up to 10
// requests in flight per client (the paper's figures), 16384 switch entries,
// a 4096-cycle client time-out and 64-message replica queues (enough for two
// messages of every operation three clients can have in flight); the last
// three are this design's choices. The controller's answer flags
// (mem_rsp_write, mem_rsp_ts) are not needed by the page buffer.
module abd_system
  import abd_pkg::*;
#(
  parameter int unsigned NUM_CLIENTS  = 3,
  parameter int unsigned NUM_REPLICAS = 3,
  parameter int unsigned TS_ENTRIES   = 16384,
  parameter int unsigned NUM_GROUPS   = 1,
  parameter int unsigned TIMEOUT      = 4096,
  parameter int unsigned PAGE_BYTES   = 4096,
  parameter int unsigned FIFO_DEPTH   = 64,
  parameter int unsigned MAX_OUTSTANDING = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  // hosts, one per client
  input  logic      cpu_req_valid [NUM_CLIENTS],
  output logic      cpu_req_ready [NUM_CLIENTS],
  input  logic      cpu_req_write [NUM_CLIENTS],
  input  laddr_t    cpu_req_addr  [NUM_CLIENTS],
  input  line_t     cpu_req_wdata [NUM_CLIENTS],
  output logic      cpu_rsp_valid [NUM_CLIENTS],
  output line_t     cpu_rsp_rdata [NUM_CLIENTS],
  // replica failure injection (crash-stop)
  input  logic      fail          [NUM_REPLICAS],
  // storage-class memory devices, one per replica
  output logic      scm_req_valid [NUM_REPLICAS],
  input  logic      scm_req_ready [NUM_REPLICAS],
  output logic      scm_req_write [NUM_REPLICAS],
  output laddr_t    scm_req_addr  [NUM_REPLICAS],
  output scm_word_t scm_req_wdata [NUM_REPLICAS],
  input  logic      scm_rsp_valid [NUM_REPLICAS],
  input  scm_word_t scm_rsp_rdata [NUM_REPLICAS],
  // multicast group table
  input  logic      cfg_we,
  input  logic [$clog2(NUM_GROUPS > 1 ? NUM_GROUPS : 2)-1:0] cfg_group,
  input  logic [NUM_REPLICAS-1:0] cfg_mask,
  // event pulses
  output logic [NUM_CLIENTS-1:0]  ev_retry,
  output logic [NUM_CLIENTS-1:0]  ev_page_hit,
  output logic [NUM_CLIENTS-1:0]  ev_page_miss,
  output logic [NUM_CLIENTS-1:0]  ev_page_writeback,
  output logic [NUM_REPLICAS-1:0] ev_replica_drop,
  output logic [NUM_REPLICAS-1:0] ev_replica_update,
  output logic      ev_busy_drop,
  output logic      ev_restart,
  output logic      ev_stale_drop,
  output logic      ev_ts_quorum,
  output logic      ev_rd_quorum,
  output logic      ev_write_done,
  output logic      ev_read_done
);
  // client <-> switch
  logic     c2s_valid [NUM_CLIENTS];
  abd_msg_t c2s_msg   [NUM_CLIENTS];
  logic     c2s_ready [NUM_CLIENTS];
  logic [NUM_CLIENTS-1:0] s2c_valid;
  abd_msg_t s2c_msg;
  // replica <-> switch
  logic     r2s_valid [NUM_REPLICAS];
  abd_msg_t r2s_msg   [NUM_REPLICAS];
  logic     r2s_ready [NUM_REPLICAS];
  logic     s2r_valid;
  abd_msg_t s2r_msg;
  logic [NUM_REPLICAS-1:0] s2r_mask;

  for (genvar k = 0; k < NUM_CLIENTS; k++) begin : g_client
    logic   mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid, mem_rsp_write;
    laddr_t mem_req_addr, mem_rsp_addr;
    line_t  mem_req_wdata, mem_rsp_rdata;
    ts_t    mem_rsp_ts;

    abd_page_buffer #(.PAGE_BYTES(PAGE_BYTES)) u_pbuf (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[k]), .cpu_req_ready(cpu_req_ready[k]),
      .cpu_req_write(cpu_req_write[k]), .cpu_req_addr(cpu_req_addr[k]),
      .cpu_req_wdata(cpu_req_wdata[k]),
      .cpu_rsp_valid(cpu_rsp_valid[k]), .cpu_rsp_rdata(cpu_rsp_rdata[k]),
      .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
      .mem_rsp_valid, .mem_rsp_addr, .mem_rsp_rdata,
      .ev_hit(ev_page_hit[k]), .ev_miss(ev_page_miss[k]), .ev_writeback(ev_page_writeback[k])
    );

    abd_client #(.CLIENT_ID(k), .TIMEOUT(TIMEOUT), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_client (
      .clk, .rst_n,
      .host_req_valid(mem_req_valid), .host_req_ready(mem_req_ready),
      .host_req_write(mem_req_write), .host_req_addr(mem_req_addr),
      .host_req_wdata(mem_req_wdata),
      .host_rsp_valid(mem_rsp_valid), .host_rsp_write(mem_rsp_write),
      .host_rsp_addr(mem_rsp_addr), .host_rsp_rdata(mem_rsp_rdata),
      .host_rsp_ts(mem_rsp_ts),
      .tx_valid(c2s_valid[k]), .tx_msg(c2s_msg[k]), .tx_ready(c2s_ready[k]),
      .rx_valid(s2c_valid[k]), .rx_msg(s2c_msg),
      .ev_retry(ev_retry[k])
    );
  end

  abd_switch #(
    .NUM_CLIENTS(NUM_CLIENTS), .NUM_REPLICAS(NUM_REPLICAS),
    .TS_ENTRIES(TS_ENTRIES), .NUM_GROUPS(NUM_GROUPS)
  ) u_switch (
    .clk, .rst_n,
    .cli_in_valid(c2s_valid), .cli_in_msg(c2s_msg), .cli_in_ready(c2s_ready),
    .rep_in_valid(r2s_valid), .rep_in_msg(r2s_msg), .rep_in_ready(r2s_ready),
    .rep_out_valid(s2r_valid), .rep_out_msg(s2r_msg), .rep_out_mask(s2r_mask),
    .cli_out_valid(s2c_valid), .cli_out_msg(s2c_msg),
    .cfg_we, .cfg_group, .cfg_mask,
    .ev_busy_drop, .ev_restart, .ev_stale_drop, .ev_ts_quorum, .ev_rd_quorum,
    .ev_write_done, .ev_read_done
  );

  for (genvar r = 0; r < NUM_REPLICAS; r++) begin : g_replica
    abd_replica #(.REPLICA_ID(r), .FIFO_DEPTH(FIFO_DEPTH)) u_replica (
      .clk, .rst_n, .fail(fail[r]),
      .in_valid(s2r_valid && s2r_mask[r]), .in_msg(s2r_msg),
      .out_valid(r2s_valid[r]), .out_msg(r2s_msg[r]), .out_ready(r2s_ready[r]),
      .scm_req_valid(scm_req_valid[r]), .scm_req_ready(scm_req_ready[r]),
      .scm_req_write(scm_req_write[r]), .scm_req_addr(scm_req_addr[r]),
      .scm_req_wdata(scm_req_wdata[r]),
      .scm_rsp_valid(scm_rsp_valid[r]), .scm_rsp_rdata(scm_rsp_rdata[r]),
      .ev_drop(ev_replica_drop[r]), .ev_update(ev_replica_update[r])
    );
  end

endmodule
