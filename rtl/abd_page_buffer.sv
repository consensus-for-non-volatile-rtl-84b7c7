// abd_page_buffer: the client's local page buffer in front of the memory
// controller.
//
// The buffer holds one page of PAGE_BYTES (4 KB, i.e. 64 cache lines) and
// serves the host's cache-line reads and writes from it. An access to another
// page is a miss: if the buffered page has been written (dirty) all its lines
// are first written back to the replicated memory, one ABD write per line,
// then the requested page is fetched with one ABD read per line, and only
// then is the access served. The page size and the write-back-before-fetch
// order follow the paper's client driver; doing it in hardware and the
// one-page capacity are this design's reading of it.
//
// Transfers are pipelined: the line requests of a phase are issued back to
// back, as fast as the memory controller takes them (it keeps several in
// flight), and the answers may return in any order; each fetched line is
// placed by its address. The fetch starts once every write-back line has been
// acknowledged.
//
// Host side: cpu_req_ready is high while idle; a request is taken on
// cpu_req_valid && cpu_req_ready. The answer is a one-cycle cpu_rsp_valid
// with the line read (the old line for a write). A hit answers two cycles
// after it is taken.
// Memory side: the host port of abd_client (mem_req_* taken on valid and
// ready; one mem_rsp_valid per request, carrying its line address).
module abd_page_buffer
  import abd_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = 4096
) (
  input  logic   clk,
  input  logic   rst_n,
  // host (CPU) side
  input  logic   cpu_req_valid,
  output logic   cpu_req_ready,
  input  logic   cpu_req_write,
  input  laddr_t cpu_req_addr,
  input  line_t  cpu_req_wdata,
  output logic   cpu_rsp_valid,
  output line_t  cpu_rsp_rdata,
  // memory controller side
  output logic   mem_req_valid,
  input  logic   mem_req_ready,
  output logic   mem_req_write,
  output laddr_t mem_req_addr,
  output line_t  mem_req_wdata,
  input  logic   mem_rsp_valid,
  input  laddr_t mem_rsp_addr,
  input  line_t  mem_rsp_rdata,
  // event pulses
  output logic   ev_hit,
  output logic   ev_miss,
  output logic   ev_writeback
);
  localparam int unsigned LINES = PAGE_BYTES / LINE_BYTES;
  localparam int unsigned OFFW  = $clog2(LINES);
  localparam int unsigned PGW   = LINE_ADDR_W - OFFW;

  typedef enum logic [2:0] {P_IDLE, P_WB, P_FILL, P_SERVE} state_e;

  state_e          st_q;
  line_t           buf_q [LINES];
  logic [PGW-1:0]  page_q;
  logic            valid_q, dirty_q;
  logic            rq_write;
  laddr_t          rq_addr;
  line_t           rq_wdata;
  logic [OFFW:0]   idx_q;   // next line to request
  logic [OFFW:0]   cnt_q;   // answers received in this phase
  logic            issuing, last_rsp, hit;

  assign hit           = valid_q && (cpu_req_addr[LINE_ADDR_W-1:OFFW] == page_q);
  assign cpu_req_ready = (st_q == P_IDLE);
  assign issuing       = (st_q == P_WB || st_q == P_FILL) && idx_q != (OFFW+1)'(LINES);
  assign mem_req_valid = issuing;
  assign mem_req_write = (st_q == P_WB);
  assign mem_req_addr  = (st_q == P_WB) ? {page_q, idx_q[OFFW-1:0]}
                                        : {rq_addr[LINE_ADDR_W-1:OFFW], idx_q[OFFW-1:0]};
  assign mem_req_wdata = buf_q[idx_q[OFFW-1:0]];
  assign last_rsp      = mem_rsp_valid && cnt_q == (OFFW+1)'(LINES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= P_IDLE;
      valid_q       <= 1'b0;
      dirty_q       <= 1'b0;
      idx_q         <= '0;
      cnt_q         <= '0;
      cpu_rsp_valid <= 1'b0;
      {ev_hit, ev_miss, ev_writeback} <= '0;
    end else begin
      cpu_rsp_valid <= 1'b0;
      {ev_hit, ev_miss, ev_writeback} <= '0;
      if (issuing && mem_req_ready) idx_q <= idx_q + (OFFW+1)'(1);
      if ((st_q == P_WB || st_q == P_FILL) && mem_rsp_valid) cnt_q <= cnt_q + (OFFW+1)'(1);
      unique case (st_q)
        P_IDLE: if (cpu_req_valid) begin
          idx_q <= '0;
          cnt_q <= '0;
          if (hit) begin
            st_q   <= P_SERVE;
            ev_hit <= 1'b1;
          end else begin
            ev_miss <= 1'b1;
            if (valid_q && dirty_q) begin
              st_q         <= P_WB;
              ev_writeback <= 1'b1;
            end else begin
              st_q <= P_FILL;
            end
          end
        end
        P_WB: if (last_rsp) begin
          st_q  <= P_FILL;
          idx_q <= '0;
          cnt_q <= '0;
        end
        P_FILL: if (last_rsp) begin
          st_q    <= P_SERVE;
          valid_q <= 1'b1;
          dirty_q <= 1'b0;
        end
        P_SERVE: begin
          st_q          <= P_IDLE;
          cpu_rsp_valid <= 1'b1;
          if (rq_write) dirty_q <= 1'b1;
        end
        default: st_q <= P_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st_q == P_IDLE && cpu_req_valid) begin
      rq_write <= cpu_req_write;
      rq_addr  <= cpu_req_addr;
      rq_wdata <= cpu_req_wdata;
    end
    if (st_q == P_FILL && mem_rsp_valid) begin
      buf_q[mem_rsp_addr[OFFW-1:0]] <= mem_rsp_rdata;
      if (last_rsp) page_q <= rq_addr[LINE_ADDR_W-1:OFFW];
    end
    if (st_q == P_SERVE) begin
      cpu_rsp_rdata <= buf_q[rq_addr[OFFW-1:0]];
      if (rq_write) buf_q[rq_addr[OFFW-1:0]] <= rq_wdata;
    end
  end

endmodule
