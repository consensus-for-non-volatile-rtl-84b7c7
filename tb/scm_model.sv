// scm_model: behavioural model of one storage-class memory device (not
// synthesizable; testbench use only).
//
// Stores one scm_word_t (timestamp and 64-byte line) per cache-line address
// in a sparse associative array, so the full 4 GB address space can be
// modelled; a line never written reads as zero (timestamp 0, value 0).
// Requests are taken whenever scm_req_ready is high; when STALL is set,
// ready drops pseudo-randomly. A read answers LATENCY cycles after it is
// taken, in order; a write is applied when taken.
module scm_model
  import abd_pkg::*;
#(
  parameter int unsigned LATENCY = 4,
  parameter bit          STALL   = 1'b0
) (
  input  logic      clk,
  input  logic      req_valid,
  output logic      req_ready,
  input  logic      req_write,
  input  laddr_t    req_addr,
  input  scm_word_t req_wdata,
  output logic      rsp_valid,
  output scm_word_t rsp_rdata
);
  scm_word_t mem [laddr_t];
  scm_word_t pipe_d [$];
  int        pipe_t [$];
  int        now = 0;
  int        writes = 0;

  function automatic scm_word_t peek(laddr_t a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_rdata = '0;
  end

  always @(posedge clk) begin
    now++;
    rsp_valid <= 1'b0;
    if (pipe_t.size() > 0 && pipe_t[0] <= now) begin
      rsp_valid <= 1'b1;
      rsp_rdata <= pipe_d.pop_front();
      void'(pipe_t.pop_front());
    end
    if (req_valid && req_ready) begin
      if (req_write) begin
        mem[req_addr] = req_wdata;
        writes++;
      end else begin
        pipe_d.push_back(peek(req_addr));
        pipe_t.push_back(now + int'(LATENCY) - 1);
      end
    end
    req_ready <= STALL ? ($urandom_range(3) != 0) : 1'b1;
  end
endmodule
