// sa_mem_model: behavioural model of one cache bank and its memory channel,
// for testbenches only (kind: behavioural model, not synthesizable).
//
// Stands in for the cache bank / DRAM interface behind a scatter-add unit.
// Memory is modelled as in the sensitivity experiments of the scatter-add
// study: a fixed interval between accepted word accesses (throughput) and a
// latency for reads, here a fixed LATENCY plus an optional random extra of
// 0..jitter cycles, so that returns may come back out of order. Requests are
// applied in the order they are accepted: a read sees every earlier write.
// With stall_pct > 0 the port also refuses requests at random. Unwritten
// words read as zero. `mem` is open to hierarchical reads and writes by the
// testbench; `reads` and `writes` count accepted accesses.
// mem_req_ready does not depend on mem_req_valid.
module sa_mem_model
  import sa_pkg::*;
#(
  parameter int unsigned LATENCY   = 8,
  parameter int unsigned INTERVAL  = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  int unsigned jitter,      // extra read latency, 0..jitter cycles
  input  int unsigned stall_pct,   // chance (%) of refusing a cycle
  input  logic      mem_req_valid,
  output logic      mem_req_ready,
  input  mem_req_t  mem_req,
  output logic      mem_resp_valid,
  input  logic      mem_resp_ready,
  output mem_resp_t mem_resp
);

  data_t mem [addr_t];
  longint cyc = 0;             // cycles since time 0
  longint last_acc = -1000;    // cycle of the last accepted access
  int unsigned reads = 0, writes = 0;

  typedef struct { longint due; mem_resp_t r; } pend_t;
  pend_t pend [$];
  int    head = -1;            // index of the response being offered

  initial begin
    mem_req_ready  = 1'b0;
    mem_resp_valid = 1'b0;
    mem_resp       = '0;
  end

  // Everything happens at the clock edge; the outputs for the next cycle are
  // worked out at the end of the edge, so they are plain registers.
  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_resp_valid && mem_resp_ready) pend.delete(head);
      if (mem_req_valid && mem_req_ready) begin
        last_acc = cyc;
        if (mem_req.we) begin
          mem[mem_req.addr] = mem_req.data;
          writes++;
        end else begin
          automatic pend_t p;
          p.due    = cyc + longint'(LATENCY) + longint'($urandom_range(0, jitter));
          p.r.addr = mem_req.addr;
          p.r.data = mem.exists(mem_req.addr) ? mem[mem_req.addr] : '0;
          pend.push_back(p);
          reads++;
        end
      end
    end
    cyc = cyc + 1;
    head = -1;
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= cyc && (head < 0 || pend[i].due < pend[head].due)) head = i;
    mem_resp_valid <= rst_n && head >= 0;
    mem_resp       <= (head >= 0) ? pend[head].r : '0;
    mem_req_ready  <= rst_n && (cyc - last_acc >= longint'(INTERVAL)) &&
                      !((stall_pct > 0) && ($urandom_range(0, 99) < stall_pct));
  end

endmodule
