// sa_sens_run: one configuration of the sensitivity experiments, for
// tb_sa_sensitivity (testbench helper, not synthesizable).
//
// One scatter-add unit with CS_ENTRIES combining-store entries and an
// FU_LATENCY-cycle functional unit, in front of the behavioural memory model
// (no cache): a fixed MEM_LAT-cycle read latency and at most one access every
// INTERVAL cycles. After `start` it scatter-adds the constant 1 to N random
// bins of RANGE, one request per cycle at most, waits until every request is
// acknowledged and the store is empty, then checks every touched bin. It
// reports the run time in cycles, the memory accesses and the wrong bins.
module sa_sens_run
  import sa_pkg::*;
#(
  parameter int unsigned CS_ENTRIES = 8,
  parameter int unsigned FU_LATENCY = 4,
  parameter int unsigned MEM_LAT    = 16,
  parameter int unsigned INTERVAL   = 2,
  parameter int unsigned RANGE      = 65536,
  parameter int unsigned N          = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   done,
  output longint cycles,
  output longint accesses,
  output int     wrong
);

  logic req_valid = 1'b0, req_ready;
  sa_req_t req = '0;
  logic ack_valid;
  logic [3:0] ack_src;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  mem_req_t mem_req;
  mem_resp_t mem_resp;
  sa_events_t ev;
  logic [$clog2(CS_ENTRIES+1)-1:0] occupancy;
  int unsigned jitter = 0, stall_pct = 0;

  sa_unit #(.CS_ENTRIES(CS_ENTRIES), .FU_LATENCY(FU_LATENCY)) u_sa (.*);
  sa_mem_model #(.LATENCY(MEM_LAT), .INTERVAL(INTERVAL)) u_mem (
    .clk, .rst_n, .jitter, .stall_pct,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_ready, .mem_resp);

  longint cyc = 0, acks = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && ack_valid) acks <= acks + 1;

  initial begin
    longint cnt [int];
    longint t0;
    done = 1'b0; cycles = 0; accesses = 0; wrong = 0;
    wait (start);
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < N; i++) begin
      automatic int k = int'($urandom_range(0, RANGE - 1));
      if (!cnt.exists(k)) cnt[k] = 0;
      cnt[k]++;
      req_valid = 1'b1;
      req.op = OP_SADD; req.dtype = DT_INT; req.src = '0; req.addr = addr_t'(k); req.data = 64'd1;
      #1;
      while (!req_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    req_valid = 1'b0;
    while (!(acks == longint'(N) && occupancy == 0)) @(negedge clk);
    cycles = cyc - t0;
    accesses = longint'(u_mem.reads + u_mem.writes);
    foreach (cnt[k]) if (u_mem.mem[addr_t'(k)] != data_t'(cnt[k])) wrong++;
    done = 1'b1;
  end

endmodule
