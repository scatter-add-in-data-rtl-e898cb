// sa_unit: one scatter-add unit, placed in front of a cache bank.
//
// A scatter-add request adds its value to the memory word at its address,
// atomically with respect to every other scatter-add to that word, without a
// round trip to the processor. The unit is the combining controller
// (sa_ctrl), the combining store (sa_combining_store) and the integer /
// floating-point functional unit (sa_fu). Requests to the same address are
// chained: only the first fetches the current value from memory; the others
// wait in the store and are added one after another to the running sum as it
// leaves the functional unit; only the last sum is written back. So a run of
// updates to a hot address costs one read and one write, and up to CS_ENTRIES
// updates, to any mix of addresses, are in flight at once.
//
// Interface, all valid/ready handshakes (a transfer on a cycle with both high):
//   req_*      requests from the address generator side: plain writes and
//              scatter-adds (integer or double).
//   ack_*      one-cycle pulse per finished scatter-add, with the source
//              number of its request.
//   mem_req_*  reads and writes to the cache bank / memory channel, issued in
//              order. mem_req_valid may depend on mem_req_ready; the other
//              side must not make ready depend on valid.
//   mem_resp_* words returned for reads, in any order, with their address.
// Timing: a scatter-add is accepted in the cycle it is presented if a store
// entry is free (and no sum for the same address is leaving the functional
// unit in that cycle); a plain write when the memory port is free. An addition
// takes FU_LATENCY cycles; the acknowledgement comes in the cycle the sum
// leaves the functional unit.
//
// The unit also holds one bit of its own, rd_turn: when a write-back has just
// won the memory port over a read waiting in the store, the next contest goes
// to the read. Write-backs and new reads then share the port instead of
// running in alternating bursts, which keeps long memory latencies hidden.
//
// From the design: the three parts, chaining, write-back only at the end of a
// chain, acknowledgement on completion. This design's own choices: the
// handshakes, the turn bit, and the ordering rule below (the design leaves it
// open): software does not mix plain writes with unfinished scatter-adds to
// the same address.
module sa_unit
  import sa_pkg::*;
#(
  parameter int unsigned CS_ENTRIES = 8,
  parameter int unsigned FU_LATENCY = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  sa_req_t    req,
  output logic       ack_valid,
  output logic [3:0] ack_src,
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output mem_req_t   mem_req,
  input  logic       mem_resp_valid,
  output logic       mem_resp_ready,
  input  mem_resp_t  mem_resp,
  output sa_events_t ev,
  output logic [$clog2(CS_ENTRIES+1)-1:0] occupancy
);

  localparam int unsigned IDX_W = (CS_ENTRIES > 1) ? $clog2(CS_ENTRIES) : 1;

  logic             arr_hit, ret_found, fin_found, free_found, pf_found;
  logic             alloc_pend, sent_en, rd_turn;
  addr_t            pf_addr;
  logic [IDX_W-1:0] ret_idx, fin_idx;
  data_t            ret_val, fin_val;
  sa_dtype_e        ret_dtype, fin_dtype;
  logic [3:0]       rd_src;
  logic             alloc_en, busy_en, free_en;
  logic [IDX_W-1:0] busy_idx, free_en_idx;

  logic             fu_en, fu_in_valid, fu_out_valid;
  sa_dtype_e        fu_in_dtype, fu_out_dtype;
  data_t            fu_in_a, fu_in_b, fu_out_sum;
  logic [IDX_W-1:0] fu_in_idx, fu_out_idx;
  addr_t            fu_in_addr, fu_out_addr;

  sa_combining_store #(.ENTRIES(CS_ENTRIES), .IDX_W(IDX_W)) u_store (
    .clk, .rst_n,
    .arr_addr (req.addr),      .arr_hit,
    .ret_addr (mem_resp.addr), .ret_found, .ret_idx, .ret_val, .ret_dtype,
    .fin_addr (fu_out_addr),   .fin_found, .fin_idx, .fin_val, .fin_dtype,
    .free_found, .free_idx (), .pf_found, .pf_idx (), .pf_addr,
    .rd_idx   (fu_out_idx),    .rd_src,
    .alloc_en,
    .alloc_dtype (req.dtype), .alloc_src (req.src),
    .alloc_addr  (req.addr),  .alloc_val (req.data),
    .alloc_pend, .sent_en,
    .busy_en, .busy_idx, .free_en, .free_en_idx,
    .occupancy
  );

  sa_ctrl #(.IDX_W(IDX_W)) u_ctrl (
    .req_valid, .req_ready, .req,
    .arr_hit, .ret_idx, .ret_val, .ret_dtype,
    .fin_found, .fin_idx, .fin_val, .fin_dtype,
    .free_found, .pf_found, .pf_addr, .rd_turn, .rd_src,
    .alloc_en, .alloc_pend, .sent_en, .busy_en, .busy_idx, .free_en, .free_en_idx,
    .fu_out_valid, .fu_out_sum, .fu_out_idx, .fu_out_addr,
    .fu_en, .fu_in_valid, .fu_in_dtype, .fu_in_a, .fu_in_b, .fu_in_idx, .fu_in_addr,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_ready, .mem_resp,
    .ack_valid, .ack_src, .ev
  );

  // Turn bit for the memory port: set when a write-back wins while a read is
  // pending, cleared when a pending read is sent.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                     rd_turn <= 1'b0;
    else if (sent_en)                               rd_turn <= 1'b0;
    else if (pf_found && ev.writeback)              rd_turn <= 1'b1;
  end

  sa_fu #(.LATENCY(FU_LATENCY), .IDX_W(IDX_W)) u_fu (
    .clk, .rst_n, .en (fu_en),
    .in_valid (fu_in_valid), .in_dtype (fu_in_dtype),
    .in_a (fu_in_a), .in_b (fu_in_b), .in_idx (fu_in_idx), .in_addr (fu_in_addr),
    .out_valid (fu_out_valid), .out_dtype (fu_out_dtype), .out_sum (fu_out_sum),
    .out_idx (fu_out_idx), .out_addr (fu_out_addr)
  );

  // A word returned from memory always has a waiting entry: it was read for one.
  a_ret_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_resp_valid && mem_resp_ready) |-> ret_found)
    else $error("sa_unit: returned word for %h has no waiting entry", mem_resp.addr);
  a_chain_dtype: assert property (@(posedge clk) disable iff (!rst_n)
    (fu_out_valid && fu_en && fin_found) |-> (fin_dtype == fu_out_dtype))
    else $error("sa_unit: data type changed within an address chain");

endmodule
