// sa_ctrl: the combining controller of a scatter-add unit.
//
// Purely combinational: every cycle it looks at the request from the address
// generator, the word (if any) returning from memory, the sum (if any)
// leaving the functional unit and the results of the combining-store searches,
// and decides what moves. The flow is:
//   * a plain write is passed to the memory port (bypass);
//   * a scatter-add is written into a free combining-store entry; if its
//     address matches no entry the current value is read from memory (at
//     once if the memory port is free, otherwise the entry is marked pending
//     and the read is sent later), otherwise no memory access is made
//     (combining);
//   * a word returning from memory is added to a waiting entry of the same
//     address in the functional unit;
//   * a sum leaving the functional unit frees its entry and acknowledges the
//     request to its address generator; if another entry of the same address
//     is waiting, the sum is added to it at once, as if it had come from
//     memory (recirculation); otherwise the sum is written to memory.
// So each address in the store has exactly one current value, which is
// either being fetched, in the functional unit, or in memory.
//
// Priorities on the shared resources, all this design's choices:
//   * memory port: the write-back of a finished sum first, then a plain
//     write, then a pending read from the store, then the read of the
//     request arriving now. Exception: when a write-back and a pending read
//     both wait and the last such contest went to a write-back (rd_turn),
//     the read goes first, so that a long run of write-backs cannot keep
//     every new read from starting. A scatter-add is accepted whenever an
//     entry is free; it never waits for the memory port.
//   * functional-unit issue slot: a recirculated sum first, then a returned
//     word (which otherwise waits: mem_resp_ready low).
//   * a finished sum that must be written while the memory port is not ready
//     holds the whole functional-unit pipeline.
//   * a scatter-add whose address equals that of the sum leaving the
//     functional unit waits one cycle, so it sees the store after the sum has
//     either recirculated or been written back; a following read then comes
//     after the write on the in-order memory port.
// The acknowledgement is sent when the request's addition is complete, as
// the design describes. A stall for a full store, the CAM checks at arrival,
// at return and at completion, and the bypass of plain writes follow the
// design's flow diagram.
module sa_ctrl
  import sa_pkg::*;
#(
  parameter int unsigned IDX_W = 3
) (
  // request from the address generator
  input  logic             req_valid,
  output logic             req_ready,
  input  sa_req_t          req,
  // combining-store search results
  input  logic             arr_hit,
  input  logic [IDX_W-1:0] ret_idx,
  input  data_t            ret_val,
  input  sa_dtype_e        ret_dtype,
  input  logic             fin_found,
  input  logic [IDX_W-1:0] fin_idx,
  input  data_t            fin_val,
  input  sa_dtype_e        fin_dtype,
  input  logic             free_found,
  input  logic             pf_found,
  input  addr_t            pf_addr,
  input  logic             rd_turn,      // a pending read beats a write-back now
  input  logic [3:0]       rd_src,
  // combining-store updates
  output logic             alloc_en,
  output logic             alloc_pend,
  output logic             sent_en,
  output logic             busy_en,
  output logic [IDX_W-1:0] busy_idx,
  output logic             free_en,
  output logic [IDX_W-1:0] free_en_idx,
  // functional unit
  input  logic             fu_out_valid,
  input  data_t            fu_out_sum,
  input  logic [IDX_W-1:0] fu_out_idx,
  input  addr_t            fu_out_addr,
  output logic             fu_en,
  output logic             fu_in_valid,
  output sa_dtype_e        fu_in_dtype,
  output data_t            fu_in_a,
  output data_t            fu_in_b,
  output logic [IDX_W-1:0] fu_in_idx,
  output addr_t            fu_in_addr,
  // memory port
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output mem_req_t         mem_req,
  input  logic             mem_resp_valid,
  output logic             mem_resp_ready,
  input  mem_resp_t        mem_resp,
  // acknowledgement of a finished scatter-add
  output logic             ack_valid,
  output logic [3:0]       ack_src,
  output sa_events_t       ev
);

  logic wb_need, wb_yield, wb, recirc, take_ret, port_free, hazard, direct;
  logic is_sadd, is_write;

  always_comb begin
    // Finished sum: recirculate, or write back (possibly holding the FU).
    wb_need  = fu_out_valid && !fin_found;
    wb_yield = wb_need && rd_turn && pf_found;
    fu_en    = !(wb_need && (!mem_req_ready || wb_yield));
    wb       = wb_need && fu_en;
    recirc   = fu_out_valid && fin_found && fu_en;
    free_en     = fu_out_valid && fu_en;
    free_en_idx = fu_out_idx;
    ack_valid   = free_en;
    ack_src     = rd_src;

    // Returned memory word: into the FU if the issue slot is free.
    take_ret       = mem_resp_valid && fu_en && !recirc;
    mem_resp_ready = take_ret;

    fu_in_valid = recirc || take_ret;
    if (recirc) begin
      fu_in_dtype = fin_dtype;
      fu_in_a     = fu_out_sum;
      fu_in_b     = fin_val;
      fu_in_idx   = fin_idx;
      fu_in_addr  = fu_out_addr;
    end else begin
      fu_in_dtype = ret_dtype;
      fu_in_a     = mem_resp.data;
      fu_in_b     = ret_val;
      fu_in_idx   = ret_idx;
      fu_in_addr  = mem_resp.addr;
    end
    busy_en  = fu_in_valid;
    busy_idx = fu_in_idx;

    // Request from the address generator.
    is_sadd   = req_valid && req.op == OP_SADD;
    is_write  = req_valid && req.op == OP_WRITE;
    port_free = mem_req_ready && !wb;
    hazard    = is_sadd && fu_out_valid && fu_out_addr == req.addr;
    if (is_write)     req_ready = port_free;
    else if (is_sadd) req_ready = free_found && !hazard;
    else              req_ready = 1'b0;
    alloc_en   = is_sadd && req_ready;
    // The arriving request's read goes out now only if nothing else wants
    // the port; otherwise it waits in the store.
    direct     = alloc_en && !arr_hit && port_free && !pf_found;
    alloc_pend = alloc_en && !arr_hit && !direct;
    sent_en    = mem_req_ready && (!wb_need || wb_yield) && !is_write && pf_found;

    // Memory port.
    mem_req_valid = 1'b0;
    mem_req       = '0;
    if (wb) begin
      mem_req_valid = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = fu_out_addr;
      mem_req.data  = fu_out_sum;
    end else if (is_write && req_ready) begin
      mem_req_valid = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = req.addr;
      mem_req.data  = req.data;
    end else if (sent_en) begin
      mem_req_valid = 1'b1;
      mem_req.we    = 1'b0;
      mem_req.addr  = pf_addr;
      mem_req.data  = '0;
    end else if (direct) begin
      mem_req_valid = 1'b1;
      mem_req.we    = 1'b0;
      mem_req.addr  = req.addr;
      mem_req.data  = '0;
    end

    ev.bypass       = is_write && req_ready;
    ev.full_stall   = is_sadd && !free_found;
    ev.combine      = alloc_en && arr_hit;
    ev.fetch        = sent_en || direct;
    ev.recirc       = recirc;
    ev.writeback    = wb;
    ev.ret_stall    = mem_resp_valid && !take_ret;
    ev.hazard_stall = hazard;
  end

endmodule
