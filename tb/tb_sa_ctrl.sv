// tb_sa_ctrl: self-checking testbench of the combining controller.
//
// The controller is combinational, so the testbench sets random inputs (a
// request, store search results, a sum leaving the functional unit, a memory
// word returning, memory-port readiness) and checks each output against the
// rules of the scatter-add flow, written out here case by case:
//   * a sum that matches a waiting entry recirculates into the functional
//     unit with that entry's value; otherwise it is written to memory, and if
//     the port is busy the functional unit holds;
//   * a finished sum frees its entry and acknowledges its source;
//   * a returned word enters the functional unit only when the issue slot is
//     free, paired with the waiting entry's value;
//   * plain writes pass to the memory port when it is free;
//   * a scatter-add needs a free entry and no same-address sum leaving the
//     unit; if it matches no entry its read goes out at once when the port is
//     free and no earlier read is pending, otherwise it is stored as pending;
//   * a pending read from the store takes the port when no write-back or
//     plain write does; when it is the read's turn (rd_turn) a waiting
//     write-back yields to it and holds the functional unit.
// A few directed cases come first; every rule is counted and must be seen.
module tb_sa_ctrl;
  import sa_pkg::*;

  localparam int unsigned IDX_W = 3;

  logic req_valid, req_ready;
  sa_req_t req;
  logic arr_hit, fin_found, free_found, pf_found;
  addr_t pf_addr;
  logic rd_turn;
  logic alloc_pend, sent_en;
  logic [IDX_W-1:0] ret_idx, fin_idx;
  data_t ret_val, fin_val;
  sa_dtype_e ret_dtype, fin_dtype;
  logic [3:0] rd_src;
  logic alloc_en, busy_en, free_en;
  logic [IDX_W-1:0] busy_idx, free_en_idx;
  logic fu_out_valid;
  data_t fu_out_sum;
  logic [IDX_W-1:0] fu_out_idx;
  addr_t fu_out_addr;
  logic fu_en, fu_in_valid;
  sa_dtype_e fu_in_dtype;
  data_t fu_in_a, fu_in_b;
  logic [IDX_W-1:0] fu_in_idx;
  addr_t fu_in_addr;
  logic mem_req_valid, mem_req_ready;
  mem_req_t mem_req;
  logic mem_resp_valid, mem_resp_ready;
  mem_resp_t mem_resp;
  logic ack_valid;
  logic [3:0] ack_src;
  sa_events_t ev;

  sa_ctrl #(.IDX_W(IDX_W)) dut (.*);

  int checks = 0, failures = 0;
  int seen_recirc = 0, seen_wb = 0, seen_hold = 0, seen_ret = 0, seen_ret_wait = 0;
  int seen_bypass = 0, seen_fetch = 0, seen_combine = 0, seen_full = 0, seen_hazard = 0;
  int seen_sent = 0, seen_pend = 0, seen_yield = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic randomize_inputs();
    req_valid      = $urandom_range(0, 3) != 0;
    req.op         = sa_op_e'($urandom_range(0, 3) != 0);
    req.dtype      = sa_dtype_e'($urandom_range(0, 1));
    req.src        = 4'($urandom);
    req.addr       = addr_t'($urandom_range(0, 3));
    req.data       = {$urandom, $urandom};
    arr_hit        = $urandom_range(0, 1);
    free_found     = $urandom_range(0, 4) != 0;
    pf_found       = $urandom_range(0, 2) == 0;
    pf_addr        = addr_t'($urandom_range(0, 3));
    rd_turn        = $urandom_range(0, 1);
    fin_found      = $urandom_range(0, 1);
    ret_idx        = IDX_W'($urandom);
    fin_idx        = IDX_W'($urandom);
    ret_val        = {$urandom, $urandom};
    fin_val        = {$urandom, $urandom};
    ret_dtype      = sa_dtype_e'($urandom_range(0, 1));
    fin_dtype      = sa_dtype_e'($urandom_range(0, 1));
    rd_src         = 4'($urandom);
    fu_out_valid   = $urandom_range(0, 1);
    fu_out_sum     = {$urandom, $urandom};
    fu_out_idx     = IDX_W'($urandom);
    fu_out_addr    = addr_t'($urandom_range(0, 3));
    mem_req_ready  = $urandom_range(0, 3) != 0;
    mem_resp_valid = $urandom_range(0, 1);
    mem_resp.addr  = addr_t'($urandom_range(0, 3));
    mem_resp.data  = {$urandom, $urandom};
  endtask

  task automatic check_rules();
    logic recirc, wb, hold, take_ret, port_free, want, direct, sent, bypass;
    #1;
    recirc    = fu_out_valid && fin_found;
    hold      = fu_out_valid && !fin_found && (!mem_req_ready || (rd_turn && pf_found));
    wb        = fu_out_valid && !fin_found && !hold;
    if (fu_out_valid && !fin_found && mem_req_ready && rd_turn && pf_found) seen_yield++;
    take_ret  = mem_resp_valid && !hold && !recirc;
    port_free = mem_req_ready && !wb;
    want      = req_valid && req.op == OP_SADD && free_found &&
                !(fu_out_valid && fu_out_addr == req.addr);
    bypass    = req_valid && req.op == OP_WRITE && port_free;
    direct    = want && !arr_hit && port_free && !pf_found;
    sent      = port_free && pf_found && !(req_valid && req.op == OP_WRITE);

    check("pipeline hold", fu_en == !hold);
    check("free and acknowledge", free_en == (fu_out_valid && !hold) &&
          ack_valid == free_en && (!free_en || (free_en_idx == fu_out_idx && ack_src == rd_src)));
    check("returned word taken", mem_resp_ready == take_ret);
    check("issue", fu_in_valid == (recirc || take_ret) && busy_en == fu_in_valid &&
          (!fu_in_valid || busy_idx == fu_in_idx));
    if (recirc) begin
      seen_recirc++;
      check("recirculation operands", fu_in_a == fu_out_sum && fu_in_b == fin_val &&
            fu_in_idx == fin_idx && fu_in_addr == fu_out_addr && fu_in_dtype == fin_dtype);
    end else if (take_ret) begin
      seen_ret++;
      check("return operands", fu_in_a == mem_resp.data && fu_in_b == ret_val &&
            fu_in_idx == ret_idx && fu_in_addr == mem_resp.addr && fu_in_dtype == ret_dtype);
    end
    if (mem_resp_valid && !take_ret) seen_ret_wait++;
    if (hold) seen_hold++;

    if (wb) begin
      seen_wb++;
      check("write-back", mem_req_valid && mem_req.we && mem_req.addr == fu_out_addr &&
            mem_req.data == fu_out_sum);
    end
    if (req_valid && req.op == OP_WRITE) begin
      check("bypass ready", req_ready == port_free && !alloc_en);
      if (port_free) begin
        seen_bypass++;
        check("bypass write", mem_req_valid && mem_req.we && mem_req.addr == req.addr &&
              mem_req.data == req.data);
      end
    end else if (req_valid) begin
      check("scatter-add ready", req_ready == want && alloc_en == want);
      check("pending mark", alloc_pend == (want && !arr_hit && !direct));
      if (alloc_pend) seen_pend++;
      if (!free_found) seen_full++;
      if (fu_out_valid && fu_out_addr == req.addr) seen_hazard++;
      if (want && arr_hit) begin
        seen_combine++;
        check("combined: no read of its own", !mem_req_valid || wb || sent);
      end
      if (direct) begin
        seen_fetch++;
        check("direct read", mem_req_valid && !mem_req.we && mem_req.addr == req.addr);
      end
    end else begin
      check("no request, not ready", !req_ready && !alloc_en);
    end
    check("pending read sent", sent_en == sent);
    if (sent) begin
      seen_sent++;
      check("pending read", mem_req_valid && !mem_req.we && mem_req.addr == pf_addr);
    end
    if (!wb && !bypass && !sent && !direct)
      check("memory port idle", !mem_req_valid);
    check("read event", ev.fetch == (sent || direct));
    check("event flags", ev.recirc == recirc && ev.writeback == wb &&
          ev.ret_stall == (mem_resp_valid && !take_ret));
  endtask

  initial begin
    // Directed: a finished sum with nowhere to go and a busy port holds
    // everything; the returned word must wait.
    randomize_inputs();
    fu_out_valid = 1; fin_found = 0; mem_req_ready = 0; mem_resp_valid = 1; pf_found = 0;
    req_valid = 1; req.op = OP_SADD; arr_hit = 1; free_found = 1; req.addr = 1; fu_out_addr = 2;
    check_rules();
    check("directed hold", !fu_en && !ack_valid && !mem_resp_ready && req_ready);
    // Directed: recirculation takes the issue slot from a returned word.
    fin_found = 1; mem_req_ready = 1;
    check_rules();
    check("directed recirc", fu_en && fu_in_valid && fu_in_a == fu_out_sum && !mem_resp_ready);

    for (int n = 0; n < 50000; n++) begin
      randomize_inputs();
      check_rules();
    end
    check("all cases seen", seen_recirc > 0 && seen_wb > 0 && seen_hold > 0 && seen_ret > 0 &&
          seen_ret_wait > 0 && seen_bypass > 0 && seen_fetch > 0 && seen_combine > 0 &&
          seen_full > 0 && seen_hazard > 0 && seen_sent > 0 && seen_pend > 0 && seen_yield > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
