// tb_sa_unit: self-checking testbench of one scatter-add unit.
//
// The unit is connected to the behavioural bank/memory model. The test runs in
// phases and checks, against values the testbench works out itself:
//   1. Latency: one scatter-add to a fresh word, unit and memory idle. The
//      acknowledgement must come MEM_LAT + FU_LATENCY cycles after the request
//      is presented (fetch, then one addition).
//   2. Hot address: 64 scatter-adds to a single word in a row. Combining must
//      cost exactly one read and one write, the additions run back to back,
//      one per FU_LATENCY cycles, and the word must hold the total.
//   3. Distinct addresses: 160 scatter-adds to different words. Every entry
//      is held at least MEM_LAT + FU_LATENCY cycles (read, then addition), so
//      CS_ENTRIES entries allow at most CS_ENTRIES such requests per that many
//      cycles: the run cannot take less than
//      160 / CS_ENTRIES * (MEM_LAT + FU_LATENCY) cycles. Reads and
//      write-backs share the memory port, which costs a little: the run must
//      stay within 15% of that bound.
//   4. Random stress: plain writes to set initial values, then thousands of
//      integer and double scatter-adds over small and large address pools,
//      with random memory latency, out-of-order returns and a port that
//      refuses requests at random. Every scatter-add must be acknowledged and
//      every word must end with its initial value plus all its updates.
//      Double values are multiples of 0.25 of modest size, so every partial
//      sum is exact and the result does not depend on the order of addition.
// It also counts the unit's events (bypass, stall on a full store, combining,
// fetch, recirculation, write-back, held memory return, same-address hold) and
// fails if any of them never happened.
module tb_sa_unit;
  import sa_pkg::*;

  localparam int unsigned CS_ENTRIES = 8;
  localparam int unsigned FU_LATENCY = 4;
  localparam int unsigned MEM_LAT    = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready;
  sa_req_t req;
  logic ack_valid;
  logic [3:0] ack_src;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  mem_req_t mem_req;
  mem_resp_t mem_resp;
  sa_events_t ev;
  logic [$clog2(CS_ENTRIES+1)-1:0] occupancy;
  int unsigned jitter = 0, stall_pct = 0;

  sa_unit #(.CS_ENTRIES(CS_ENTRIES), .FU_LATENCY(FU_LATENCY)) dut (.*);
  sa_mem_model #(.LATENCY(MEM_LAT), .INTERVAL(1)) u_mem (
    .clk, .rst_n, .jitter, .stall_pct,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_ready, .mem_resp);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint acks = 0;
  longint last_ack_cyc = 0;
  int ev_cnt [8];

  always @(posedge clk) cyc <= cyc + 1;

  // Monitor, sampled at the falling edge while everything is stable.
  always @(negedge clk) begin
    if (rst_n && ack_valid) begin
      acks <= acks + 1;
      last_ack_cyc <= cyc;
      if (ack_src != 4'd5) begin
        failures++;
        $display("FAIL: acknowledgement with source %0d", ack_src);
      end
    end
    if (rst_n) begin
      ev_cnt[0] += int'(ev.bypass);
      ev_cnt[1] += int'(ev.full_stall);
      ev_cnt[2] += int'(ev.combine);
      ev_cnt[3] += int'(ev.fetch);
      ev_cnt[4] += int'(ev.recirc);
      ev_cnt[5] += int'(ev.writeback);
      ev_cnt[6] += int'(ev.ret_stall);
      ev_cnt[7] += int'(ev.hazard_stall);
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Present one request from the next falling edge on and return after the
  // rising edge that takes it. Inputs change and ready is sampled only at
  // falling edges, away from the rising edge.
  task automatic send(input sa_op_e op, input sa_dtype_e dt, input addr_t a, input data_t d);
    @(negedge clk);
    req_valid = 1'b1;
    req.op = op; req.dtype = dt; req.src = 4'd5; req.addr = a; req.data = d;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 req_valid = 1'b0;
  endtask

  task automatic wait_done(input longint want_acks);
    while (!(acks == want_acks && occupancy == 0)) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  function automatic data_t fp_of(input int q);   // q / 4 as a double
    return $realtobits(real'(q) / 4.0);
  endfunction

  // Expected final contents for the stress phase.
  longint exp_int [addr_t];
  real    exp_fp  [addr_t];

  string ev_name [8] = '{"bypass", "full_stall", "combine", "fetch", "recirc",
                         "writeback", "ret_stall", "hazard_stall"};

  initial begin
    longint t0, t1, sent, w0, r0;
    req_valid = 1'b0; req = '0;
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    sent = 0;

    // 1. Latency of one scatter-add.
    send(OP_WRITE, DT_INT, 32'h10, 64'd100);
    repeat (5) @(posedge clk);
    t0 = cyc + 1;  // send presents the request in the next cycle
    send(OP_SADD, DT_INT, 32'h10, 64'd23);
    sent++;
    wait_done(sent);
    check($sformatf("latency %0d, expected %0d", last_ack_cyc - t0, MEM_LAT + FU_LATENCY),
          last_ack_cyc - t0 == MEM_LAT + FU_LATENCY);
    check("first sum", u_mem.mem[32'h10] == 64'd123);

    // 2. Hot address: 64 updates to one word.
    r0 = u_mem.reads; w0 = u_mem.writes;
    t0 = cyc + 1;
    for (int i = 0; i < 64; i++) begin
      send(OP_SADD, DT_FP, 32'h20, fp_of(i + 1));
      sent++;
    end
    wait_done(sent);
    t1 = last_ack_cyc - t0;
    check("hot word: one read", u_mem.reads - r0 == 1);
    check("hot word: one write", u_mem.writes - w0 == 1);
    check("hot word: total", u_mem.mem[32'h20] == fp_of(64 * 65 / 2));
    check($sformatf("hot word: %0d cycles, expected %0d", t1, MEM_LAT + 64 * FU_LATENCY),
          t1 >= MEM_LAT + 64 * FU_LATENCY && t1 <= MEM_LAT + 64 * FU_LATENCY + 2);

    // 3. Distinct addresses.
    t0 = cyc + 1;
    for (int i = 0; i < 160; i++) begin
      send(OP_SADD, DT_INT, 32'h1000 + i, 64'(i));
      sent++;
    end
    wait_done(sent);
    t1 = last_ack_cyc - t0;
    check($sformatf("distinct: %0d cycles, bound %0d", t1,
                    160 / CS_ENTRIES * (MEM_LAT + FU_LATENCY)),
          t1 >= 160 / CS_ENTRIES * (MEM_LAT + FU_LATENCY) &&
          t1 * 100 <= 160 / CS_ENTRIES * (MEM_LAT + FU_LATENCY) * 115);
    for (int i = 0; i < 160; i++)
      check("distinct: value", u_mem.mem[32'h1000 + i] == 64'(i));

    // 4. Random stress.
    jitter = 24; stall_pct = 15;
    for (int i = 0; i < 64; i++) begin
      automatic addr_t a = 32'h8000 + i;
      automatic int q = int'($urandom_range(0, 2000)) - 1000;
      exp_int[a] = longint'({$urandom, $urandom});
      send(OP_WRITE, DT_INT, a, data_t'(exp_int[a]));
      a = 32'h9000 + i;
      exp_fp[a] = real'(q) / 4.0;
      send(OP_WRITE, DT_FP, a, fp_of(q));
    end
    for (int n = 0; n < 6000; n++) begin
      automatic int unsigned span = ((n / 1000) % 2 == 0) ? 3 : 64;  // hot and wide phases
      automatic addr_t a;
      if ($urandom_range(0, 1) == 0) begin
        automatic longint v = longint'({$urandom, $urandom});
        a = 32'h8000 + $urandom_range(0, span - 1);
        exp_int[a] += v;
        send(OP_SADD, DT_INT, a, data_t'(v));
      end else begin
        automatic int q = int'($urandom_range(0, 2000)) - 1000;
        a = 32'h9000 + $urandom_range(0, span - 1);
        exp_fp[a] += real'(q) / 4.0;
        send(OP_SADD, DT_FP, a, fp_of(q));
      end
      sent++;
      if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    wait_done(sent);
    foreach (exp_int[a]) check($sformatf("int word %h", a), u_mem.mem[a] == data_t'(exp_int[a]));
    foreach (exp_fp[a])  check($sformatf("fp word %h", a),  u_mem.mem[a] == $realtobits(exp_fp[a]));
    check("every scatter-add acknowledged", acks == sent);

    foreach (ev_cnt[i]) begin
      check($sformatf("event %s happened (%0d)", ev_name[i], ev_cnt[i]), ev_cnt[i] > 0);
      $display("event %-12s %0d", ev_name[i], ev_cnt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("state: acks=%0d occ=%0d req_valid=%0d ready=%0d", acks, occupancy, req_valid, req_ready);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
