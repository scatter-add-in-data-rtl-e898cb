// tb_sa_top: end-to-end testbench of the node's scatter-add memory side, at
// the default configuration (2 address generators, 8 banks, 8-entry combining
// stores, 4-cycle functional units).
//
// Each bank is connected to the behavioural bank/memory model (16-cycle read
// latency plus 0..8 cycles of random extra latency, one access per cycle).
// Both address generators are driven at once, each with its half of the
// input, as the processor would split a stream. The workloads:
//   1. Plain scatter (bypass): clear the bins with ordinary writes.
//   2. Histogram of 32,768 random integers over 2,048 bins: scatter-add of
//      the constant 1 to bin[data[i]].
//   3. Histogram of 32,768 random integers over 16 bins: the same addresses
//      recur constantly (heavy combining, few banks busy).
//   4. Superposition: 8,192 double-precision scatter-adds over 1,024 words
//      (values multiples of 0.25, so every sum is exact in any order).
// After each scatter-add the testbench waits until each generator has counted
// as many acknowledgements as it sent requests and the unit is idle, then
// compares every bin with its own count. It counts the mechanisms of the
// design and fails if one never happened: bypass, full-store stall,
// combining, fetch, recirculation, write-back, held memory return,
// same-address hold, crossbar conflict (both generators wanting one bank) and
// several banks accepting in the same cycle. Rates (additions per cycle) are
// printed for each workload.
module tb_sa_top;
  import sa_pkg::*;

  localparam int unsigned NUM_AG = 2, NUM_BANKS = 8, MEM_LAT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      ag_valid [NUM_AG];
  logic      ag_ready [NUM_AG];
  ag_req_t   ag_req   [NUM_AG];
  logic [$clog2(NUM_BANKS+1)-1:0] ag_ack_cnt [NUM_AG];
  logic      mem_req_valid  [NUM_BANKS];
  logic      mem_req_ready  [NUM_BANKS];
  mem_req_t  mem_req        [NUM_BANKS];
  logic      mem_resp_valid [NUM_BANKS];
  logic      mem_resp_ready [NUM_BANKS];
  mem_resp_t mem_resp       [NUM_BANKS];
  sa_events_t bank_ev [NUM_BANKS];
  logic idle;
  int unsigned jitter = 8, stall_pct = 0;

  sa_top dut (.*);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_mem
    sa_mem_model #(.LATENCY(MEM_LAT), .INTERVAL(1)) u_mem (
      .clk, .rst_n, .jitter, .stall_pct,
      .mem_req_valid (mem_req_valid[b]),  .mem_req_ready (mem_req_ready[b]),
      .mem_req       (mem_req[b]),
      .mem_resp_valid(mem_resp_valid[b]), .mem_resp_ready(mem_resp_ready[b]),
      .mem_resp      (mem_resp[b]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint acks [NUM_AG];
  longint sent [NUM_AG];
  int ev_cnt [10];
  string ev_name [10] = '{"bypass", "full_stall", "combine", "fetch", "recirc", "writeback",
                          "ret_stall", "hazard_stall", "xbar_conflict", "multi_bank"};

  always @(posedge clk) cyc <= cyc + 1;

  // Monitor at the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      automatic int moved = 0;
      for (int g = 0; g < NUM_AG; g++) acks[g] += longint'(ag_ack_cnt[g]);
      for (int b = 0; b < NUM_BANKS; b++) begin
        ev_cnt[0] += int'(bank_ev[b].bypass);
        ev_cnt[1] += int'(bank_ev[b].full_stall);
        ev_cnt[2] += int'(bank_ev[b].combine);
        ev_cnt[3] += int'(bank_ev[b].fetch);
        ev_cnt[4] += int'(bank_ev[b].recirc);
        ev_cnt[5] += int'(bank_ev[b].writeback);
        ev_cnt[6] += int'(bank_ev[b].ret_stall);
        ev_cnt[7] += int'(bank_ev[b].hazard_stall);
      end
      if (ag_valid[0] && ag_valid[1] && ag_req[0].addr[2:0] == ag_req[1].addr[2:0]) ev_cnt[8]++;
      for (int g = 0; g < NUM_AG; g++) if (ag_valid[g] && ag_ready[g]) moved++;
      if (moved > 1) ev_cnt[9]++;
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // One address generator: send its requests, one per cycle at most.
  typedef struct { sa_op_e op; sa_dtype_e dt; addr_t a; data_t d; } rq_t;
  rq_t work [NUM_AG][$];

  task automatic run_ag(input int g);
    while (work[g].size() > 0) begin
      rq_t r = work[g].pop_front();
      @(negedge clk);
      ag_valid[g] = 1'b1;
      ag_req[g].op = r.op; ag_req[g].dtype = r.dt; ag_req[g].addr = r.a; ag_req[g].data = r.d;
      #1;
      while (!ag_ready[g]) begin
        @(negedge clk);
        #1;
      end
      if (r.op == OP_SADD) sent[g]++;
      @(posedge clk);
      #1 ag_valid[g] = 1'b0;
    end
  endtask

  task automatic run_all();
    fork
      run_ag(0);
      run_ag(1);
    join
    // Complete: every request acknowledged to its own generator, stores empty.
    while (!(acks[0] == sent[0] && acks[1] == sent[1] && idle)) @(negedge clk);
    repeat (2) @(posedge clk);
  endtask

  function automatic data_t peek(input addr_t a);
    data_t v = '0;
    case (int'(a[2:0]))
      0: if (g_mem[0].u_mem.mem.exists(a)) v = g_mem[0].u_mem.mem[a];
      1: if (g_mem[1].u_mem.mem.exists(a)) v = g_mem[1].u_mem.mem[a];
      2: if (g_mem[2].u_mem.mem.exists(a)) v = g_mem[2].u_mem.mem[a];
      3: if (g_mem[3].u_mem.mem.exists(a)) v = g_mem[3].u_mem.mem[a];
      4: if (g_mem[4].u_mem.mem.exists(a)) v = g_mem[4].u_mem.mem[a];
      5: if (g_mem[5].u_mem.mem.exists(a)) v = g_mem[5].u_mem.mem[a];
      6: if (g_mem[6].u_mem.mem.exists(a)) v = g_mem[6].u_mem.mem[a];
      default: if (g_mem[7].u_mem.mem.exists(a)) v = g_mem[7].u_mem.mem[a];
    endcase
    return v;
  endfunction

  task automatic histogram(input int n, input int range, input addr_t base);
    longint cnt [];
    longint t0;
    cnt = new[range];
    foreach (cnt[i]) cnt[i] = 0;
    // Clear the bins with plain writes (the bypass path).
    for (int i = 0; i < range; i++)
      work[i % NUM_AG].push_back('{OP_WRITE, DT_INT, base + addr_t'(i), 64'd0});
    run_all();
    t0 = cyc;
    for (int i = 0; i < n; i++) begin
      int bin = int'($urandom_range(0, range - 1));
      cnt[bin]++;
      work[i % NUM_AG].push_back('{OP_SADD, DT_INT, base + addr_t'(bin), 64'd1});
    end
    run_all();
    $display("histogram n=%0d range=%0d: %0d cycles, %.2f additions per cycle",
             n, range, cyc - t0, real'(n) / real'(cyc - t0));
    for (int i = 0; i < range; i++)
      check($sformatf("bin %0d of %0d", i, range), peek(base + addr_t'(i)) == data_t'(cnt[i]));
  endtask

  task automatic superposition(input int n, input int range, input addr_t base);
    real sum [];
    longint t0;
    sum = new[range];
    foreach (sum[i]) sum[i] = 0.0;
    for (int i = 0; i < range; i++)
      work[i % NUM_AG].push_back('{OP_WRITE, DT_FP, base + addr_t'(i), $realtobits(0.0)});
    run_all();
    t0 = cyc;
    for (int i = 0; i < n; i++) begin
      int k = int'($urandom_range(0, range - 1));
      int q = int'($urandom_range(0, 4000)) - 2000;
      sum[k] += real'(q) / 4.0;
      work[i % NUM_AG].push_back('{OP_SADD, DT_FP, base + addr_t'(k), $realtobits(real'(q) / 4.0)});
    end
    run_all();
    $display("superposition n=%0d range=%0d: %0d cycles, %.2f additions per cycle",
             n, range, cyc - t0, real'(n) / real'(cyc - t0));
    for (int i = 0; i < range; i++)
      check($sformatf("word %0d of %0d", i, range), peek(base + addr_t'(i)) == $realtobits(sum[i]));
  endtask

  initial begin
    for (int g = 0; g < NUM_AG; g++) begin
      ag_valid[g] = 1'b0; ag_req[g] = '0; acks[g] = 0; sent[g] = 0;
    end
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    histogram(32768, 2048, 32'h0001_0000);
    histogram(32768, 16,   32'h0002_0000);
    superposition(8192, 1024, 32'h0003_0000);

    check("acknowledgements match requests", acks[0] == sent[0] && acks[1] == sent[1]);
    foreach (ev_cnt[i]) begin
      $display("event %-14s %0d", ev_name[i], ev_cnt[i]);
      check($sformatf("mechanism %s happened", ev_name[i]), ev_cnt[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
