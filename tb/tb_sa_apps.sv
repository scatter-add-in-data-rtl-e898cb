// tb_sa_apps: the workloads of the scatter-add evaluation, run on the node's
// scatter-add memory side at its default configuration.
//
// Same set-up as tb_sa_top (8 banks, each with the behavioural bank/memory
// model of 16-cycle latency plus 0..8 random cycles; both address generators
// driven at once). Bins start at zero (unwritten memory reads as zero), each
// run in its own address region. Workloads:
//   1. Histogram of 16,384 and of 32,768 uniformly random integers over 1,
//      4, 16, 64, 256, 1K, 4K, 16K, 64K, 256K, 1M and 4M bins (scatter-add of
//      the constant 1).
//   2. Histogram over 2,048 bins of 256, 512, 1K, 2K, 4K and 8K elements.
//   3. Histogram of 1,024 and of 32,768 elements over 128 to 8,192 bins.
//   4. Element-by-element sparse matrix-vector product: 38K double-precision
//      scatter-adds over 10,240 result words.
//   5. Molecular-dynamics force accumulation: 590K double-precision
//      scatter-adds over 8,192 force words.
// The index streams are synthetic (uniformly random), of the stated sizes;
// the values are multiples of 0.25 so every sum is exact in any order. Every
// touched word is compared with the testbench's own sum, and a sample of
// untouched words must still be zero. The testbench prints the additions per
// cycle of each run and checks two trends: the hot-bank effect (with a single
// bin every update goes to one bank and one address, so the run must be
// several times slower than with 64 bins spread over all banks), and linear
// scaling with the input length (from 1K elements on, the additions per cycle
// stay within 20% of those at 8K). The memory model has no cache, so the
// slowdown that very large bin ranges would see from cache misses is not
// part of these runs.
module tb_sa_apps;
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

  // Scatter-add n updates to words base + idx; integer constant 1 or random doubles.
  task automatic scatter(input string name, input int n, input int range, input addr_t base,
                         input logic fp, output longint cycles);
    longint icnt [int];
    real    fsum [int];
    longint t0;
    for (int i = 0; i < n; i++) begin
      int k = int'($urandom_range(0, range - 1));
      if (fp) begin
        int q = int'($urandom_range(0, 4000)) - 2000;
        if (!fsum.exists(k)) fsum[k] = 0.0;
        fsum[k] += real'(q) / 4.0;
        work[i % NUM_AG].push_back('{OP_SADD, DT_FP, base + addr_t'(k), $realtobits(real'(q) / 4.0)});
      end else begin
        if (!icnt.exists(k)) icnt[k] = 0;
        icnt[k]++;
        work[i % NUM_AG].push_back('{OP_SADD, DT_INT, base + addr_t'(k), 64'd1});
      end
    end
    t0 = cyc;
    run_all();
    cycles = cyc - t0;
    $display("%-28s n=%0d range=%0d: %0d cycles, %.2f additions per cycle",
             name, n, range, cycles, real'(n) / real'(cycles));
    if (fp) begin
      int bad = 0;
      foreach (fsum[k]) if (peek(base + addr_t'(k)) != $realtobits(fsum[k])) bad++;
      check($sformatf("%s: %0d wrong words", name, bad), bad == 0);
    end else begin
      int bad = 0;
      foreach (icnt[k]) if (peek(base + addr_t'(k)) != data_t'(icnt[k])) bad++;
      check($sformatf("%s: %0d wrong bins", name, bad), bad == 0);
    end
    for (int j = 0; j < 64; j++) begin
      int k = int'($urandom_range(0, range - 1));
      if (!(fp ? fsum.exists(k) : icnt.exists(k)))
        check($sformatf("%s: untouched word %0d is zero", name, k), peek(base + addr_t'(k)) == 0);
    end
  endtask

  initial begin
    int ranges [12] = '{1, 4, 16, 64, 256, 1024, 4096, 16384, 65536, 262144, 1048576, 4194304};
    longint cyc_r [12];
    longint cyc_n [6];
    longint c;
    for (int g = 0; g < NUM_AG; g++) begin
      ag_valid[g] = 1'b0; ag_req[g] = '0; acks[g] = 0; sent[g] = 0;
    end
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    foreach (ranges[r])
      scatter("histogram", 16384, ranges[r], addr_t'(r) << 23, 1'b0, cyc_r[r]);
    check($sformatf("hot-bank effect: 1 bin %0d cycles vs 64 bins %0d", cyc_r[0], cyc_r[3]),
          cyc_r[0] > 3 * cyc_r[3]);
    foreach (ranges[r])
      scatter("histogram", 32768, ranges[r], addr_t'(r + 12) << 23, 1'b0, cyc_r[r]);
    check($sformatf("hot-bank effect: 1 bin %0d cycles vs 64 bins %0d", cyc_r[0], cyc_r[3]),
          cyc_r[0] > 3 * cyc_r[3]);

    for (int k = 0; k < 6; k++)
      scatter("histogram", 256 << k, 2048, 32'hE000_0000 + (addr_t'(k) << 16), 1'b0, cyc_n[k]);
    for (int k = 2; k < 5; k++)
      check($sformatf("linear in length: %0d elements %0d cycles, 8192 elements %0d",
                      256 << k, cyc_n[k], cyc_n[5]),
            longint'(256 << k) * cyc_n[5] * 100 >= 8192 * cyc_n[k] * 80);

    for (int k = 0; k < 14; k++)
      scatter("histogram", (k < 7) ? 1024 : 32768, 128 << (k % 7),
              32'hF000_0000 + (addr_t'(k) << 16), 1'b0, c);

    scatter("sparse mat-vec (EBE)", 38000, 10240, 32'hC000_0000, 1'b1, c);
    scatter("molecular dynamics", 590000, 8192, 32'hD000_0000, 1'b1, c);

    check("acknowledgements match requests", acks[0] == sent[0] && acks[1] == sent[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
