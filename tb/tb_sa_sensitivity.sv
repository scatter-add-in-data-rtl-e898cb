// tb_sa_sensitivity: the combining-store sensitivity experiments.
//
// Runs, side by side, one scatter-add unit per configuration (sa_sens_run),
// each with the behavioural memory of fixed latency and throughput and no
// cache, and 512 histogram updates (scatter-add of 1):
//   Latency sweep (65,536 bins, one memory access every 2 cycles): combining
//   stores of 2, 4, 8, 16 and 64 entries; memory latency 8, 16, 64 and 256
//   cycles with a 4-cycle functional unit, and functional-unit latency 2, 8
//   and 16 cycles with 16-cycle memory.
//   Throughput sweep (16-cycle memory, 4-cycle functional unit): the same
//   store sizes; 1, 2, 4 and 16 cycles between memory accesses; 16 and 65,536
//   bins.
// Every run must produce the right bins. The testbench prints the run times
// and checks the trends the design is meant to show:
//   * a larger store never makes a run slower (5% slack);
//   * with 16 or more entries the run time hardly depends on the functional
//     unit's latency (within 10%);
//   * with 64 entries even a 256-cycle memory costs little (within 25% of
//     the 8-cycle memory);
//   * with 16 bins some updates combine in the store: fewer memory accesses
//     than the 65,536-bin run and no longer run time, for every store size;
//     with 64 entries most of them combine (fewer than half the accesses);
//   * no store size overcomes a slow memory: with 65,536 bins and one access
//     every 16 cycles every run needs at least 512 x 2 x 16 cycles (within
//     1%), the time of its memory accesses alone.
module tb_sa_sensitivity;

  localparam int NCS = 5;
  localparam int CS_T  [NCS] = '{2, 4, 8, 16, 64};
  // Latency sweep: {memory latency, FU latency}
  localparam int NLAT = 7;
  localparam int MLAT_T [NLAT] = '{8, 16, 64, 256, 16, 16, 16};
  localparam int FLAT_T [NLAT] = '{4, 4, 4, 4, 2, 8, 16};
  // Throughput sweep
  localparam int NIV = 4;
  localparam int IV_T [NIV] = '{1, 2, 4, 16};
  localparam int RNG_T [2] = '{16, 65536};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic   l_done [NCS][NLAT];
  longint l_cyc  [NCS][NLAT];
  longint l_acc  [NCS][NLAT];
  int     l_bad  [NCS][NLAT];
  logic   t_done [NCS][NIV][2];
  longint t_cyc  [NCS][NIV][2];
  longint t_acc  [NCS][NIV][2];
  int     t_bad  [NCS][NIV][2];

  for (genvar c = 0; c < NCS; c++) begin : g_cs
    for (genvar l = 0; l < NLAT; l++) begin : g_lat
      sa_sens_run #(.CS_ENTRIES(CS_T[c]), .FU_LATENCY(FLAT_T[l]), .MEM_LAT(MLAT_T[l]),
                    .INTERVAL(2), .RANGE(65536), .N(512)) u_run (
        .clk, .rst_n, .start, .done(l_done[c][l]), .cycles(l_cyc[c][l]),
        .accesses(l_acc[c][l]), .wrong(l_bad[c][l]));
    end
    for (genvar v = 0; v < NIV; v++) begin : g_iv
      for (genvar r = 0; r < 2; r++) begin : g_rng
        sa_sens_run #(.CS_ENTRIES(CS_T[c]), .FU_LATENCY(4), .MEM_LAT(16),
                      .INTERVAL(IV_T[v]), .RANGE(RNG_T[r]), .N(512)) u_run (
          .clk, .rst_n, .start, .done(t_done[c][v][r]), .cycles(t_cyc[c][v][r]),
          .accesses(t_acc[c][v][r]), .wrong(t_bad[c][v][r]));
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic all_done();
    for (int c = 0; c < NCS; c++) begin
      for (int l = 0; l < NLAT; l++) if (!l_done[c][l]) return 1'b0;
      for (int v = 0; v < NIV; v++) for (int r = 0; r < 2; r++) if (!t_done[c][v][r]) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    start = 1'b1;
    while (!all_done()) @(posedge clk);

    $display("latency sweep, cycles (65,536 bins, 1 access / 2 cycles)");
    $display("entries  MEM8/FU4 MEM16/FU4 MEM64/FU4 MEM256/FU4 MEM16/FU2 MEM16/FU8 MEM16/FU16");
    for (int c = 0; c < NCS; c++)
      $display("%7d %9d %9d %9d %10d %9d %9d %10d", CS_T[c], l_cyc[c][0], l_cyc[c][1],
               l_cyc[c][2], l_cyc[c][3], l_cyc[c][4], l_cyc[c][5], l_cyc[c][6]);
    $display("throughput sweep, cycles (accesses) for 16 / 65,536 bins");
    for (int c = 0; c < NCS; c++)
      for (int v = 0; v < NIV; v++)
        $display("entries %2d interval %2d: %6d (%4d) / %6d (%4d)", CS_T[c], IV_T[v],
                 t_cyc[c][v][0], t_acc[c][v][0], t_cyc[c][v][1], t_acc[c][v][1]);

    for (int c = 0; c < NCS; c++) begin
      for (int l = 0; l < NLAT; l++)
        check($sformatf("bins correct, %0d entries, latency config %0d", CS_T[c], l), l_bad[c][l] == 0);
      for (int v = 0; v < NIV; v++)
        for (int r = 0; r < 2; r++)
          check($sformatf("bins correct, %0d entries, interval %0d, %0d bins", CS_T[c], IV_T[v], RNG_T[r]),
                t_bad[c][v][r] == 0);
    end
    for (int c = 1; c < NCS; c++) begin
      for (int l = 0; l < NLAT; l++)
        check($sformatf("more entries not slower: %0d vs %0d entries, latency config %0d",
                        CS_T[c], CS_T[c-1], l), l_cyc[c][l] * 100 <= l_cyc[c-1][l] * 105);
    end
    for (int c = 3; c < NCS; c++)
      for (int l = 4; l < NLAT; l++)
        check($sformatf("%0d entries: FU latency hardly matters (%0d vs %0d)", CS_T[c],
                        l_cyc[c][l], l_cyc[c][1]),
              l_cyc[c][l] * 100 <= l_cyc[c][1] * 110 && l_cyc[c][1] * 100 <= l_cyc[c][l] * 110);
    check($sformatf("64 entries tolerate 256-cycle memory (%0d vs %0d)", l_cyc[4][3], l_cyc[4][0]),
          l_cyc[4][3] * 100 <= l_cyc[4][0] * 125);
    for (int c = 0; c < NCS; c++)
      for (int v = 0; v < NIV; v++) begin
        check($sformatf("16 bins: fewer accesses, not slower, %0d entries, interval %0d",
                        CS_T[c], IV_T[v]),
              t_acc[c][v][0] < t_acc[c][v][1] && t_cyc[c][v][0] <= t_cyc[c][v][1]);
        if (CS_T[c] == 64)
          check($sformatf("combining cuts traffic, 64 entries, interval %0d", IV_T[v]),
                t_acc[c][v][0] * 2 < t_acc[c][v][1]);
      end
    for (int c = 0; c < NCS; c++)
      check($sformatf("slow memory bounds the run, %0d entries: %0d cycles", CS_T[c], t_cyc[c][3][1]),
            t_cyc[c][3][1] * 100 >= 512 * 2 * 16 * 99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
