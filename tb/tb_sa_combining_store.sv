// tb_sa_combining_store: self-checking testbench of the combining store.
//
// Keeps its own model of the entries (valid, busy, read pending, address,
// value, type, source) and drives random legal updates: allocations into the
// reported free entry (with or without a pending read), sending the reported
// pending read, marking waiting entries busy, freeing busy entries. Addresses
// come from a small pool so that searches hit often. Every cycle it checks the
// searches (arrival hit, lowest waiting match for the returned and the
// finished address, with their value and type, lowest pending read with its
// address), the free-entry search, the
// source read port and the occupancy against the model. It also fills the
// store completely, to check that no free entry is then reported.
module tb_sa_combining_store;
  import sa_pkg::*;

  localparam int unsigned ENTRIES = 8;
  localparam int unsigned IDX_W   = 3;
  localparam int unsigned NCYC    = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t arr_addr, ret_addr, fin_addr;
  logic arr_hit, ret_found, fin_found, free_found, pf_found;
  logic [IDX_W-1:0] ret_idx, fin_idx, free_idx, rd_idx, busy_idx, free_en_idx, pf_idx;
  addr_t pf_addr;
  logic alloc_pend, sent_en;
  data_t ret_val, fin_val, alloc_val;
  sa_dtype_e ret_dtype, fin_dtype, alloc_dtype;
  logic [3:0] rd_src, alloc_src;
  logic alloc_en, busy_en, free_en;
  addr_t alloc_addr;
  logic [$clog2(ENTRIES+1)-1:0] occupancy;

  sa_combining_store #(.ENTRIES(ENTRIES), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int full_seen = 0;

  typedef struct {
    logic v, b, p; addr_t a; data_t d; sa_dtype_e t; logic [3:0] s;
  } m_t;
  m_t m [ENTRIES];

  function automatic addr_t pool_addr();
    return addr_t'($urandom_range(0, 5)) * 32'h100 + 32'h40;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Model searches.
  task automatic model_check();
    logic e_arr, e_ret, e_fin, e_free, e_pf;
    int i_ret, i_fin, i_free, i_pf, occ;
    e_arr = 0; e_ret = 0; e_fin = 0; e_free = 0; e_pf = 0;
    i_ret = 0; i_fin = 0; i_free = 0; i_pf = 0; occ = 0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (m[i].v && m[i].a == arr_addr) e_arr = 1;
      if (m[i].v && !m[i].b && m[i].a == ret_addr) begin e_ret = 1; i_ret = i; end
      if (m[i].v && !m[i].b && m[i].a == fin_addr) begin e_fin = 1; i_fin = i; end
      if (!m[i].v) begin e_free = 1; i_free = i; end
      if (m[i].v && m[i].p) begin e_pf = 1; i_pf = i; end
      if (m[i].v) occ++;
    end
    check("arrival hit", arr_hit == e_arr);
    check("return search", ret_found == e_ret && (!e_ret || (int'(ret_idx) == i_ret &&
          ret_val == m[i_ret].d && ret_dtype == m[i_ret].t)));
    check("finish search", fin_found == e_fin && (!e_fin || (int'(fin_idx) == i_fin &&
          fin_val == m[i_fin].d && fin_dtype == m[i_fin].t)));
    check("free search", free_found == e_free && (!e_free || int'(free_idx) == i_free));
    check("pending search", pf_found == e_pf && (!e_pf || (int'(pf_idx) == i_pf &&
          pf_addr == m[i_pf].a)));
    check("occupancy", int'(occupancy) == occ);
    check("source read", !m[rd_idx].v || rd_src == m[rd_idx].s);
    if (occ == ENTRIES) full_seen++;
  endtask

  initial begin
    alloc_en = 0; busy_en = 0; free_en = 0; busy_idx = '0; free_en_idx = '0;
    arr_addr = '0; ret_addr = '0; fin_addr = '0; rd_idx = '0;
    alloc_addr = '0; alloc_val = '0; alloc_dtype = DT_INT; alloc_src = '0;
    alloc_pend = 0; sent_en = 0;
    for (int i = 0; i < ENTRIES; i++) m[i] = '{0, 0, 0, '0, '0, DT_INT, '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      int bi, fi, si;
      @(negedge clk);
      arr_addr = pool_addr();
      ret_addr = pool_addr();
      fin_addr = pool_addr();
      rd_idx   = IDX_W'($urandom);
      #1;
      model_check();
      // Choose updates on different entries. Phases bias towards filling or draining.
      alloc_en = free_found && ($urandom_range(0, 9) < (((c / 500) % 2 == 0) ? 8 : 3));
      alloc_addr = pool_addr(); alloc_val = {$urandom, $urandom};
      alloc_dtype = sa_dtype_e'($urandom_range(0, 1)); alloc_src = 4'($urandom);
      alloc_pend = $urandom_range(0, 1);
      sent_en = pf_found && $urandom_range(0, 2) == 0;
      si = sent_en ? int'(pf_idx) : -1;
      bi = -1; fi = -1;
      for (int k = 0; k < ENTRIES; k++) begin
        automatic int i = (k + c) % ENTRIES;
        if (m[i].v && !m[i].b && !m[i].p && bi < 0 && $urandom_range(0, 2) == 0) bi = i;
        if (m[i].v &&  m[i].b && fi < 0 && $urandom_range(0, 2) == 0) fi = i;
      end
      busy_en = bi >= 0; busy_idx = IDX_W'(bi < 0 ? 0 : bi);
      free_en = fi >= 0; free_en_idx = IDX_W'(fi < 0 ? 0 : fi);
      @(posedge clk);
      #1;
      if (alloc_en) m[free_idx_q] = '{1, 0, alloc_pend, alloc_addr, alloc_val, alloc_dtype, alloc_src};
      if (sent_en) m[si].p = 0;
      if (busy_en) m[bi].b = 1;
      if (free_en) begin m[fi].v = 0; m[fi].b = 0; end
    end
    check("store was filled completely", full_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The free index the store used at the last edge.
  logic [IDX_W-1:0] free_idx_q;
  always @(posedge clk) free_idx_q <= free_idx;

  initial begin
    repeat (NCYC * 2 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
