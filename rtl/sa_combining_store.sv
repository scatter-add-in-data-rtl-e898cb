// sa_combining_store: the combining store of a scatter-add unit.
//
// ENTRIES registers, each holding one accepted scatter-add request that has
// not finished yet: its address, data type, value and the address generator
// that sent it. Like a miss-status register it keeps requests whose current
// memory value is still being fetched, and like a write-combining buffer it
// keeps requests that wait while another addition to the same address is in
// the functional unit. An entry is `busy` while its own value is being added
// in the functional unit, and `pend` while the memory read it needs has not
// been sent yet (the memory port was taken when it arrived).
//
// Four searches are made every cycle, all combinational on the registered
// entries (the first three content-addressed):
//   * arrival:  is any entry (busy or not) holding this address?
//   * return:   a waiting (not busy) entry for the address of a word that
//               came back from memory;
//   * finished: a waiting entry for the address of a sum that has just left
//               the functional unit;
//   * pending:  an entry whose memory read is still to be sent.
// A search returns the lowest-numbered match. It also reports a free entry.
// Updates take effect at the clock edge: one allocation, one read marked
// sent, one entry marked busy and one entry freed per cycle, always on
// different entries.
//
// The two roles, the CAM search and 8 entries follow the design; the field
// layout, the queue of unsent reads, the lowest-index priority and the
// one-update-per-kind-per-cycle ports are this design's own choices.
module sa_combining_store
  import sa_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // searches
  input  addr_t            arr_addr,
  output logic             arr_hit,
  input  addr_t            ret_addr,
  output logic             ret_found,
  output logic [IDX_W-1:0] ret_idx,
  output data_t            ret_val,
  output sa_dtype_e        ret_dtype,
  input  addr_t            fin_addr,
  output logic             fin_found,
  output logic [IDX_W-1:0] fin_idx,
  output data_t            fin_val,
  output sa_dtype_e        fin_dtype,
  output logic             free_found,
  output logic [IDX_W-1:0] free_idx,
  output logic             pf_found,     // some entry still has to send its read
  output logic [IDX_W-1:0] pf_idx,
  output addr_t            pf_addr,
  // read of the source of the entry that a finished sum frees
  input  logic [IDX_W-1:0] rd_idx,
  output logic [3:0]       rd_src,
  // updates
  input  logic             alloc_en,     // write the request into entry free_idx
  input  sa_dtype_e        alloc_dtype,
  input  logic [3:0]       alloc_src,
  input  addr_t            alloc_addr,
  input  data_t            alloc_val,
  input  logic             alloc_pend,   // its memory read is not sent yet
  input  logic             sent_en,      // the read of entry pf_idx is sent
  input  logic             busy_en,      // mark busy_idx as in the functional unit
  input  logic [IDX_W-1:0] busy_idx,
  input  logic             free_en,      // release free_en_idx
  input  logic [IDX_W-1:0] free_en_idx,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  typedef struct packed {
    logic       valid;
    logic       busy;
    logic       pend;
    sa_dtype_e  dtype;
    logic [3:0] src;
    addr_t      addr;
    data_t      val;
  } entry_t;

  entry_t ent [ENTRIES];

  always_comb begin
    arr_hit    = 1'b0;
    ret_found  = 1'b0;
    ret_idx    = '0;
    fin_found  = 1'b0;
    fin_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    pf_found   = 1'b0;
    pf_idx     = '0;
    occupancy  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].valid && ent[i].addr == arr_addr) arr_hit = 1'b1;
      if (ent[i].valid && !ent[i].busy && ent[i].addr == ret_addr) begin
        ret_found = 1'b1;
        ret_idx   = IDX_W'(i);
      end
      if (ent[i].valid && !ent[i].busy && ent[i].addr == fin_addr) begin
        fin_found = 1'b1;
        fin_idx   = IDX_W'(i);
      end
      if (!ent[i].valid) begin
        free_found = 1'b1;
        free_idx   = IDX_W'(i);
      end
      if (ent[i].valid && ent[i].pend) begin
        pf_found = 1'b1;
        pf_idx   = IDX_W'(i);
      end
      if (ent[i].valid) occupancy = occupancy + 1'b1;
    end
  end

  assign ret_val = ent[ret_idx].val;
  assign fin_val = ent[fin_idx].val;
  assign ret_dtype = ent[ret_idx].dtype;
  assign fin_dtype = ent[fin_idx].dtype;
  assign rd_src  = ent[rd_idx].src;
  assign pf_addr = ent[pf_idx].addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      if (alloc_en) begin
        ent[free_idx].valid <= 1'b1;
        ent[free_idx].busy  <= 1'b0;
        ent[free_idx].pend  <= alloc_pend;
        ent[free_idx].dtype <= alloc_dtype;
        ent[free_idx].src   <= alloc_src;
        ent[free_idx].addr  <= alloc_addr;
        ent[free_idx].val   <= alloc_val;
      end
      if (sent_en) ent[pf_idx].pend <= 1'b0;
      if (busy_en) ent[busy_idx].busy <= 1'b1;
      if (free_en) begin
        ent[free_en_idx].valid <= 1'b0;
        ent[free_en_idx].busy  <= 1'b0;
      end
    end
  end

  // Rules the controller must keep.
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_en |-> free_found)
    else $error("combining store: allocation with no free entry");
  a_sent_pending: assert property (@(posedge clk) disable iff (!rst_n)
    sent_en |-> pf_found)
    else $error("combining store: read sent with none pending");
  a_busy_once: assert property (@(posedge clk) disable iff (!rst_n)
    busy_en |-> (ent[busy_idx].valid && !ent[busy_idx].busy && !ent[busy_idx].pend))
    else $error("combining store: entry %0d made busy twice", busy_idx);
  a_free_used: assert property (@(posedge clk) disable iff (!rst_n)
    free_en |-> (ent[free_en_idx].valid && ent[free_en_idx].busy))
    else $error("combining store: freeing entry %0d that is not in use", free_en_idx);

endmodule
