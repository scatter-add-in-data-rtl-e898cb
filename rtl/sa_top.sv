// sa_top: the scatter-add memory side of one stream-processor node.
//
// The node's address generators turn a scatter-add (or an ordinary scatter)
// instruction into a stream of word requests. The crossbar sa_bank_xbar sends
// each request to the cache bank that owns its address, and in front of each
// of the NUM_BANKS banks sits one scatter-add unit (sa_unit), which combines
// and performs the additions and passes plain writes through. Each bank's
// memory port (towards the cache bank and DRAM interface, which are not part
// of this RTL) is brought out as ports of this module.
//
// Completion: every finished scatter-add is acknowledged to the generator
// that issued it; since several banks may finish in one cycle, each generator
// gets a count (ag_ack_cnt) per cycle. A generator knows its scatter-add
// instruction is complete when it has counted as many acknowledgements as it
// issued requests. `idle` is high when no combining store holds an entry.
//
// From the design: 8 banks with one scatter-add unit each, 8 combining-store
// entries and a 4-cycle functional unit per unit, 2 address generators. The
// acknowledgement count, the idle flag and the event outputs are this
// design's own choices. Timing: see sa_unit; the crossbar adds no cycles.
module sa_top
  import sa_pkg::*;
#(
  parameter int unsigned NUM_AG     = 2,
  parameter int unsigned NUM_BANKS  = 8,
  parameter int unsigned CS_ENTRIES = 8,
  parameter int unsigned FU_LATENCY = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // address generators
  input  logic       ag_valid   [NUM_AG],
  output logic       ag_ready   [NUM_AG],
  input  ag_req_t    ag_req     [NUM_AG],
  output logic [$clog2(NUM_BANKS+1)-1:0] ag_ack_cnt [NUM_AG],
  // one memory port per cache bank
  output logic       mem_req_valid  [NUM_BANKS],
  input  logic       mem_req_ready  [NUM_BANKS],
  output mem_req_t   mem_req        [NUM_BANKS],
  input  logic       mem_resp_valid [NUM_BANKS],
  output logic       mem_resp_ready [NUM_BANKS],
  input  mem_resp_t  mem_resp       [NUM_BANKS],
  // status
  output sa_events_t bank_ev [NUM_BANKS],
  output logic       idle
);

  localparam int unsigned OCC_W = $clog2(CS_ENTRIES + 1);

  logic       bk_valid [NUM_BANKS];
  logic       bk_ready [NUM_BANKS];
  sa_req_t    bk_req   [NUM_BANKS];
  logic       ack_valid [NUM_BANKS];
  logic [3:0] ack_src   [NUM_BANKS];
  logic [OCC_W-1:0] occ [NUM_BANKS];

  sa_bank_xbar #(.NUM_AG(NUM_AG), .NUM_BANKS(NUM_BANKS)) u_xbar (
    .clk, .rst_n,
    .ag_valid, .ag_ready, .ag_req,
    .bk_valid, .bk_ready, .bk_req
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    sa_unit #(.CS_ENTRIES(CS_ENTRIES), .FU_LATENCY(FU_LATENCY)) u_sa (
      .clk, .rst_n,
      .req_valid      (bk_valid[b]),
      .req_ready      (bk_ready[b]),
      .req            (bk_req[b]),
      .ack_valid      (ack_valid[b]),
      .ack_src        (ack_src[b]),
      .mem_req_valid  (mem_req_valid[b]),
      .mem_req_ready  (mem_req_ready[b]),
      .mem_req        (mem_req[b]),
      .mem_resp_valid (mem_resp_valid[b]),
      .mem_resp_ready (mem_resp_ready[b]),
      .mem_resp       (mem_resp[b]),
      .ev             (bank_ev[b]),
      .occupancy      (occ[b])
    );
  end

  always_comb begin
    for (int g = 0; g < NUM_AG; g++) begin
      ag_ack_cnt[g] = '0;
      for (int b = 0; b < NUM_BANKS; b++)
        if (ack_valid[b] && int'(ack_src[b]) == g) ag_ack_cnt[g] = ag_ack_cnt[g] + 1'b1;
    end
    idle = 1'b1;
    for (int b = 0; b < NUM_BANKS; b++)
      if (occ[b] != 0) idle = 1'b0;
  end

endmodule
