// sa_bank_xbar: distributes address-generator requests over the cache banks.
//
// The on-chip cache is partitioned by address, and each bank has its own
// scatter-add unit, so every request must reach the bank that owns its
// address. Bank number = the low log2(NUM_BANKS) bits of the word address
// (word interleaving). Each bank has a round-robin arbiter over the address
// generators that want it this cycle; the grant pointer moves past the
// winner after every accepted transfer. A generator's request leaves when its
// bank grants it and the bank's scatter-add unit is ready, and is tagged with
// the generator's number, so that acknowledgements can be returned to it.
// Requests of different generators to different banks move in the same cycle.
// Purely combinational except for the arbiter pointers; no buffering.
//
// From the design: two address generators, eight address-partitioned banks.
// This design's own choices: the interleaving function, round-robin
// arbitration and the absence of queues in front of the banks.
module sa_bank_xbar
  import sa_pkg::*;
#(
  parameter int unsigned NUM_AG    = 2,
  parameter int unsigned NUM_BANKS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ag_valid [NUM_AG],
  output logic     ag_ready [NUM_AG],
  input  ag_req_t  ag_req   [NUM_AG],
  output logic     bk_valid [NUM_BANKS],
  input  logic     bk_ready [NUM_BANKS],
  output sa_req_t  bk_req   [NUM_BANKS]
);

  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned AG_W   = (NUM_AG > 1) ? $clog2(NUM_AG) : 1;

  function automatic int unsigned bank_of(input addr_t a);
    return (NUM_BANKS > 1) ? int'(a[BANK_W-1:0]) % NUM_BANKS : 0;
  endfunction

  logic [AG_W-1:0] rr_ptr [NUM_BANKS];   // highest-priority generator
  logic [AG_W-1:0] winner [NUM_BANKS];
  logic            any    [NUM_BANKS];

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      any[b]    = 1'b0;
      winner[b] = '0;
      // Scan the generators starting at the pointer; the first one found wins.
      for (int k = NUM_AG - 1; k >= 0; k--) begin
        int unsigned g;
        g = (int'(rr_ptr[b]) + k) % NUM_AG;
        if (ag_valid[g] && bank_of(ag_req[g].addr) == b) begin
          any[b]    = 1'b1;
          winner[b] = AG_W'(g);
        end
      end
      bk_valid[b]     = any[b];
      bk_req[b].op    = ag_req[winner[b]].op;
      bk_req[b].dtype = ag_req[winner[b]].dtype;
      bk_req[b].src   = 4'(winner[b]);
      bk_req[b].addr  = ag_req[winner[b]].addr;
      bk_req[b].data  = ag_req[winner[b]].data;
    end
  end

  // Kept apart from the block above: the banks' ready depends on the request
  // they are shown, so ready must not feed back into the selection.
  always_comb begin
    for (int g = 0; g < NUM_AG; g++) begin
      ag_ready[g] = 1'b0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (any[b] && int'(winner[b]) == g && bk_ready[b]) ag_ready[g] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) rr_ptr[b] <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (any[b] && bk_ready[b])
          rr_ptr[b] <= AG_W'((int'(winner[b]) + 1) % NUM_AG);
      end
    end
  end

  initial begin
    assert (NUM_AG <= 16) else $error("sa_bank_xbar: at most 16 address generators");
  end

endmodule
