// sa_fu: the scatter-add functional unit.
//
// Adds two 64-bit words, as wrapping integers or as IEEE-754 doubles, and
// delivers the sum LATENCY cycles after it was issued, together with a tag
// that tells the combining controller which combining-store entry and which
// address the sum belongs to. A new addition can be issued every cycle.
//
// The sum is formed combinationally at the input and then carried through
// LATENCY pipeline registers; a synthesis tool with register retiming spreads
// the adder over those stages. The whole pipeline holds when `en` is low
// (the controller lowers it when a finished sum cannot leave), so valid
// results are never dropped. `en` also gates issue: an addition is only taken
// on a cycle with `en` high.
//
// From the design: integer and floating-point addition, a pipelined unit, a
// latency of 4 cycles (1 ns cycles at 1 GHz). This design's own choices: the
// tag format, the whole-pipeline stall, and the placement of the adder logic.
module sa_fu
  import sa_pkg::*;
#(
  parameter int unsigned LATENCY = 4,
  parameter int unsigned IDX_W   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,         // advance the pipeline
  // issue
  input  logic             in_valid,
  input  sa_dtype_e        in_dtype,
  input  data_t            in_a,
  input  data_t            in_b,
  input  logic [IDX_W-1:0] in_idx,
  input  addr_t            in_addr,
  // result
  output logic             out_valid,
  output sa_dtype_e        out_dtype,
  output data_t            out_sum,
  output logic [IDX_W-1:0] out_idx,
  output addr_t            out_addr
);

  typedef struct packed {
    logic             valid;
    sa_dtype_e        dtype;
    data_t            sum;
    logic [IDX_W-1:0] idx;
    addr_t            addr;
  } stage_t;

  data_t  fp_sum;
  stage_t first;
  stage_t pipe [LATENCY];

  fp64_add u_fp (.a(in_a), .b(in_b), .y(fp_sum));

  always_comb begin
    first.valid = in_valid;
    first.dtype = in_dtype;
    first.sum   = (in_dtype == DT_FP) ? fp_sum : in_a + in_b;
    first.idx   = in_idx;
    first.addr  = in_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= '0;
    end else if (en) begin
      pipe[0] <= first;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign out_valid = pipe[LATENCY-1].valid;
  assign out_dtype = pipe[LATENCY-1].dtype;
  assign out_sum   = pipe[LATENCY-1].sum;
  assign out_idx   = pipe[LATENCY-1].idx;
  assign out_addr  = pipe[LATENCY-1].addr;

  initial begin
    assert (LATENCY >= 1) else $error("sa_fu: LATENCY must be at least 1");
  end

endmodule
