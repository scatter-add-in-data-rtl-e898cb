// tb_sa_fu: self-checking testbench of the scatter-add functional unit.
//
// Issues a stream of integer and double additions, one per cycle with random
// gaps and random pipeline holds, and checks every result against a
// reference computed with the simulator's own double arithmetic
// ($bitstoreal / $realtobits) or 64-bit integer addition. The operands mix
// random bit patterns, values of similar magnitude (cancellation), subnormals,
// zeros of both signs, infinities, NaNs and values near overflow. It also
// checks that each result appears exactly LATENCY enabled cycles after issue
// and that the tag (entry index, address) travels with it.
module tb_sa_fu;
  import sa_pkg::*;

  localparam int unsigned LATENCY = 4;
  localparam int unsigned IDX_W   = 3;
  localparam int unsigned NOPS    = 20000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             en;
  logic             in_valid;
  sa_dtype_e        in_dtype;
  data_t            in_a, in_b;
  logic [IDX_W-1:0] in_idx;
  addr_t            in_addr;
  logic             out_valid;
  sa_dtype_e        out_dtype;
  data_t            out_sum;
  logic [IDX_W-1:0] out_idx;
  addr_t            out_addr;

  int checks = 0, failures = 0;

  sa_fu #(.LATENCY(LATENCY), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    sa_dtype_e dtype;
    data_t     exp;
    addr_t     addr;
    logic [IDX_W-1:0] idx;
    longint    due;       // enabled-cycle count at which it must appear
  } pend_t;
  pend_t q[$];
  longint en_cycles = 0;

  function automatic data_t rnd64();
    return {$urandom, $urandom};
  endfunction

  function automatic data_t pick_fp(input data_t other);
    int unsigned k = $urandom_range(0, 11);
    data_t v = rnd64();
    case (k)
      0: return {v[63], 11'd0, v[51:0]};                       // subnormal
      1: return {v[63], 63'd0};                                // +-0
      2: return {v[63], 11'h7FF, 52'd0};                       // +-inf
      3: return 64'h7FF8_0000_0000_0001 | (v & 64'h0007_0000_0000_0000); // NaN
      4: return {~other[63], other[62:0] ^ {53'd0, v[9:0]}};  // near cancellation
      5: return {v[63], 11'h7FE, v[51:0]};                     // near overflow
      6: return {v[63], other[62:52], v[51:0]};               // same exponent
      7: return {v[63], 11'd1, v[51:0]};                       // smallest normal
      default: return {v[63], 11'(11'd900 + v[62:52] % 11'd250), v[51:0]};
    endcase
  endfunction

  function automatic data_t ref_add(input sa_dtype_e dt, input data_t a, input data_t b);
    if (dt == DT_INT) return a + b;
    return $realtobits($bitstoreal(a) + $bitstoreal(b));
  endfunction

  function automatic logic is_nan(input data_t v);
    return v[62:52] == 11'h7FF && v[51:0] != 0;
  endfunction

  // Driver.
  initial begin
    en = 1'b0; in_valid = 1'b0; in_dtype = DT_INT; in_a = '0; in_b = '0; in_idx = '0; in_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NOPS; ) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      in_valid = ($urandom_range(0, 3) != 0);
      in_dtype = ($urandom_range(0, 3) == 0) ? DT_INT : DT_FP;
      in_a = ($urandom_range(0, 1) != 0) ? pick_fp('0) : rnd64();
      in_b = pick_fp(in_a);
      if ($urandom_range(0, 1) != 0) begin
        automatic data_t t = in_a; in_a = in_b; in_b = t;
      end
      in_idx  = IDX_W'($urandom);
      in_addr = $urandom;
      if (en && in_valid) begin
        automatic pend_t p;
        p.dtype = in_dtype;
        p.exp   = ref_add(in_dtype, in_a, in_b);
        p.addr  = in_addr;
        p.idx   = in_idx;
        p.due   = en_cycles + LATENCY;
        q.push_back(p);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    en = 1'b1;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: each result is looked at once, after the edge that moved it out.
  logic last_en = 1'b0;   // the last edge moved the pipeline
  always @(posedge clk) begin
    last_en <= rst_n && en;
    if (rst_n && en) begin
      en_cycles <= en_cycles + 1;
    end
  end

  always @(negedge clk) begin
    // out_* reflect the last edge; en_cycles counts enabled edges so far.
    if (rst_n && last_en && out_valid) begin
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL: unexpected result %h", out_sum);
      end else if (out_valid && q[0].due == en_cycles) begin
        automatic pend_t p = q.pop_front();
        automatic logic ok;
        checks++;
        if (p.dtype == DT_FP && is_nan(p.exp)) ok = is_nan(out_sum);
        else ok = (out_sum == p.exp);
        ok = ok && out_idx == p.idx && out_addr == p.addr && out_dtype == p.dtype;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL: dtype=%0d got %h exp %h (idx %0d/%0d addr %h/%h)",
                     p.dtype, out_sum, p.exp, out_idx, p.idx, out_addr, p.addr);
        end
      end else if (q[0].due < en_cycles) begin
        failures++; checks++;
        $display("FAIL: result due at %0d missing", q[0].due);
        void'(q.pop_front());
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (NOPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
