// tb_sa_bank_xbar: self-checking testbench of the bank crossbar.
//
// Two address generators present random requests to random banks while the
// banks' ready lines toggle at random. Every cycle the testbench checks that
// a bank is offered a request exactly when some generator targets it (bank =
// low address bits), that the offered request is a targeting generator's,
// unchanged and tagged with its number, and that a generator sees ready
// exactly when its bank offers its request and is ready. With both generators
// held on one bank it checks that grants alternate (round robin), and it
// checks that requests to different banks move in the same cycle.
module tb_sa_bank_xbar;
  import sa_pkg::*;

  localparam int unsigned NUM_AG = 2, NUM_BANKS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic    ag_valid [NUM_AG];
  logic    ag_ready [NUM_AG];
  ag_req_t ag_req   [NUM_AG];
  logic    bk_valid [NUM_BANKS];
  logic    bk_ready [NUM_BANKS];
  sa_req_t bk_req   [NUM_BANKS];

  sa_bank_xbar #(.NUM_AG(NUM_AG), .NUM_BANKS(NUM_BANKS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int both_moved = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic check_cycle();
    for (int b = 0; b < NUM_BANKS; b++) begin
      logic want = 0;
      for (int g = 0; g < NUM_AG; g++)
        if (ag_valid[g] && ag_req[g].addr[2:0] == b) want = 1;
      check("bank offered iff targeted", bk_valid[b] == want);
      if (bk_valid[b]) begin
        int g = int'(bk_req[b].src);
        check("offered request belongs to a targeting generator",
              g < NUM_AG && ag_valid[g] && ag_req[g].addr[2:0] == b &&
              bk_req[b].addr == ag_req[g].addr && bk_req[b].data == ag_req[g].data &&
              bk_req[b].op == ag_req[g].op && bk_req[b].dtype == ag_req[g].dtype);
      end
    end
    for (int g = 0; g < NUM_AG; g++) begin
      int b = int'(ag_req[g].addr[2:0]);
      logic exp_ready = ag_valid[g] && bk_valid[b] && int'(bk_req[b].src) == g && bk_ready[b];
      check("generator ready", ag_ready[g] == exp_ready);
    end
    if (ag_ready[0] && ag_ready[1]) both_moved++;
  endtask

  initial begin
    int last;
    for (int g = 0; g < NUM_AG; g++) begin ag_valid[g] = 0; ag_req[g] = '0; end
    for (int b = 0; b < NUM_BANKS; b++) bk_ready[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Random traffic.
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int g = 0; g < NUM_AG; g++) begin
        ag_valid[g] = $urandom_range(0, 3) != 0;
        ag_req[g].op = sa_op_e'($urandom_range(0, 1));
        ag_req[g].dtype = sa_dtype_e'($urandom_range(0, 1));
        ag_req[g].addr = addr_t'($urandom_range(0, 31));
        ag_req[g].data = {$urandom, $urandom};
      end
      for (int b = 0; b < NUM_BANKS; b++) bk_ready[b] = $urandom_range(0, 3) != 0;
      #1 check_cycle();
    end

    // Both generators on bank 3, bank always ready: grants must alternate.
    @(negedge clk);
    for (int g = 0; g < NUM_AG; g++) begin
      ag_valid[g] = 1; ag_req[g].addr = 32'h100 + 3 + 8 * g;
    end
    for (int b = 0; b < NUM_BANKS; b++) bk_ready[b] = 1;
    #1 last = int'(bk_req[3].src);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      #1 check_cycle();
      check("round robin alternates", int'(bk_req[3].src) != last);
      last = int'(bk_req[3].src);
    end
    check("different banks move together", both_moved > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
