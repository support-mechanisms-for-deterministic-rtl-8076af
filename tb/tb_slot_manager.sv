// tb_slot_manager -- allocates every slot, checks the lowest-free order, the
// full flag, single-cycle release and simultaneous alloc/release against a
// reference bitmap kept by the testbench.
module tb_slot_manager;
  localparam int SLOTS = 8;
  logic clk = 0, rst_n = 0;
  logic alloc = 0, free = 0;
  logic [2:0] alloc_id, rel_id = 0;
  logic full;
  logic [SLOTS-1:0] in_use, ref_use;
  int checks = 0, failures = 0;

  slot_manager #(.SLOTS(SLOTS)) dut (.clk, .rst_n, .alloc, .alloc_id, .full, .free, .rel_id, .in_use);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int lowest_free(input logic [SLOTS-1:0] u);
    for (int i = 0; i < SLOTS; i++) if (!u[i]) return i;
    return -1;
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ref_use = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!full && alloc_id == 0, "empty after reset");
    for (int i = 0; i < SLOTS; i++) begin
      check(alloc_id == 3'(lowest_free(ref_use)), "lowest free id while filling");
      alloc = 1; ref_use[alloc_id] = 1'b1;
      @(negedge clk); alloc = 0;
      check(in_use == ref_use, "bitmap after alloc (single cycle)");
    end
    check(full, "full after 8 allocations");
    free = 1; rel_id = 5; @(negedge clk); free = 0; ref_use[5] = 0;
    check(!full && alloc_id == 5, "release of 5 seen next cycle");
    free = 1; rel_id = 2; @(negedge clk); free = 0; ref_use[2] = 0;
    check(alloc_id == 2, "lowest free is 2");
    for (int n = 0; n < 2000; n++) begin
      bit a; int rid, lf;
      logic [SLOTS-1:0] expect_use;
      a   = 1'($urandom_range(0, 1));
      rid = $urandom_range(0, SLOTS-1);
      lf  = lowest_free(ref_use);
      alloc = a; free = 1'($urandom_range(0, 1)) && ref_use[rid]; rel_id = 3'(rid);
      #1;
      check(full == (lf < 0), "random: full flag");
      if (lf >= 0) check(alloc_id == 3'(lf), "random: alloc id is lowest free");
      expect_use = ref_use;
      if (a && lf >= 0) expect_use[lf] = 1'b1;
      if (free) expect_use[rid] = 1'b0;
      @(negedge clk);
      alloc = 0; free = 0;
      check(in_use == expect_use, "random: bitmap after alloc/release");
      ref_use = expect_use;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
