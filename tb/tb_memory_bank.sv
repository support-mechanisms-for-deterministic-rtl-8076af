// tb_memory_bank -- fills every slot of a bank through port A with a
// pattern that depends on slot and offset, reads it back through port B
// (one cycle latency) while port A keeps writing another slot, and checks
// slot allocation, the full flag and release.
module tb_memory_bank;
  localparam int SLOTS = 8, SB = 2344;
  logic clk = 0, rst_n = 0;
  logic alloc = 0, free = 0, full, wr_en = 0;
  logic [2:0] alloc_id, rel_id = 0, wr_id = 0, rd_id = 0;
  logic [11:0] wr_off = 0, rd_off = 0;
  logic [7:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;

  memory_bank dut (.clk, .rst_n, .alloc, .alloc_id, .full, .free, .rel_id,
                   .wr_en, .wr_id, .wr_off, .wr_data, .rd_id, .rd_off, .rd_data);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] pat(input int s, input int o);
    return 8'((s * 37) ^ (o * 13) ^ (o >> 8) ^ 8'h5A);
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int ids[8];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < SLOTS; s++) begin
      check(!full, "not full before allocation");
      alloc = 1; ids[s] = int'(alloc_id);
      @(negedge clk); alloc = 0;
    end
    check(full, "full after 8 allocations");
    for (int s = 0; s < SLOTS; s++) check(ids[s] == s, "ids in order 0..7");
    // write every byte of slots 0..7
    for (int s = 0; s < SLOTS; s++)
      for (int o = 0; o < SB; o++) begin
        wr_en = 1; wr_id = 3'(s); wr_off = 12'(o); wr_data = pat(s, o);
        @(negedge clk);
      end
    wr_en = 0;
    // read back slot by slot while port A rewrites slot (s+1)%8 with the same data
    for (int s = 0; s < SLOTS; s++)
      for (int o = 0; o < SB; o += 7) begin
        rd_id = 3'(s); rd_off = 12'(o);
        wr_en = 1; wr_id = 3'((s + 1) % SLOTS); wr_off = 12'(o); wr_data = pat((s + 1) % SLOTS, o);
        @(negedge clk);
        check(rd_data == pat(s, o), $sformatf("read slot %0d offset %0d", s, o));
      end
    wr_en = 0;
    // an offset past the slot end must not touch the next slot
    wr_en = 1; wr_id = 3'd2; wr_off = 12'(SB); wr_data = 8'hFF; @(negedge clk); wr_en = 0;
    rd_id = 3'd3; rd_off = 0; @(negedge clk);
    check(rd_data == pat(3, 0), "write past slot end ignored");
    // release and reallocate
    free = 1; rel_id = 3'd6; @(negedge clk); free = 0;
    check(!full && alloc_id == 3'd6, "released slot 6 is free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
