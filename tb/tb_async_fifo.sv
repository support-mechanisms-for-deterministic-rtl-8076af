// tb_async_fifo -- pushes a counting sequence through the dual-clock FIFO
// between two unrelated clocks (30 MHz write, 40 MHz read and the reverse)
// with random stalls on both sides; checks order, no loss, no duplication,
// the full flag and the empty flag.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, wfull, rempty;
  logic [8:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, full_seen = 0;
  localparam int N = 3000;

  async_fifo #(.WIDTH(9), .DEPTH(DEPTH)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .wfull,
                                              .rclk, .rrst_n(rst_n), .rd_en, .rdata, .rempty);

  always #16.67 wclk = ~wclk;
  always #12.5  rclk = ~rclk;

  initial begin
    #2ms;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // writer: fast bursts in the first half, slow in the second
  always @(posedge wclk) if (rst_n) begin
    int nxt;
    nxt = sent + ((wr_en && !wfull) ? 1 : 0);
    if (wfull) full_seen++;
    sent  <= nxt;
    wr_en <= (nxt < N) && ($urandom_range(0, 9) < (nxt < N/2 ? 9 : 3));
    wdata <= 9'(nxt);
  end

  // reader: slow in the first half so the FIFO fills, fast afterwards
  always @(posedge rclk) if (rst_n) begin
    if (rd_en && !rempty) begin
      check(rdata == 9'(got), $sformatf("order: got %0d expected %0d", rdata, 9'(got)));
      got <= got + 1;
    end
    rd_en <= ($urandom_range(0, 9) < (got < N/2 ? 2 : 9));
  end

  initial begin
    #100 rst_n = 1;
    wait (got == N);
    #1us;
    check(rempty, "empty at the end");
    check(full_seen > 0, "full flag was exercised");
    check(sent == N, "all written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
