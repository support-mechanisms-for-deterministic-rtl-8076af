// tb_fcs_crc32 -- checks the FCS against the CRC-32 check value of
// "123456789" (0xCBF43926), against a bit-serial reference for random frames,
// and checks that a frame followed by its own FCS leaves the 802.11 residue
// while a corrupted one does not.
module tb_fcs_crc32;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] data = 0;
  logic [31:0] fcs;
  logic check_ok;
  int checks = 0, failures = 0;

  fcs_crc32 dut (.clk, .rst_n, .init, .en, .data, .fcs, .check_ok);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: MSB-first CRC over bit-reversed bytes, result bit-reversed
  function automatic logic [31:0] ref_crc(input byte unsigned b[$]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic bit_in;
        bit_in = b[i][k];
        if (c[31] ^ bit_in) c = (c << 1) ^ 32'h04C1_1DB7;
        else                c = c << 1;
      end
    return ~{<<{c}};
  endfunction

  task automatic feed(input byte unsigned b[$]);
    init = 1; @(negedge clk); init = 0;
    foreach (b[i]) begin en = 1; data = b[i]; @(negedge clk); end
    en = 0;
  endtask

  initial begin
    byte unsigned q[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    q = {"1","2","3","4","5","6","7","8","9"};
    feed(q);
    check(fcs == 32'hCBF4_3926, $sformatf("check value %h", fcs));
    check(ref_crc(q) == 32'hCBF4_3926, "reference model sanity");
    for (int n = 0; n < 200; n++) begin
      logic [31:0] f;
      int len;
      len = $urandom_range(1, 64);
      q = {};
      for (int i = 0; i < len; i++) q.push_back(8'($urandom));
      feed(q);
      f = fcs;
      check(f == ref_crc(q), "random frame FCS");
      // append the FCS low byte first: residue must match
      for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
      feed(q);
      check(check_ok, "frame + FCS gives the residue");
      q[0] = q[0] ^ 8'h01;
      feed(q);
      check(!check_ok, "corrupted frame fails the check");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
