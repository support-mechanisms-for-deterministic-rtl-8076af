// tb_event_handler -- checks the byte layout of transmit and receive
// events, that a good reception is followed by its data read from the
// receive memory, that error reports carry no data, that transmit events
// are sent before queued receive reports, that receive slots are released
// after their event (but not for reports without a slot), that a flush
// pulse ends every event, and that random back pressure on the output
// loses nothing.
module tb_event_handler;
  import lmac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic txev_valid = 0, txev_ready, rx_ready = 0;
  tx_event_t txev = '0;
  rx_event_t rx_info = '0;
  logic [2:0] rd_id, rel_id;
  logic [11:0] rd_off;
  logic [7:0] rd_data;
  logic rel, out_valid, out_ready = 1, out_flush;
  logic [7:0] out_data;
  logic [15:0] rx_lost_count;

  event_handler dut (.*);

  always #5 clk = ~clk;
  function automatic logic [7:0] mem(input int id, input int off);
    return 8'(id * 17 + off * 3 + 1);
  endfunction
  always_ff @(posedge clk) rd_data <= mem(int'(rd_id), int'(rd_off));

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned got[$];
  int flushes = 0, rels[$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (out_flush) flushes++;
    if (rel) rels.push_back(rel_id);
  end
  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  byte unsigned exp[$];
  function automatic void exp_tx(input tx_event_t e);
    exp.push_back(EV_TX); exp.push_back(e.status); exp.push_back(8'(e.tt));
    for (int k = 7; k >= 0; k--) exp.push_back(8'(e.tstamp >> (8 * k)));
  endfunction
  function automatic void exp_rx(input rx_event_t e);
    exp.push_back(EV_RX); exp.push_back(e.status); exp.push_back(e.rssi);
    exp.push_back(8'(e.len >> 8)); exp.push_back(8'(e.len));
    for (int k = 7; k >= 0; k--) exp.push_back(8'(e.tstamp >> (8 * k)));
    if (e.status == 0) for (int i = 0; i < int'(e.len); i++) exp.push_back(mem(e.id, i));
  endfunction

  task automatic rx(input int status, input int id, input int len);
    rx_event_t e;
    e.status = 8'(status); e.id = 3'(id); e.len = 12'(len); e.rssi = 8'($urandom); e.tstamp = {$urandom, $urandom};
    @(negedge clk); rx_ready = 1; rx_info = e; @(negedge clk); rx_ready = 0;
    exp_rx(e);
  endtask

  initial begin
    tx_event_t t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // receive reports queue up while a transmit event waits to be taken
    rx(8'h00, 2, 40);
    rx(8'h12, 3, 60);
    rx(8'h05, 0, 30);
    rx(8'h46, 0, 0);
    rx(8'h00, 6, 300);
    repeat (400) @(negedge clk);
    t.status = 8'h04; t.tt = 1; t.tstamp = 64'h0102_0304_0506_0708;
    @(negedge clk); txev_valid = 1; txev = t;
    @(posedge clk); while (!txev_ready) @(posedge clk);
    @(negedge clk); txev_valid = 0;
    exp_tx(t);
    repeat (4000) @(negedge clk);
    // the transmit event arrived while the last reception was being sent, so it follows it
    check(got.size() == exp.size(), $sformatf("%0d bytes, expected %0d", got.size(), exp.size()));
    check(got == exp, "event bytes");
    check(flushes == 6, $sformatf("one flush per event (%0d)", flushes));
    check(rels.size() == 3 && rels[0] == 2 && rels[1] == 3 && rels[2] == 6,
          "slots released except for reports without a slot (IDINV)");
    // priority: both kinds pending at once
    got = {}; exp = {};
    fork
      rx(8'h00, 1, 5);
      begin @(negedge clk); txev_valid = 1; txev = t; end
    join
    @(posedge clk); while (!txev_ready) @(posedge clk);
    @(negedge clk); txev_valid = 0;
    repeat (300) @(negedge clk);
    check(got.size() > 0 && got[0] == EV_TX, "transmit event first when both are pending");
    check(rx_lost_count == 0, "no report lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
