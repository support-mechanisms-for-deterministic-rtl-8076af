// tb_cca_controller -- sweeps RSSI, carrier and configuration and compares
// busy and the gated ADC samples with the rule: busy = (carrier sense on and
// carrier) or RSSI above threshold; samples zeroed when carrier sense is off
// and RSSI is not above the threshold.
module tb_cca_controller;
  import lmac_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_cs_en = 0, phy_carrier = 0;
  logic [7:0] cfg_threshold = 0, rssi = 0, threshold;
  logic [9:0] adc_i_in = 0, adc_q_in = 0, adc_i_out, adc_q_out;
  logic busy, cs_en;
  int checks = 0, failures = 0;

  cca_controller dut (.clk, .rst_n, .cfg_we, .cfg_cs_en, .cfg_threshold, .rssi, .phy_carrier,
                      .adc_i_in, .adc_q_in, .adc_i_out, .adc_q_out, .busy, .cs_en, .threshold);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    bit m_cs; logic [7:0] m_thr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cs_en == 1'b1 && threshold == 8'd0, "reset: carrier sense on, threshold 0");
    m_cs = 1; m_thr = 0;
    for (int n = 0; n < 5000; n++) begin
      if ($urandom_range(0, 20) == 0) begin
        cfg_we = 1; cfg_cs_en = 1'($urandom); cfg_threshold = 8'($urandom);
        @(negedge clk); cfg_we = 0;
        m_cs = cfg_cs_en; m_thr = cfg_threshold;
        check(cs_en == m_cs && threshold == m_thr, "configuration registered");
      end
      rssi = 8'($urandom); phy_carrier = 1'($urandom);
      adc_i_in = 10'($urandom); adc_q_in = 10'($urandom);
      #1;
      check(busy == ((m_cs && phy_carrier) || (rssi > m_thr)), "busy rule");
      if (!m_cs && !(rssi > m_thr))
        check(adc_i_out == 0 && adc_q_out == 0, "samples gated below threshold");
      else
        check(adc_i_out == adc_i_in && adc_q_out == adc_q_in, "samples pass");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
