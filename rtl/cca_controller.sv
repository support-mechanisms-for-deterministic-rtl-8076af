// cca_controller -- configurable clear channel assessment.
//
// One register holds the RSSI threshold and one the carrier-sense enable;
// both are loaded by a one-cycle `cfg_we` from the host's "configure CCA"
// request and keep their value for all later transmissions. The medium is
// reported busy when the reception chain senses a carrier and carrier sense
// is enabled, or when the RSSI exceeds the threshold.
//
// With carrier sense disabled, the ADC samples fed to the reception chain are
// forced to zero while the RSSI is below the threshold, so that weaker
// stations are neither decoded nor cause deferral: this limits the range of
// the device. With carrier sense enabled the samples pass untouched.
//
// The register, comparator, busy rule and ADC gating follow the original
// description. The combinational busy output, the register reset values
// (carrier sense on, threshold 0) and an unsigned RSSI code are this design's
// choices. Timing: the configuration applies from the cycle after cfg_we;
// busy and the gated samples are combinational in rssi and carrier.
module cca_controller
  import lmac_pkg::*;
#(
  parameter logic [RSSI_W-1:0] RESET_THRESHOLD = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic              cfg_cs_en,
  input  logic [RSSI_W-1:0] cfg_threshold,
  input  logic [RSSI_W-1:0] rssi,          // from the auxiliary ADC
  input  logic              phy_carrier,   // PHY_CCA.indication of the receiver
  input  logic [ADC_W-1:0]  adc_i_in,
  input  logic [ADC_W-1:0]  adc_q_in,
  output logic [ADC_W-1:0]  adc_i_out,     // to the reception chain
  output logic [ADC_W-1:0]  adc_q_out,
  output logic              busy,
  output logic              cs_en,
  output logic [RSSI_W-1:0] threshold
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_en     <= 1'b1;
      threshold <= RESET_THRESHOLD;
    end else if (cfg_we) begin
      cs_en     <= cfg_cs_en;
      threshold <= cfg_threshold;
    end
  end

  logic above;
  assign above = rssi > threshold;
  assign busy  = (cs_en && phy_carrier) || above;

  logic gate;
  assign gate      = !cs_en && !above;
  assign adc_i_out = gate ? '0 : adc_i_in;
  assign adc_q_out = gate ? '0 : adc_q_in;
endmodule
